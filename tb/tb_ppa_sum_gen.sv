// tb_ppa_sum_gen: self-check of ppa_sum_gen at 16 bits. The testbench forms
// true carries c[i] (carry out of bit i) of random additions by a bit-serial
// loop and checks that the block turns them into a + b + cin.
module tb_ppa_sum_gen;
  int checks = 0, failures = 0;
  logic [15:0] p, c, sum;
  logic cin, cout;

  ppa_sum_gen #(.WIDTH(16)) dut (.p(p), .c(c), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [15:0] a, b;
      logic carry;
      logic [16:0] expected;
      a = 16'($urandom); b = 16'($urandom); cin = 1'($urandom);
      carry = cin;
      for (int i = 0; i < 16; i++) begin
        p[i]  = a[i] ^ b[i];
        carry = (a[i] & b[i]) | (p[i] & carry);
        c[i]  = carry;
      end
      #1;
      expected = 17'(a) + 17'(b) + 17'(cin);
      checks++;
      if ({cout, sum} !== expected) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%b -> %h expected %h", a, b, cin, {cout, sum}, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
