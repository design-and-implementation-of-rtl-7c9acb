// tb_cla4: exhaustive self-check of cla4 (all 512 operand/carry-in
// combinations). The sum must equal the low 4 bits of a + b + cin; the group
// generate must be the carry out of a + b with no carry in, and the group
// propagate must say whether a + b is all ones (every bit passes a carry).
module tb_cla4;
  int checks = 0, failures = 0;
  logic [3:0] a, b, sum;
  logic cin, grp_p, grp_g;

  cla4 dut (.a(a), .b(b), .cin(cin), .sum(sum), .grp_p(grp_p), .grp_g(grp_g));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      logic [4:0] total, nocin;
      {a, b, cin} = 9'(v);
      #1;
      total = 5'(a) + 5'(b) + 5'(cin);
      nocin = 5'(a) + 5'(b);
      checks++;
      if (sum !== total[3:0]) begin
        failures++;
        $display("FAIL sum a=%h b=%h cin=%b -> %h", a, b, cin, sum);
      end
      checks++;
      if (grp_g !== nocin[4] || grp_p !== (&(a ^ b))) begin
        failures++;
        $display("FAIL group a=%h b=%h -> p=%b g=%b", a, b, grp_p, grp_g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
