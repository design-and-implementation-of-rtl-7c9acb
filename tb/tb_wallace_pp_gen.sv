// tb_wallace_pp_gen: self-check of wallace_pp_gen at N = 8 over all 65536
// operand pairs: row i must equal a * 2^i when b[i] is set and 0 otherwise,
// and the rows must add up to a * b.
module tb_wallace_pp_gen;
  int checks = 0, failures = 0;
  logic [7:0] a, b;
  logic [7:0][15:0] pp;

  wallace_pp_gen #(.N(8)) dut (.a(a), .b(b), .pp(pp));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      int total;
      {a, b} = 16'(v);
      #1;
      total = 0;
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (pp[i] !== (b[i] ? 16'(int'(a) << i) : 16'd0)) begin
          failures++;
          if (failures < 10) $display("FAIL a=%h b=%h row %0d = %h", a, b, i, pp[i]);
        end
        total += int'(pp[i]);
      end
      checks++;
      if (total != int'(a) * int'(b)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
