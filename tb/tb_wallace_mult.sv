// tb_wallace_mult: self-check of wallace_mult at N = 8 with each of the four
// final adders (ripple, CLA, Kogge-Stone, Brent-Kung), over all 65536 operand
// pairs, against the integer product. The two operand pairs shown for this
// multiplier's simulation are checked by value first:
// 01101110 x 00000001 = 0000000001101110 and
// 01100100 x 01100100 = 0010011100010000. A 12 x 12 multiplier with the
// Kogge-Stone final adder is also checked with random operands.
module tb_wallace_mult;
  import arith_pkg::*;

  int checks = 0, failures = 0;
  logic [7:0]  a, b;
  logic [15:0] pr_rca, pr_cla, pr_ksa, pr_bka;
  logic [11:0] a12, b12;
  logic [23:0] pr12;

  wallace_mult #(.N(8), .FINAL_ADDER(ADD_RIPPLE)) dut_rca (.a(a), .b(b), .pr(pr_rca));
  wallace_mult #(.N(8), .FINAL_ADDER(ADD_CLA))    dut_cla (.a(a), .b(b), .pr(pr_cla));
  wallace_mult                                    dut_ksa (.a(a), .b(b), .pr(pr_ksa));
  wallace_mult #(.N(8), .FINAL_ADDER(ADD_BKA))    dut_bka (.a(a), .b(b), .pr(pr_bka));
  wallace_mult #(.N(12), .FINAL_ADDER(ADD_KSA))   dut_12  (.a(a12), .b(b12), .pr(pr12));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [15:0] expected);
    logic [15:0] got [4];
    got = '{pr_rca, pr_cla, pr_ksa, pr_bka};
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (got[k] !== expected) begin
        failures++;
        if (failures < 10)
          $display("FAIL adder %0d: %h x %h -> %h expected %h", k, a, b, got[k], expected);
      end
    end
  endtask

  initial begin
    a = 8'b01101110; b = 8'b00000001; #1;
    check(16'b0000000001101110);
    a = 8'b01100100; b = 8'b01100100; #1;
    check(16'b0010011100010000);
    for (int v = 0; v < 65536; v++) begin
      {a, b} = 16'(v);
      #1;
      check(16'(int'(a) * int'(b)));
    end
    for (int n = 0; n < 20000; n++) begin
      a12 = 12'($urandom); b12 = 12'($urandom);
      if (n == 0) begin a12 = '1; b12 = '1; end
      #1;
      checks++;
      if (pr12 !== 24'(int'(a12) * int'(b12))) begin
        failures++;
        if (failures < 10) $display("FAIL N=12 %h x %h -> %h", a12, b12, pr12);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
