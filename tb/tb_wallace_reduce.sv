// tb_wallace_reduce: self-check of wallace_reduce. Partial-product rows are
// formed in the testbench (row i = a AND b[i], shifted by i); the two output
// rows must add up, modulo 2^(2N), to a * b. Checked over all 65536 operand
// pairs at N = 8, and with random operands at N = 4, 5 and 16, whose
// different row counts exercise other stage schedules.
module tb_wallace_reduce;
  int checks = 0, failures = 0;

  logic [7:0] a, b;
  logic [7:0][15:0] pp;
  logic [15:0] rs, rc;
  wallace_reduce #(.N(8)) dut (.pp(pp), .row_s(rs), .row_c(rc));

  logic [3:0] a4, b4;   logic [3:0][7:0]   pp4;   logic [7:0]  rs4, rc4;
  logic [4:0] a5, b5;   logic [4:0][9:0]   pp5;   logic [9:0]  rs5, rc5;
  logic [15:0] a16, b16; logic [15:0][31:0] pp16; logic [31:0] rs16, rc16;
  wallace_reduce #(.N(4))  dut4  (.pp(pp4),  .row_s(rs4),  .row_c(rc4));
  wallace_reduce #(.N(5))  dut5  (.pp(pp5),  .row_s(rs5),  .row_c(rc5));
  wallace_reduce #(.N(16)) dut16 (.pp(pp16), .row_s(rs16), .row_c(rc16));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      {a, b} = 16'(v);
      for (int i = 0; i < 8; i++) pp[i] = b[i] ? 16'(a) << i : 16'd0;
      #1;
      checks++;
      if (16'(rs + rc) !== 16'(int'(a) * int'(b))) begin
        failures++;
        if (failures < 10) $display("FAIL N=8 a=%h b=%h -> %h + %h", a, b, rs, rc);
      end
    end
    for (int n = 0; n < 20000; n++) begin
      longint prod16;
      a4 = 4'($urandom); b4 = 4'($urandom);
      a5 = 5'($urandom); b5 = 5'($urandom);
      a16 = 16'($urandom); b16 = 16'($urandom);
      if (n == 0) begin a4 = '1; b4 = '1; a5 = '1; b5 = '1; a16 = '1; b16 = '1; end
      for (int i = 0; i < 4; i++)  pp4[i]  = b4[i]  ? 8'(a4) << i   : 8'd0;
      for (int i = 0; i < 5; i++)  pp5[i]  = b5[i]  ? 10'(a5) << i  : 10'd0;
      for (int i = 0; i < 16; i++) pp16[i] = b16[i] ? 32'(a16) << i : 32'd0;
      #1;
      prod16 = longint'(a16) * longint'(b16);
      checks += 3;
      if (8'(rs4 + rc4) !== 8'(int'(a4) * int'(b4))) begin
        failures++;
        if (failures < 10) $display("FAIL N=4 a=%h b=%h", a4, b4);
      end
      if (10'(rs5 + rc5) !== 10'(int'(a5) * int'(b5))) begin
        failures++;
        if (failures < 10) $display("FAIL N=5 a=%h b=%h", a5, b5);
      end
      if (32'(rs16 + rc16) !== 32'(prod16)) begin
        failures++;
        if (failures < 10) $display("FAIL N=16 a=%h b=%h", a16, b16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
