// tb_ksa_adder: self-check of ksa_adder against the integer sum a + b + cin,
// at its 16-bit default and at 8, 12 and 32 bits.
// Directed vectors first: the value pair shown for this adder's simulation
// (31 + 12 = 43), every full-length carry chain (2^k - 1 + 1, with and
// without carry in), all-ones operands and alternating bit patterns; then
// 200000 random operand pairs with random carry in. It also counts how often
// the carry in and the carry out were exercised.
module tb_ksa_adder;
  int checks = 0, failures = 0;
  int cin_used = 0, cout_seen = 0;
  logic [15:0] a, b, sum;
  logic cin, cout;

  ksa_adder #(.WIDTH(16)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  // Other widths: 8 bits (checked exhaustively), 12 bits (not a power of
  // two) and 32 bits (five prefix levels), checked with random operands.
  logic [7:0]  a8, b8, s8;
  logic [11:0] a12, b12, s12;
  logic [31:0] a32, b32, s32;
  logic        c8, c12, c32;
  ksa_adder #(.WIDTH(8))  dut8  (.a(a8),  .b(b8),  .cin(cin), .sum(s8),  .cout(c8));
  ksa_adder #(.WIDTH(12)) dut12 (.a(a12), .b(b12), .cin(cin), .sum(s12), .cout(c12));
  ksa_adder #(.WIDTH(32)) dut32 (.a(a32), .b(b32), .cin(cin), .sum(s32), .cout(c32));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [15:0] ta, input logic [15:0] tb_, input logic tc);
    logic [16:0] expected;
    a = ta; b = tb_; cin = tc;
    #1;
    expected = 17'(ta) + 17'(tb_) + 17'(tc);
    checks++;
    if ({cout, sum} !== expected) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h b=%h cin=%b -> cout=%b sum=%h expected %h", ta, tb_, tc, cout, sum, expected);
    end
    if (tc) cin_used++;
    if (cout) cout_seen++;
  endtask

  initial begin
    apply(16'b0000000000011111, 16'b0000000000001100, 1'b0);
    checks++;
    if (sum !== 16'b0000000000101011 || cout !== 1'b0) failures++;
    apply(16'h0000, 16'h0000, 1'b0);
    apply(16'hFFFF, 16'h0000, 1'b1);
    apply(16'hFFFF, 16'hFFFF, 1'b1);
    apply(16'hFFFF, 16'hFFFF, 1'b0);
    apply(16'hAAAA, 16'h5555, 1'b1);
    apply(16'h5555, 16'h5555, 1'b0);
    apply(16'h8000, 16'h8000, 1'b0);
    for (int k = 0; k <= 16; k++) begin
      apply(16'((17'd1 << k) - 17'd1), 16'd1, 1'b0);
      apply(16'((17'd1 << k) - 17'd1), 16'd0, 1'b1);
      apply(16'(17'd1 << k), 16'((17'd1 << k) - 17'd1), 1'b1);
    end
    for (int n = 0; n < 200000; n++)
      apply(16'($urandom), 16'($urandom), 1'($urandom));
    for (int v = 0; v < (1 << 17); v++) begin
      {a8, b8, cin} = 17'(v);
      #1;
      checks++;
      if ({c8, s8} !== 9'(a8) + 9'(b8) + 9'(cin)) begin
        failures++;
        if (failures < 10) $display("FAIL w8 a=%h b=%h cin=%b -> %h", a8, b8, cin, {c8, s8});
      end
    end
    for (int n = 0; n < 50000; n++) begin
      a12 = 12'($urandom); b12 = 12'($urandom);
      a32 = $urandom; b32 = $urandom; cin = 1'($urandom);
      if (n == 0) begin a12 = '1; b12 = '0; a32 = '1; b32 = '0; cin = 1'b1; end
      #1;
      checks++;
      if ({c12, s12} !== 13'(a12) + 13'(b12) + 13'(cin)) begin
        failures++;
        if (failures < 10) $display("FAIL w12 a=%h b=%h cin=%b -> %h", a12, b12, cin, {c12, s12});
      end
      checks++;
      if ({c32, s32} !== 33'(a32) + 33'(b32) + 33'(cin)) begin
        failures++;
        if (failures < 10) $display("FAIL w32 a=%h b=%h cin=%b -> %h", a32, b32, cin, {c32, s32});
      end
    end
    checks++;
    if (cin_used == 0 || cout_seen == 0) begin
      failures++;
      $display("FAIL carry in used %0d times, carry out seen %0d times", cin_used, cout_seen);
    end
    $display("carry in used %0d times, carry out seen %0d times", cin_used, cout_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
