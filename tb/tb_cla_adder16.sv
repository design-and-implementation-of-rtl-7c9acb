// tb_cla_adder16: self-check of cla_adder16 against the integer sum a + b + cin,
// and of its word group propagate/generate outputs.
// Directed vectors first: the value pair shown for this adder's simulation
// (31 + 12 = 43), every full-length carry chain (2^k - 1 + 1, with and
// without carry in), all-ones operands and alternating bit patterns; then
// 200000 random operand pairs with random carry in. It also counts how often
// the carry in and the carry out were exercised.
module tb_cla_adder16;
  int checks = 0, failures = 0;
  int cin_used = 0, cout_seen = 0;
  logic [15:0] a, b, sum;
  logic cin, cout;
  logic grp_p, grp_g;
  cla_adder16 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .grp_p(grp_p), .grp_g(grp_g));

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
    // The word's group signals: GG is the carry out for cin = 0 and PG says
    // whether every bit position propagates.
    checks++;
    if (grp_g !== 1'((17'(ta) + 17'(tb_)) >> 16) || grp_p !== &(ta ^ tb_)) begin
      failures++;
      if (failures < 10) $display("FAIL group a=%h b=%h -> PG=%b GG=%b", ta, tb_, grp_p, grp_g);
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
