// tb_wallace_ppa_top: end-to-end self-check of wallace_ppa_top with its
// default parameters.
//
// All four units are driven at once with independent operands: every one of
// the 65536 multiplier operand pairs (including the two pairs shown for the
// multiplier's simulation), and for the three adders directed carry-chain
// cases plus random operands and carry in. Results are compared with integer
// arithmetic. The testbench counts how often each mechanism of the design
// happened and fails if one never did: carry in taken and carry out produced
// by each adder, a carry chain through all 16 bits of each adder, the CLA's
// whole-word propagate, and products reaching the top bit of the multiplier.
module tb_wallace_ppa_top;
  int checks = 0, failures = 0;

  logic [7:0]  mul_a, mul_b;
  logic [15:0] mul_pr;
  logic [15:0] cla_a, cla_b, cla_sum, ksa_a, ksa_b, ksa_sum, bka_a, bka_b, bka_sum;
  logic        cla_cin, cla_cout, cla_pg, cla_gg, ksa_cin, ksa_cout, bka_cin, bka_cout;

  // Mechanism counters, per adder index 0 = CLA, 1 = KSA, 2 = BKA.
  int cin_used [3];
  int cout_seen [3];
  int full_chain [3];
  int cla_word_propagate = 0;
  int mul_top_bit = 0;

  wallace_ppa_top dut (
    .mul_a(mul_a), .mul_b(mul_b), .mul_pr(mul_pr),
    .cla_a(cla_a), .cla_b(cla_b), .cla_cin(cla_cin), .cla_sum(cla_sum),
    .cla_cout(cla_cout), .cla_pg(cla_pg), .cla_gg(cla_gg),
    .ksa_a(ksa_a), .ksa_b(ksa_b), .ksa_cin(ksa_cin), .ksa_sum(ksa_sum), .ksa_cout(ksa_cout),
    .bka_a(bka_a), .bka_b(bka_b), .bka_cin(bka_cin), .bka_sum(bka_sum), .bka_cout(bka_cout)
  );

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [16:0] add_ref(logic [15:0] x, logic [15:0] y, logic c);
    return 17'(x) + 17'(y) + 17'(c);
  endfunction

  // A carry chain through all 16 bits: every bit propagates and a carry in
  // enters at bit 0.
  function automatic bit is_full_chain(logic [15:0] x, logic [15:0] y, logic c);
    return c && ((x ^ y) == 16'hFFFF);
  endfunction

  task automatic check_all();
    logic [16:0] e_cla, e_ksa, e_bka;
    #1;
    e_cla = add_ref(cla_a, cla_b, cla_cin);
    e_ksa = add_ref(ksa_a, ksa_b, ksa_cin);
    e_bka = add_ref(bka_a, bka_b, bka_cin);
    checks += 5;
    if (mul_pr !== 16'(int'(mul_a) * int'(mul_b))) begin
      failures++;
      if (failures < 10) $display("FAIL mul %h x %h -> %h", mul_a, mul_b, mul_pr);
    end
    if ({cla_cout, cla_sum} !== e_cla) begin
      failures++;
      if (failures < 10) $display("FAIL cla %h + %h + %b -> %h", cla_a, cla_b, cla_cin, {cla_cout, cla_sum});
    end
    if (cla_pg !== &(cla_a ^ cla_b) || cla_gg !== 1'(add_ref(cla_a, cla_b, 1'b0) >> 16)) begin
      failures++;
      if (failures < 10) $display("FAIL cla group %h + %h -> pg=%b gg=%b", cla_a, cla_b, cla_pg, cla_gg);
    end
    if ({ksa_cout, ksa_sum} !== e_ksa) begin
      failures++;
      if (failures < 10) $display("FAIL ksa %h + %h + %b -> %h", ksa_a, ksa_b, ksa_cin, {ksa_cout, ksa_sum});
    end
    if ({bka_cout, bka_sum} !== e_bka) begin
      failures++;
      if (failures < 10) $display("FAIL bka %h + %h + %b -> %h", bka_a, bka_b, bka_cin, {bka_cout, bka_sum});
    end
    if (cla_cin) cin_used[0]++;
    if (ksa_cin) cin_used[1]++;
    if (bka_cin) cin_used[2]++;
    if (cla_cout) cout_seen[0]++;
    if (ksa_cout) cout_seen[1]++;
    if (bka_cout) cout_seen[2]++;
    if (is_full_chain(cla_a, cla_b, cla_cin)) full_chain[0]++;
    if (is_full_chain(ksa_a, ksa_b, ksa_cin)) full_chain[1]++;
    if (is_full_chain(bka_a, bka_b, bka_cin)) full_chain[2]++;
    if (cla_pg) cla_word_propagate++;
    if (mul_pr[15]) mul_top_bit++;
  endtask

  initial begin
    cin_used = '{default: 0};
    cout_seen = '{default: 0};
    full_chain = '{default: 0};

    // Operand pairs shown for the multiplier and the adders' simulations.
    mul_a = 8'b01101110; mul_b = 8'b00000001;
    {cla_a, ksa_a, bka_a} = {3{16'b0000000000011111}};
    {cla_b, ksa_b, bka_b} = {3{16'b0000000000001100}};
    {cla_cin, ksa_cin, bka_cin} = 3'b000;
    check_all();
    checks += 2;
    if (mul_pr !== 16'b0000000001101110) failures++;
    if (cla_sum !== 16'b0000000000101011 || ksa_sum !== 16'b0000000000101011 ||
        bka_sum !== 16'b0000000000101011) failures++;

    mul_a = 8'b01100100; mul_b = 8'b01100100;
    {cla_a, ksa_a, bka_a} = {3{16'hFFFF}};
    {cla_b, ksa_b, bka_b} = {3{16'h0000}};
    {cla_cin, ksa_cin, bka_cin} = 3'b111;
    check_all();
    checks++;
    if (mul_pr !== 16'b0010011100010000) failures++;

    for (int v = 0; v < 65536; v++) begin
      {mul_a, mul_b} = 16'(v);
      cla_a = 16'($urandom); cla_b = 16'($urandom); cla_cin = 1'($urandom);
      ksa_a = 16'($urandom); ksa_b = 16'($urandom); ksa_cin = 1'($urandom);
      bka_a = 16'($urandom); bka_b = 16'($urandom); bka_cin = 1'($urandom);
      // Every 64th vector: a full-length carry chain on all three adders.
      if (v % 64 == 1) begin
        cla_b = ~cla_a; ksa_b = ~ksa_a; bka_b = ~bka_a;
        {cla_cin, ksa_cin, bka_cin} = 3'b111;
      end
      check_all();
    end

    $display("mechanisms: carry in cla/ksa/bka %0d/%0d/%0d, carry out %0d/%0d/%0d,",
             cin_used[0], cin_used[1], cin_used[2], cout_seen[0], cout_seen[1], cout_seen[2]);
    $display("  16-bit carry chains %0d/%0d/%0d, cla word propagate %0d, product bit 15 set %0d",
             full_chain[0], full_chain[1], full_chain[2], cla_word_propagate, mul_top_bit);
    for (int k = 0; k < 3; k++) begin
      checks += 3;
      if (cin_used[k] == 0) failures++;
      if (cout_seen[k] == 0) failures++;
      if (full_chain[k] == 0) failures++;
    end
    checks += 2;
    if (cla_word_propagate == 0) failures++;
    if (mul_top_bit == 0) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
