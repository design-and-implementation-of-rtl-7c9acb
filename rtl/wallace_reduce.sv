// wallace_reduce: Wallace tree reduction of the partial products to two rows.
//
// Each stage takes its rows in groups of three and reduces every group to a
// sum row and a carry row (shifted left by one column); rows left over when
// the count is not a multiple of three pass to the next stage unchanged. Row
// counts go N -> 2*floor(N/3) + N mod 3 until two rows remain; for N = 8 that
// is 8 -> 6 -> 4 -> 3 -> 2 in four stages, each one full-adder delay deep.
//
// Within a group, a column with three bits that can be non-zero gets a full
// adder, one with two such bits a half adder, one with a single bit a plain
// wire, and an empty column nothing. Which bits can be non-zero is worked out
// at elaboration time from the shape of the partial products (row i holds
// bits i+N-1..i), so no adder is spent on a constant zero. Input bits outside
// that shape are ignored and must be zero.
//
// The top column forms only its sum bit (an XOR), since a carry out of it
// would have weight 2^(2N) and an unsigned N x N product fits in 2N bits. The grouping schedule is the
// classic Wallace one and is this design's choice. Combinational. N >= 2.
module wallace_reduce #(
  parameter int N = 8
) (
  input  logic [N-1:0][2*N-1:0] pp,
  output logic [2*N-1:0]        row_s,
  output logic [2*N-1:0]        row_c
);

  localparam int W = 2 * N;

  function automatic int rows_after(int r);
    return 2 * (r / 3) + r % 3;
  endfunction

  function automatic int rows_at(int s);
    int r = N;
    for (int i = 0; i < s; i++) r = rows_after(r);
    return r;
  endfunction

  function automatic int calc_stages();
    int r = N;
    int s = 0;
    while (r > 2) begin
      r = rows_after(r);
      s++;
    end
    return s;
  endfunction

  localparam int NSTAGE = calc_stages();

  typedef logic [N-1:0][W-1:0]  stage_mask_t;  // per row: which bits may be 1
  typedef stage_mask_t [NSTAGE:0] mask_t;

  function automatic mask_t calc_masks();
    mask_t m = '0;
    int r = N;
    for (int i = 0; i < N; i++) m[0][i] = W'((64'd1 << N) - 64'd1) << i;
    for (int s = 0; s < NSTAGE; s++) begin
      int ng = r / 3;
      for (int gi = 0; gi < ng; gi++) begin
        for (int c = 0; c < W; c++) begin
          int nb = int'(m[s][3*gi][c]) + int'(m[s][3*gi+1][c]) + int'(m[s][3*gi+2][c]);
          m[s+1][2*gi][c] = (nb >= 1);
          if (c + 1 < W) m[s+1][2*gi+1][c+1] = (nb >= 2);
        end
      end
      for (int k = 0; k < r % 3; k++) m[s+1][2*ng+k] = m[s][3*ng+k];
      r = rows_after(r);
    end
    return m;
  endfunction

  localparam mask_t MASK = calc_masks();

  if (N < 2) begin : g_bad_n
    $error("wallace_reduce needs N >= 2");
  end

  for (genvar s = 0; s < NSTAGE; s++) begin : g_stage
    localparam int RIN  = rows_at(s);
    localparam int ROUT = rows_at(s + 1);
    localparam int NG   = RIN / 3;

    logic [W-1:0] rin  [N];
    logic [W-1:0] rout [N];

    for (genvar r = 0; r < N; r++) begin : g_in
      if (s == 0) begin : g_first
        assign rin[r] = pp[r];
      end else begin : g_next
        assign rin[r] = g_stage[s-1].rout[r];
      end
    end

    for (genvar gi = 0; gi < NG; gi++) begin : g_grp
      logic [W-2:0] cy;  // carry out of each column of this group but the top

      for (genvar c = 0; c < W; c++) begin : g_col
        localparam bit M0 = MASK[s][3*gi][c];
        localparam bit M1 = MASK[s][3*gi+1][c];
        localparam bit M2 = MASK[s][3*gi+2][c];
        localparam int NB = int'(M0) + int'(M1) + int'(M2);
        if (c == W - 1) begin : g_top
          // Weight 2^(2N-1): its carry would leave the product, so only the
          // sum bit is formed.
          assign rout[2*gi][c] = rin[3*gi][c] ^ rin[3*gi+1][c] ^ rin[3*gi+2][c];
        end else if (NB == 3) begin : g_fa
          full_adder u_fa (
            .a(rin[3*gi][c]), .b(rin[3*gi+1][c]), .cin(rin[3*gi+2][c]),
            .sum(rout[2*gi][c]), .cout(cy[c])
          );
        end else if (NB == 2) begin : g_ha
          localparam int IA = M0 ? 0 : 1;
          localparam int IB = M2 ? 2 : 1;
          half_adder u_ha (
            .a(rin[3*gi+IA][c]), .b(rin[3*gi+IB][c]),
            .sum(rout[2*gi][c]), .carry(cy[c])
          );
        end else if (NB == 1) begin : g_wire
          localparam int IA = M0 ? 0 : (M1 ? 1 : 2);
          assign rout[2*gi][c] = rin[3*gi+IA][c];
          assign cy[c] = 1'b0;
        end else begin : g_empty
          assign rout[2*gi][c] = 1'b0;
          assign cy[c] = 1'b0;
        end
      end

      assign rout[2*gi+1] = {cy, 1'b0};
    end

    for (genvar k = 0; k < RIN % 3; k++) begin : g_left
      assign rout[2*NG+k] = rin[3*NG+k];
    end

    for (genvar r = ROUT; r < N; r++) begin : g_unused
      assign rout[r] = '0;
    end
  end

  if (NSTAGE == 0) begin : g_no_stage
    assign row_s = pp[0];
    assign row_c = pp[1];
  end else begin : g_out
    assign row_s = g_stage[NSTAGE-1].rout[0];
    assign row_c = g_stage[NSTAGE-1].rout[1];
  end

endmodule
