// tb_gray_cell: exhaustive self-check of gray_cell: the group generate of
// bits i..j is the carry leaving bit i when bits k-1..j produce G[k-1:j] and
// bits i..k pass it on when P[i:k] is set or produce one when G[i:k] is set.
module tb_gray_cell;
  int checks = 0, failures = 0;
  logic g_ik, p_ik, g_kj, g_ij;

  gray_cell dut (.g_ik(g_ik), .p_ik(p_ik), .g_kj(g_kj), .g_ij(g_ij));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic expected;
      {g_ik, p_ik, g_kj} = 3'(v);
      #1;
      expected = g_ik ? 1'b1 : (p_ik ? g_kj : 1'b0);
      checks++;
      if (g_ij != expected) begin
        failures++;
        $display("FAIL v=%b -> %b expected %b", 3'(v), g_ij, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
