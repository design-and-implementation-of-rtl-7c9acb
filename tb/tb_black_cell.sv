// tb_black_cell: exhaustive self-check of black_cell. The expected group
// (G, P) of bits i..j is worked out by composing the two sub-groups as carry
// transfer functions: a carry c entering at bit j leaves bit k-1 as
// G[k-1:j] | P[k-1:j]&c and bit i as G[i:k] | P[i:k]&that; G[i:j] is the
// output for c = 0 and P[i:j] is whether the output for c = 1 differs.
module tb_black_cell;
  int checks = 0, failures = 0;
  logic g_ik, p_ik, g_kj, p_kj, g_ij, p_ij;

  black_cell dut (.g_ik(g_ik), .p_ik(p_ik), .g_kj(g_kj), .p_kj(p_kj), .g_ij(g_ij), .p_ij(p_ij));

  function automatic logic through(logic g, logic p, logic c);
    return g | (p & c);
  endfunction

  initial begin : watchdog
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic out0, out1;
      {g_ik, p_ik, g_kj, p_kj} = 4'(v);
      #1;
      out0 = through(g_ik, p_ik, through(g_kj, p_kj, 1'b0));
      out1 = through(g_ik, p_ik, through(g_kj, p_kj, 1'b1));
      // Only consistent (g, p) pairs matter for P, but the cell must give
      // G exactly for every input and P = p_ik & p_kj.
      checks++;
      if (g_ij != out0) begin
        failures++;
        $display("FAIL G v=%b -> %b expected %b", 4'(v), g_ij, out0);
      end
      checks++;
      if (p_ij != (p_ik & p_kj)) begin
        failures++;
        $display("FAIL P v=%b -> %b", 4'(v), p_ij);
      end
      if (!g_ik && !g_kj) begin
        checks++;
        if (p_ij != (out1 & ~out0)) begin
          failures++;
          $display("FAIL P transfer v=%b", 4'(v));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
