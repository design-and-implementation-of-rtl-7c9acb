// tb_cla_lcu16: exhaustive self-check of cla_lcu16 over all 512 combinations
// of group propagates, generates and carry in. The expected carries come from
// rippling the carry through the four groups one at a time
// (c_next = g | p & c), which the unit must match in look-ahead form.
module tb_cla_lcu16;
  int checks = 0, failures = 0;
  logic [3:0] p, g;
  logic c0, c16, pg, gg;
  logic [2:0] c;

  cla_lcu16 dut (.p(p), .g(g), .c0(c0), .c(c), .c16(c16), .pg(pg), .gg(gg));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      logic [4:0] rc;   // ripple carries c0, c4, c8, c12, c16
      logic [4:0] rz;   // the same with c0 = 0
      {p, g, c0} = 9'(v);
      #1;
      rc[0] = c0;
      rz[0] = 1'b0;
      for (int k = 0; k < 4; k++) begin
        rc[k+1] = g[k] | (p[k] & rc[k]);
        rz[k+1] = g[k] | (p[k] & rz[k]);
      end
      checks++;
      if (c !== rc[3:1] || c16 !== rc[4]) begin
        failures++;
        $display("FAIL p=%b g=%b c0=%b -> c=%b c16=%b expected %b", p, g, c0, c, c16, rc);
      end
      checks++;
      if (gg !== rz[4] || pg !== (&p)) begin
        failures++;
        $display("FAIL p=%b g=%b -> pg=%b gg=%b", p, g, pg, gg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
