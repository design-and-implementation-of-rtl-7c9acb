// tb_ppa_pg_gen: random and directed self-check of ppa_pg_gen at 16 bits:
// p = a xor b, g = a and b bit by bit, and g[0] also set when bit 0
// propagates the carry in.
module tb_ppa_pg_gen;
  int checks = 0, failures = 0;
  logic [15:0] a, b, p, g;
  logic cin;

  ppa_pg_gen #(.WIDTH(16)) dut (.a(a), .b(b), .cin(cin), .p(p), .g(g));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [15:0] ep, eg;
      a = 16'($urandom); b = 16'($urandom); cin = 1'($urandom);
      if (n < 8) begin a = 16'(n & 1); b = 16'((n >> 1) & 1); cin = 1'(n >> 2); end
      #1;
      for (int i = 0; i < 16; i++) begin
        ep[i] = (a[i] != b[i]);
        eg[i] = (a[i] && b[i]);
      end
      if (ep[0] && cin) eg[0] = 1'b1;
      checks++;
      if (p !== ep || g !== eg) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%b -> p=%h g=%h expected p=%h g=%h", a, b, cin, p, g, ep, eg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
