// tb_cla_lcu4: exhaustive self-checking testbench for the 4-bit lookahead carry unit.
//
// All 512 combinations of g[3:0], p[3:0] and cin are applied, one per clock. The expected
// carries come from the ripple form of the recursion, C(i+1) = G(i) | P(i) & C(i), evaluated
// step by step; the expected group generate is the carry out of that recursion with a carry
// in of 0, and the group propagate is the AND of all four propagates. A watchdog ends the
// run with a failure if it does not finish in time.
module tb_cla_lcu4;
  localparam int LIMIT = 1000;

  logic       clk = 1'b0;
  logic [3:0] g, p;
  logic       cin, g_grp, p_grp;
  logic [3:1] c;

  int checks   = 0;
  int failures = 0;
  int cycles   = 0;

  cla_lcu4 dut (.g(g), .p(p), .cin(cin), .c(c), .g_grp(g_grp), .p_grp(p_grp));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (cycles > LIMIT) begin
      failures = failures + 1;
      $display("watchdog: test did not finish in %0d cycles", LIMIT);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    logic [4:0] rc;
    logic       gen;
    g = '0; p = '0; cin = 1'b0;
    for (int v = 0; v < 512; v++) begin
      @(negedge clk);
      {g, p, cin} = 9'(v);
      @(posedge clk);
      rc[0] = cin;
      gen   = 1'b0;
      for (int i = 0; i < 4; i++) begin
        rc[i+1] = g[i] | (p[i] & rc[i]);
        gen     = g[i] | (p[i] & gen);
      end
      checks += 3;
      if (c !== rc[3:1]) begin
        failures++;
        if (failures < 10) $display("C MISMATCH g=%b p=%b cin=%0d got %b", g, p, cin, c);
      end
      if (g_grp !== gen) begin
        failures++;
        if (failures < 10) $display("G MISMATCH g=%b p=%b got %0d", g, p, g_grp);
      end
      if (p_grp !== &p) begin
        failures++;
        if (failures < 10) $display("P MISMATCH p=%b got %0d", p, p_grp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
