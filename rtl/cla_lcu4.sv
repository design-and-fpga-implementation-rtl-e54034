// cla_lcu4: 4-bit lookahead carry unit, the building block of the two-level carry lookahead
// adder.
//
// From four generate/propagate pairs and a carry in it forms, each in one sum-of-products
// level, the carries into positions 1..3 by expanding C(i+1) = G(i) + P(i)*C(i):
//   C1 = G0 + P0*Cin, C2 = G1 + P1*G0 + P1*P0*Cin, C3 = G2 + P2*G1 + P2*P1*G0 + P2*P1*P0*Cin,
// plus the group generate G = G3 + P3*G2 + P3*P2*G1 + P3*P2*P1*G0 and group propagate
// P = P3*P2*P1*P0, which let a unit one level up treat the four positions as one.
// The recursion is the source design's; the 4-bit grouping is this design's choice.
// Combinational.
module cla_lcu4 (
  input  logic [3:0] g,
  input  logic [3:0] p,
  input  logic       cin,
  output logic [3:1] c,
  output logic       g_grp,
  output logic       p_grp
);
  // Generate of bits [hi:lo] carried to the top of the span: G(lo) * P(lo+1) * ... * P(hi).
  function automatic logic span_term(logic [3:0] gv, logic [3:0] pv, int lo, int hi);
    logic t;
    t = gv[lo];
    for (int k = lo + 1; k <= hi; k++) t = t & pv[k];
    return t;
  endfunction

  always_comb begin
    for (int i = 1; i <= 3; i++) begin
      logic acc;
      acc = cin;
      for (int k = 0; k < i; k++) acc = acc & p[k];
      for (int j = 0; j < i; j++) acc = acc | span_term(g, p, j, i - 1);
      c[i] = acc;
    end
    g_grp = 1'b0;
    for (int j = 0; j < 4; j++) g_grp = g_grp | span_term(g, p, j, 3);
    p_grp = &p;
  end
endmodule
