// cla16: 16-bit carry lookahead block with group generate/propagate outputs.
//
// Every bit forms Pi = ai ^ bi and Gi = ai * bi. Four lookahead units (cla_lcu4) compute
// the carries inside each 4-bit group from that group's carry in; a fifth unit computes
// the four group carries from the groups' generate/propagate pairs and cin. The sum is
// Si = Pi ^ Ci. No carry out is produced: the block reports its group generate g_grp and
// group propagate p_grp instead, and the caller forms the carry out, as the 16-bit blocks
// of the source design's CLA_32 do. The two-level 4 x 4 organisation inside the block is
// this design's choice. Combinational.
module cla16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        cin,
  output logic [15:0] sum,
  output logic        g_grp,
  output logic        p_grp
);
  logic [15:0] g, p, c;
  logic [3:0]  grp_g, grp_p, grp_c;

  assign g = a & b;
  assign p = a ^ b;

  // Second level: carries into the four groups.
  assign grp_c[0] = cin;
  cla_lcu4 u_lcu_grp (
    .g    (grp_g),
    .p    (grp_p),
    .cin  (cin),
    .c    (grp_c[3:1]),
    .g_grp(g_grp),
    .p_grp(p_grp)
  );

  // First level: carries inside each group.
  for (genvar q = 0; q < 4; q++) begin : g_grp4
    assign c[4*q] = grp_c[q];
    cla_lcu4 u_lcu (
      .g    (g[4*q +: 4]),
      .p    (p[4*q +: 4]),
      .cin  (grp_c[q]),
      .c    (c[4*q+1 +: 3]),
      .g_grp(grp_g[q]),
      .p_grp(grp_p[q])
    );
  end

  assign sum = p ^ c;
endmodule
