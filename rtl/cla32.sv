// cla32: 32-bit carry lookahead adder, the lower half of architecture 1, CLA(32) + KSA(32).
//
// Two cla16 blocks add bits 0-15 and 16-31. Their group generate/propagate pairs (G0, P0)
// and (G1, P1) feed a lookahead level outside the blocks:
//   C16  = G0 + P0*Cin
//   Cout = G1 + P1*G0 + P1*P0*Cin
// so neither carry waits for a ripple through the lower block. The split into two 16-bit
// blocks with the carries formed outside them follows the source design.
// Interface: sum = a + b + cin, cout is the carry out of bit 31 (the C32 of the 64-bit
// adder). Combinational.
module cla32 (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        cin,
  output logic [31:0] sum,
  output logic        cout
);
  logic g0, p0, g1, p1, c16;

  cla16 u_lo (.a(a[15:0]),  .b(b[15:0]),  .cin(cin), .sum(sum[15:0]),  .g_grp(g0), .p_grp(p0));
  cla16 u_hi (.a(a[31:16]), .b(b[31:16]), .cin(c16), .sum(sum[31:16]), .g_grp(g1), .p_grp(p1));

  always_comb begin
    c16  = g0 | (p0 & cin);
    cout = g1 | (p1 & g0) | (p1 & p0 & cin);
  end
endmodule
