// hybrid_adder_top: the 64-bit hybrid adder architectures side by side.
//
// Each architecture is a complete, independent 64-bit adder with its own operands, carry
// in, sum and carry out, so any one can be exercised or measured without the others:
//   1  hybrid_cla_ksa       CLA(32) + KSA(32)
//   2  hybrid_csla_ksa      CSLA(32) + KSA(32)
//   3  hybrid_cslaksa_ksa   (CSLA(16) + KSA(16)) + KSA(32)
//   4  hybrid_cslaksa_cska  (CSLA(16) + KSA(16)) + CSKA(32)
//   5  hybrid_rca_cska      RCA(32) + CSKA(32)
//   6  hybrid_rca_ksa       RCA(32) + KSA(32), evaluated beside the five in the source
//                           design's results but not one of its proposed architectures
// For every n, {coutn, sumn} = an + bn + cinn. skip4 and skip5 show which 16-bit skip block
// of the upper half of architectures 4 and 5 bypassed its carry. Combinational, no clock.
// The architectures are the source design's; gathering them in one top, each with its
// own ports, is this design's choice.
module hybrid_adder_top (
  input  logic [63:0] a1, b1, a2, b2, a3, b3, a4, b4, a5, b5, a6, b6,
  input  logic        cin1, cin2, cin3, cin4, cin5, cin6,
  output logic [63:0] sum1, sum2, sum3, sum4, sum5, sum6,
  output logic        cout1, cout2, cout3, cout4, cout5, cout6,
  output logic [1:0]  skip4, skip5
);
  hybrid_cla_ksa      u_arch1 (.a(a1), .b(b1), .cin(cin1), .sum(sum1), .cout(cout1));
  hybrid_csla_ksa     u_arch2 (.a(a2), .b(b2), .cin(cin2), .sum(sum2), .cout(cout2));
  hybrid_cslaksa_ksa  u_arch3 (.a(a3), .b(b3), .cin(cin3), .sum(sum3), .cout(cout3));
  hybrid_cslaksa_cska u_arch4 (.a(a4), .b(b4), .cin(cin4), .sum(sum4), .cout(cout4),
                               .skip(skip4));
  hybrid_rca_cska     u_arch5 (.a(a5), .b(b5), .cin(cin5), .sum(sum5), .cout(cout5),
                               .skip(skip5));
  hybrid_rca_ksa      u_arch6 (.a(a6), .b(b6), .cin(cin6), .sum(sum6), .cout(cout6));
endmodule
