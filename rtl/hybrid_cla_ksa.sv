// hybrid_cla_ksa: architecture 1, the 64-bit hybrid CLA(32) + KSA(32).
//
// Bits 0-31 are added by the two-level carry lookahead adder cla32. Its carry out C32 enters
// a 32-bit Kogge-Stone adder over bits 32-63, whose carry out is the adder's. The lower half
// uses lookahead logic of moderate size; the upper half gets the logarithmic-depth prefix
// tree, which starts from its own operands at once and only waits for C32 in its last
// stage. This split follows the source design. Its CLA block is fixed at 32 bits, so this
// architecture has no width parameters.
// Interface: {cout, sum} = a + b + cin. Combinational, no clock.
module hybrid_cla_ksa (
  input  logic [63:0] a,
  input  logic [63:0] b,
  input  logic        cin,
  output logic [63:0] sum,
  output logic        cout
);
  logic c32;

  cla32 u_cla_lsb32 (
    .a   (a[31:0]),
    .b   (b[31:0]),
    .cin (cin),
    .sum (sum[31:0]),
    .cout(c32)
  );

  ksa #(.WIDTH(32)) u_ksa_msb32 (
    .a   (a[63:32]),
    .b   (b[63:32]),
    .cin (c32),
    .sum (sum[63:32]),
    .cout(cout)
  );
endmodule
