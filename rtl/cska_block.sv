// cska_block: one carry skip (carry bypass) block of WIDTH bits.
//
// Inside the block the carry ripples through full adders. Alongside, the block propagate
// Pblock = P0*P1*...*P(WIDTH-1), with Pi = ai ^ bi, is formed from the operands alone. When
// Pblock is 1 every bit would pass the carry on unchanged, so the carry in is sent straight
// to the carry out and skips the ripple chain; otherwise the ripple carry is used. Either
// value is the correct carry: the skip only shortens the worst path. This follows the
// source design; the 16-bit default is the block size of its CSKA_32.
// Interface: sum = a + b + cin, cout is the block carry out, skip shows that the bypass is
// taken. Combinational.
module cska_block #(
  parameter int WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic             skip
);
  logic ripple_cout;

  rca #(.WIDTH(WIDTH)) u_ripple (
    .a   (a),
    .b   (b),
    .cin (cin),
    .sum (sum),
    .cout(ripple_cout)
  );

  always_comb begin
    skip = &(a ^ b);
    cout = skip ? cin : ripple_cout;
  end
endmodule
