// csla_ksa: 32-bit two-level lower section of architectures 3 and 4.
//
// The lowest CSLA_WIDTH bits are added by a carry select adder of CSLA_BLOCK-bit blocks; its
// carry out (C16 by default) is the carry in of a Kogge-Stone adder over the remaining
// WIDTH - CSLA_WIDTH bits, whose carry out is the section's. The 16 + 16 split follows the
// source design; the 4-bit select blocks are those it shows for its 32-bit carry select adder.
// Interface: sum = a + b + cin, cout is the carry out of the top bit (C32 in the 64-bit
// adders). Combinational. WIDTH - CSLA_WIDTH must be a power of two.
module csla_ksa #(
  parameter int WIDTH      = 32,
  parameter int CSLA_WIDTH = 16,
  parameter int CSLA_BLOCK = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int KSA_WIDTH = WIDTH - CSLA_WIDTH;

  logic c_mid;

  csla #(.WIDTH(CSLA_WIDTH), .BLOCK(CSLA_BLOCK)) u_lsb (
    .a   (a[CSLA_WIDTH-1:0]),
    .b   (b[CSLA_WIDTH-1:0]),
    .cin (cin),
    .sum (sum[CSLA_WIDTH-1:0]),
    .cout(c_mid)
  );

  ksa #(.WIDTH(KSA_WIDTH)) u_msb (
    .a   (a[WIDTH-1:CSLA_WIDTH]),
    .b   (b[WIDTH-1:CSLA_WIDTH]),
    .cin (c_mid),
    .sum (sum[WIDTH-1:CSLA_WIDTH]),
    .cout(cout)
  );
endmodule
