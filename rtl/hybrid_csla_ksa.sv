// hybrid_csla_ksa: architecture 2, the 64-bit hybrid CSLA(32) + KSA(32).
//
// The lower LOW_WIDTH bits are added by a carry select adder of CSLA_BLOCK-bit blocks; its
// carry out (C32) is the carry in of a Kogge-Stone adder over the upper bits. The select
// chain costs one multiplexer per block on the carry path, and the Kogge-Stone tree of the
// upper half runs in parallel with it. This split follows the source design.
// Interface: {cout, sum} = a + b + cin. Combinational, no clock.
// WIDTH - LOW_WIDTH must be a power of two, LOW_WIDTH a multiple of CSLA_BLOCK.
module hybrid_csla_ksa #(
  parameter int WIDTH      = 64,
  parameter int LOW_WIDTH  = 32,
  parameter int CSLA_BLOCK = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic c_low;

  csla #(.WIDTH(LOW_WIDTH), .BLOCK(CSLA_BLOCK)) u_csla_lsb (
    .a   (a[LOW_WIDTH-1:0]),
    .b   (b[LOW_WIDTH-1:0]),
    .cin (cin),
    .sum (sum[LOW_WIDTH-1:0]),
    .cout(c_low)
  );

  ksa #(.WIDTH(WIDTH - LOW_WIDTH)) u_ksa_msb (
    .a   (a[WIDTH-1:LOW_WIDTH]),
    .b   (b[WIDTH-1:LOW_WIDTH]),
    .cin (c_low),
    .sum (sum[WIDTH-1:LOW_WIDTH]),
    .cout(cout)
  );
endmodule
