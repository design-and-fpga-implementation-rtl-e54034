// hybrid_rca_ksa: the 64-bit hybrid RCA(32) + KSA(32).
//
// The lower LOW_WIDTH bits are a ripple carry chain of full adders; its carry out C32 is the
// carry in of a Kogge-Stone adder over the upper bits. It pairs the cheapest lower section
// with the fastest upper one. This combination is not among the five architectures the
// source design proposes, but its results tables evaluate it beside them, so it is built
// here too; the split follows the same 32 + 32 partition.
// Interface: {cout, sum} = a + b + cin. Combinational, no clock.
// WIDTH - LOW_WIDTH must be a power of two.
module hybrid_rca_ksa #(
  parameter int WIDTH     = 64,
  parameter int LOW_WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic c_low;

  rca #(.WIDTH(LOW_WIDTH)) u_ripple_lsb (
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
