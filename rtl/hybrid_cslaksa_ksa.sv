// hybrid_cslaksa_ksa: architecture 3, the 64-bit hybrid (CSLA(16) + KSA(16)) + KSA(32).
//
// Three sections in a chain: bits 0-15 by a carry select adder, bits 16-31 by a 16-bit
// Kogge-Stone adder (together the csla_ksa lower section), bits 32-63 by a 32-bit
// Kogge-Stone adder. Carries C16 and C32 link the sections. Both prefix trees evaluate
// their operands while the carry select section settles, and each waits for its incoming
// carry only in its sum stage. The source design reports this as its fastest adder.
// Interface: {cout, sum} = a + b + cin. Combinational, no clock.
// WIDTH - LOW_WIDTH and LOW_WIDTH - CSLA_WIDTH must be powers of two.
module hybrid_cslaksa_ksa #(
  parameter int WIDTH      = 64,
  parameter int LOW_WIDTH  = 32,
  parameter int CSLA_WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic c_low;

  csla_ksa #(.WIDTH(LOW_WIDTH), .CSLA_WIDTH(CSLA_WIDTH)) u_lsb (
    .a   (a[LOW_WIDTH-1:0]),
    .b   (b[LOW_WIDTH-1:0]),
    .cin (cin),
    .sum (sum[LOW_WIDTH-1:0]),
    .cout(c_low)
  );

  ksa #(.WIDTH(WIDTH - LOW_WIDTH)) u_msb (
    .a   (a[WIDTH-1:LOW_WIDTH]),
    .b   (b[WIDTH-1:LOW_WIDTH]),
    .cin (c_low),
    .sum (sum[WIDTH-1:LOW_WIDTH]),
    .cout(cout)
  );
endmodule
