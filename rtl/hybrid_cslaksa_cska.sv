// hybrid_cslaksa_cska: architecture 4, the 64-bit hybrid (CSLA(16) + KSA(16)) + CSKA(32).
//
// The lower 32 bits are the same carry select / Kogge-Stone section as in architecture 3.
// The upper bits are a carry skip adder of SKIP_BLOCK-bit blocks, which replaces the upper
// prefix tree with ripple chains plus one bypass multiplexer per block: smaller, slower.
// The source design presents it as the best balance of power, area and speed among its
// adders, and draws the upper section as two 16-bit skip blocks.
// Interface: {cout, sum} = a + b + cin; skip[k] shows that upper skip block k passed its
// carry in straight through. Combinational, no clock.
module hybrid_cslaksa_cska #(
  parameter int WIDTH      = 64,
  parameter int LOW_WIDTH  = 32,
  parameter int CSLA_WIDTH = 16,
  parameter int SKIP_BLOCK = 16
) (
  input  logic [WIDTH-1:0]                        a,
  input  logic [WIDTH-1:0]                        b,
  input  logic                                    cin,
  output logic [WIDTH-1:0]                        sum,
  output logic                                    cout,
  output logic [(WIDTH-LOW_WIDTH)/SKIP_BLOCK-1:0] skip
);
  logic c_low;

  csla_ksa #(.WIDTH(LOW_WIDTH), .CSLA_WIDTH(CSLA_WIDTH)) u_lsb (
    .a   (a[LOW_WIDTH-1:0]),
    .b   (b[LOW_WIDTH-1:0]),
    .cin (cin),
    .sum (sum[LOW_WIDTH-1:0]),
    .cout(c_low)
  );

  cska #(.WIDTH(WIDTH - LOW_WIDTH), .BLOCK(SKIP_BLOCK)) u_msb (
    .a   (a[WIDTH-1:LOW_WIDTH]),
    .b   (b[WIDTH-1:LOW_WIDTH]),
    .cin (c_low),
    .sum (sum[WIDTH-1:LOW_WIDTH]),
    .cout(cout),
    .skip(skip)
  );
endmodule
