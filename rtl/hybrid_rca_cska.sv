// hybrid_rca_cska: architecture 5, the 64-bit hybrid RCA(32) + CSKA(32).
//
// The lower LOW_WIDTH bits are a plain ripple carry chain of full adders; its carry out C32
// enters a carry skip adder of SKIP_BLOCK-bit blocks over the upper bits. It is the
// low-area member of the family: no duplicated adders and no prefix tree, only one skip
// multiplexer per upper block. This split follows the source design.
// Interface: {cout, sum} = a + b + cin; skip[k] shows that upper skip block k passed its
// carry in straight through. Combinational, no clock.
module hybrid_rca_cska #(
  parameter int WIDTH      = 64,
  parameter int LOW_WIDTH  = 32,
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

  rca #(.WIDTH(LOW_WIDTH)) u_ripple_lsb (
    .a   (a[LOW_WIDTH-1:0]),
    .b   (b[LOW_WIDTH-1:0]),
    .cin (cin),
    .sum (sum[LOW_WIDTH-1:0]),
    .cout(c_low)
  );

  cska #(.WIDTH(WIDTH - LOW_WIDTH), .BLOCK(SKIP_BLOCK)) u_cska_msb (
    .a   (a[WIDTH-1:LOW_WIDTH]),
    .b   (b[WIDTH-1:LOW_WIDTH]),
    .cin (c_low),
    .sum (sum[WIDTH-1:LOW_WIDTH]),
    .cout(cout),
    .skip(skip)
  );
endmodule
