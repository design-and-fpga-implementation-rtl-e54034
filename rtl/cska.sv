// cska: WIDTH-bit carry skip adder made of BLOCK-bit skip blocks.
//
// The carry leaving each block is either the block's own ripple carry or, when all bits of
// the block propagate, the carry that entered it, passed on by the skip multiplexer. A carry
// generated low in the adder therefore crosses whole propagating blocks in one multiplexer
// delay each. The default of two 16-bit blocks is the source design's CSKA_32, the upper
// half of architectures 4 and 5.
// Interface: sum = a + b + cin, cout is the top block's carry out, skip[k] shows that block k
// took the bypass. Combinational. WIDTH must be a multiple of BLOCK.
module cska #(
  parameter int WIDTH = 32,
  parameter int BLOCK = 16
) (
  input  logic [WIDTH-1:0]       a,
  input  logic [WIDTH-1:0]       b,
  input  logic                   cin,
  output logic [WIDTH-1:0]       sum,
  output logic                   cout,
  output logic [WIDTH/BLOCK-1:0] skip
);
  localparam int NBLK = WIDTH / BLOCK;

  if (WIDTH % BLOCK != 0) begin : g_bad_width
    $error("cska: WIDTH must be a multiple of BLOCK");
  end

  logic [NBLK:0] c;

  assign c[0] = cin;

  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    cska_block #(.WIDTH(BLOCK)) u_blk (
      .a   (a[k*BLOCK +: BLOCK]),
      .b   (b[k*BLOCK +: BLOCK]),
      .cin (c[k]),
      .sum (sum[k*BLOCK +: BLOCK]),
      .cout(c[k+1]),
      .skip(skip[k])
    );
  end

  assign cout = c[NBLK];
endmodule
