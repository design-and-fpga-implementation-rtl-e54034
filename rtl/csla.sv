// csla: WIDTH-bit carry select adder built from a chain of BLOCK-bit carry select blocks.
//
// Every block precomputes its sum for both values of its carry in; the carry from the block
// below selects which one is used and, with it, the carry passed to the block above. The
// critical path is one block's ripple plus one multiplexer per remaining block.
// The default 32-bit adder of 4-bit blocks matches the source design's CSLA_32, which it
// draws as two 16-bit carry select adders of four 4-bit blocks each; that middle 16-bit
// level adds no logic and is not kept as a separate module here.
// Interface: sum = a + b + cin, cout is the carry out of the top block. Combinational.
// WIDTH must be a multiple of BLOCK.
module csla #(
  parameter int WIDTH = 32,
  parameter int BLOCK = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int NBLK = WIDTH / BLOCK;

  if (WIDTH % BLOCK != 0) begin : g_bad_width
    $error("csla: WIDTH must be a multiple of BLOCK");
  end

  logic [NBLK:0] c;

  assign c[0] = cin;

  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    csla_block #(.WIDTH(BLOCK)) u_blk (
      .a   (a[k*BLOCK +: BLOCK]),
      .b   (b[k*BLOCK +: BLOCK]),
      .cin (c[k]),
      .sum (sum[k*BLOCK +: BLOCK]),
      .cout(c[k+1])
    );
  end

  assign cout = c[NBLK];
endmodule
