// csla_block: one carry select block of WIDTH bits.
//
// Two ripple carry adders add the block's operands at the same time, one assuming a carry
// in of 0 and one assuming 1. When the real carry in arrives it only has to steer a
// multiplexer that picks the matching sum and carry out, so the carry passes a block in one
// multiplexer delay. The two-adders-plus-multiplexer structure follows the source design;
// using ripple adders for the two precomputations is this design's choice.
// Interface: sum = a + b + cin, cout is the block carry out. Combinational.
module csla_block #(
  parameter int WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH-1:0] sum0, sum1;
  logic             cout0, cout1;

  rca #(.WIDTH(WIDTH)) u_add_c0 (.a(a), .b(b), .cin(1'b0), .sum(sum0), .cout(cout0));
  rca #(.WIDTH(WIDTH)) u_add_c1 (.a(a), .b(b), .cin(1'b1), .sum(sum1), .cout(cout1));

  always_comb begin
    if (cin) begin
      sum  = sum1;
      cout = cout1;
    end else begin
      sum  = sum0;
      cout = cout0;
    end
  end
endmodule
