// rca: WIDTH-bit ripple carry adder.
//
// A chain of WIDTH full_adder cells; the carry out of bit i is the carry in of bit i+1, so
// the delay grows linearly with WIDTH. It is the smallest adder of the family and forms the
// lower 32 bits of architecture 5, RCA(32) + CSKA(32), as in the source design, and the two
// precomputing adders of each carry select block (this design's choice).
// Interface: sum = a + b + cin, cout is the carry out of the top bit. Combinational.
module rca #(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[WIDTH];
endmodule
