// ksa: WIDTH-bit Kogge-Stone parallel prefix adder.
//
// Stage 0 forms the bit pairs (Gi, Pi) = (ai*bi, ai^bi). Then log2(WIDTH) prefix stages
// follow; stage l combines every position i with position i - 2^(l-1) through the prefix
// operator (Gk + Pk*Gj, Pk*Pj), so after the last stage position i holds the group pair
// (G[i:0], P[i:0]) of all bits below and including it. The carry input is folded in only
// in the sum stage: C(i+1) = G[i:0] + P[i:0]*Cin, Si = Pi ^ Ci, Cout = C(WIDTH). The
// logarithmic prefix tree follows the source design, whose 32-bit instance has one
// generate/propagate stage, five prefix stages and a sum stage taking the carry in; folding
// Cin into the sum stage this way is this design's choice.
// Interface: sum = a + b + cin, cout is the carry out of the top bit. Combinational.
// WIDTH must be a power of two.
module ksa
  import adder_pkg::*;
#(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int LEVELS = $clog2(WIDTH);

  if (WIDTH != (1 << LEVELS)) begin : g_bad_width
    $error("ksa: WIDTH must be a power of two");
  end

  // g_lvl[l].gp[i] is the pair of bits [i : max(0, i - 2^l + 1)] after l prefix stages.
  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    gp_t gp [WIDTH];
    if (l == 0) begin : g_pg
      for (genvar i = 0; i < WIDTH; i++) begin : g_bit
        assign gp[i] = '{g: a[i] & b[i], p: a[i] ^ b[i]};
      end
    end else begin : g_prefix
      localparam int DIST = 1 << (l - 1);
      for (genvar i = 0; i < WIDTH; i++) begin : g_bit
        if (i >= DIST) begin : g_node
          assign gp[i] = gp_combine(g_lvl[l-1].gp[i], g_lvl[l-1].gp[i-DIST]);
        end else begin : g_pass
          assign gp[i] = g_lvl[l-1].gp[i];
        end
      end
    end
  end

  logic [WIDTH:0] c;

  assign c[0] = cin;
  for (genvar i = 0; i < WIDTH; i++) begin : g_sum
    assign c[i+1] = gp_carry(g_lvl[LEVELS].gp[i], cin);
    assign sum[i] = g_lvl[0].gp[i].p ^ c[i];
  end

  assign cout = c[WIDTH];
endmodule
