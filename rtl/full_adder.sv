// full_adder: one-bit full adder, the cell that ripple carry chains are made of.
//
// sum = a ^ b ^ cin, cout = a*b + (a ^ b)*cin. Purely combinational, no clock.
// The chain-of-full-adders structure follows the source design; the gate equations are the
// textbook ones, which it does not print.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic p;

  always_comb begin
    p    = a ^ b;
    sum  = p ^ cin;
    cout = (a & b) | (p & cin);
  end
endmodule
