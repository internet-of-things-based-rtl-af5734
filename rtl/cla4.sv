// cla4: 4-bit carry look-ahead adder unit.
//
// One of the two units that make up the low (LSB) half of the KS-CLA hybrid
// adder. Every bit forms propagate p = a ^ b and generate g = a & b; all four
// internal carries and the carry out are then written as flat sums of products
// of g, p and cin (c[i+1] = g[i] | p[i]&c[i] fully expanded), so no carry
// ripples through the unit. Sum bit i is p[i] ^ c[i].
// Purely combinational. The propagate/generate equations are the standard
// carry look-ahead ones; the flat two-level expansion is this design's choice.
module cla4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] sum,
  output logic       cout
);
  logic [3:0] p, g;
  logic [4:0] c;

  always_comb begin
    p = a ^ b;
    g = a & b;
    c[0] = cin;
    c[1] = g[0] | (p[0] & cin);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cin);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & cin);
    c[4] = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0])
         | (p[3] & p[2] & p[1] & p[0] & cin);
    sum  = p ^ c[3:0];
    cout = c[4];
  end
endmodule
