// ks4: 4-bit Kogge-Stone parallel-prefix adder unit.
//
// One of the two units that make up the high (MSB) half of the KS-CLA hybrid
// adder. It works in the three prefix-adder steps:
//   pre-calculation : p = a ^ b, g = a & b; the carry in is folded into bit 0
//                     (g0' = g0 | p0 & cin) so the prefix network needs no
//                     extra column;
//   prefix network  : two Kogge-Stone levels with spans 1 and 2, each node the
//                     operator (g, p) o (g', p') = (g | p & g', p & p');
//   post-calculation: carry into bit i is the group generate of bits i-1..0,
//                     sum = p ^ carry, carry out = group generate of bits 3..0.
// Purely combinational. Folding cin into bit 0 is this design's choice.
module ks4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] sum,
  output logic       cout
);
  logic [3:0] p, g;
  logic [3:0] g1, p1;   // after level 1 (span 1)
  logic [3:0] g2;       // after level 2 (span 2); its propagate is not needed
  logic [3:0] c;

  always_comb begin
    // pre-calculation
    p = a ^ b;
    g = a & b;
    g[0] = g[0] | (p[0] & cin);

    // level 1: combine with the neighbour one bit below
    g1[0] = g[0];
    p1[0] = p[0];
    for (int i = 1; i < 4; i++) begin
      g1[i] = g[i] | (p[i] & g[i-1]);
      p1[i] = p[i] & p[i-1];
    end

    // level 2: combine with the group two bits below
    g2[1:0] = g1[1:0];
    for (int i = 2; i < 4; i++)
      g2[i] = g1[i] | (p1[i] & g1[i-2]);

    // post-calculation
    c[0] = cin;
    c[3:1] = g2[2:0];
    sum  = p ^ c;
    cout = g2[3];
  end
endmodule
