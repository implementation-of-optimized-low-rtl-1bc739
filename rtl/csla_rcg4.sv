// csla_rcg4 -- 4-bit carry-select adder slice with a reduced carry-generation
// (CG) block.
//
// A conventional carry-select adder computes every sum twice, once for a
// carry-in of 0 and once for 1, with two carry-generation blocks. Here each
// bit pair first goes through a half adder (generate g = a&b, propagate
// p = a^b). A single carry chain c0 is built for carry-in 0 (bit 0 carry is
// g0, each further bit one AND and one OR: three of each). The carry-in 1
// case differs from it only where every lower bit propagates, so the carry
// into bit i is c0[i-1] | (p[i-1:0] all ones & cin), and the sum bit is
// p[i] ^ that carry. Cout = c0[3] | (&p & cin).
//
// Interface: a, b, cin in; s, cout out. Purely combinational.
// The half-adder front end and the single carry chain follow the reduced-CG
// slice; the way the carry-in is folded in is this design's reading of it.
module csla_rcg4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] s,
  output logic       cout
);
  logic [3:0] g, p;        // half-adder carry and sum
  logic [3:0] c0;          // carry out of each bit for cin = 0
  logic [3:0] cin_bit;     // carry into each bit for the actual cin

  // Half adders.
  assign g = a & b;
  assign p = a ^ b;

  // Single carry-generation chain for cin = 0: three AND and three OR gates.
  assign c0[0] = g[0];
  assign c0[1] = g[1] | (p[1] & c0[0]);
  assign c0[2] = g[2] | (p[2] & c0[1]);
  assign c0[3] = g[3] | (p[3] & c0[2]);

  // Carry-in correction: cin only reaches bit i through an all-propagate run.
  assign cin_bit[0] = cin;
  assign cin_bit[1] = c0[0] | (p[0] & cin);
  assign cin_bit[2] = c0[1] | (&p[1:0] & cin);
  assign cin_bit[3] = c0[2] | (&p[2:0] & cin);

  assign s    = p ^ cin_bit;
  assign cout = c0[3] | (&p & cin);
endmodule
