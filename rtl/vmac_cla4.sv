// vmac_cla4: 4-bit carry-lookahead block with carry kills.
//
// Inputs are four generate/propagate pairs (of bits, or of lower blocks) and a
// carry-in. kill[i] kills the carry into position i; kill[0] kills the
// carry-in. With kill[3:1] = 0 this is the published Eq. (4):
//   c1 = g0 + cin.p0.~kill, c2 = g1 + g0.p1 + cin.p0.p1.~kill, ...
//   G  = g3 + g2.p3 + g1.p2.p3 + g0.p1.p2.p3,  P = p0.p1.p2.p3
// When blocks are stacked into a tree, a boundary can fall inside a higher
// block; kill[3:1] handle that case, and a killed inner carry also clears the
// block propagate and the generate terms from below it. That generalisation
// is this design's own. c[i] is the carry into position i after the kill.
// Combinational.
module vmac_cla4 (
  input  logic [3:0] g,
  input  logic [3:0] p,
  input  logic       cin,
  input  logic [3:0] kill,
  output logic [3:0] c,      // carry into positions 0..3
  output logic       gout,   // block generate
  output logic       pout    // block propagate
);

  logic [3:0] k;
  assign k = ~kill;

  assign c[0] = cin & k[0];
  assign c[1] = (g[0] | (p[0] & cin & k[0])) & k[1];
  assign c[2] = (g[1] | (p[1] & g[0] & k[1]) | (p[1] & p[0] & cin & k[0] & k[1])) & k[2];
  assign c[3] = (g[2] | (p[2] & g[1] & k[2]) | (p[2] & p[1] & g[0] & k[1] & k[2])
               | (p[2] & p[1] & p[0] & cin & k[0] & k[1] & k[2])) & k[3];

  assign gout = g[3] | (p[3] & g[2] & k[3]) | (p[3] & p[2] & g[1] & k[2] & k[3])
              | (p[3] & p[2] & p[1] & g[0] & k[1] & k[2] & k[3]);
  assign pout = &p & k[1] & k[2] & k[3];

endmodule
