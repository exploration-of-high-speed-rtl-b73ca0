// prefix_op4: valency-4 prefix operator, group-generate output only.
//
// Combines four (generate, propagate) pairs, g[3]/p[3] being the most
// significant, with the associative operator (g,p) o (g',p') = (g + p g', p p'):
//   gg = g3 + p3 g2 + p3 p2 g1 + p3 p2 p1 g0
// The lowest pair's propagate is never needed and has no port. The adders
// only use the group generate; group propagates (the Q^k terms) are formed
// separately, because the factorized adders use a modified Q^k.
// With p[3] tied to 1 this is the document's "simplified" valency-4
// operator: F_i = R_i + R_{i-2} + Q_{i-3} R_{i-4} + Q_{i-3} Q_{i-5} R_{i-6}.
// Purely combinational; an AND-OR of depth two.
module prefix_op4 (
  input  logic [3:0] g,
  input  logic [3:1] p,
  output logic       gg
);
  assign gg = g[3]
            | (p[3] & g[2])
            | (p[3] & p[2] & g[1])
            | (p[3] & p[2] & p[1] & g[0]);
endmodule
