// prefix_op: the prefix operator cell (the circle of the prefix graph).
// It merges a more significant group (gi, pi) with the adjacent less
// significant group (gj, pj):
//   G = gi | (pi & gj)      the combined group generates a carry
//   P = pi & pj             the combined group propagates a carry
// The operator is associative, which is what lets a prefix network compute all
// carries in a logarithmic number of levels. Purely combinational.
module prefix_op (
  input  logic gi,  // generate of the upper group
  input  logic pi,  // propagate of the upper group
  input  logic gj,  // generate of the lower group
  input  logic pj,  // propagate of the lower group
  output logic g,   // generate of the merged group
  output logic p    // propagate of the merged group
);
  assign g = gi | (pi & gj);
  assign p = pi & pj;
endmodule
