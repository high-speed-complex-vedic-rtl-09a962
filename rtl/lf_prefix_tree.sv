// lf_prefix_tree: Ladner-Fischer (minimum-depth) parallel prefix network.
//
// Same function as ks_prefix_tree: for every position i it returns the group
// (generate, propagate) pair of the span [i:0]. The graph is the minimum-depth
// Ladner-Fischer form: at level l, every position whose bit l is set merges
// its group with the group ending at the top of the lower half of its block,
// position (i with bits l..0 cleared) + 2^l - 1. The number of levels is the
// same as Kogge-Stone, ceil(log2 N), but with about N/2 cells per level; in
// exchange, the node at the top of each lower half drives up to 2^l cells,
// so fan-out grows toward the last level. Positions that do not merge at a
// level pass their value on.
//
// Purely combinational.
module lf_prefix_tree #(
  parameter int unsigned N = 16               // number of positions
) (
  input  logic [N-1:0] g_in,                  // per-position generate
  input  logic [N-1:0] p_in,                  // per-position propagate
  output logic [N-1:0] g_out,                 // group generate of [i:0]
  output logic [N-1:0] p_out                  // group propagate of [i:0]
);
  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0] g_lvl [LEVELS+1];
  logic [N-1:0] p_lvl [LEVELS+1];

  assign g_lvl[0] = g_in;
  assign p_lvl[0] = p_in;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    for (genvar i = 0; i < N; i++) begin : g_node
      // top of the lower half of the 2^(l+1)-wide block holding position i
      localparam int unsigned SRC = ((i >> (l + 1)) << (l + 1)) + (1 << l) - 1;
      if (((i >> l) & 1) == 1) begin : g_op
        prefix_op u_op (
          .gi (g_lvl[l][i]),
          .pi (p_lvl[l][i]),
          .gj (g_lvl[l][SRC]),
          .pj (p_lvl[l][SRC]),
          .g  (g_lvl[l+1][i]),
          .p  (p_lvl[l+1][i])
        );
      end else begin : g_buf
        assign g_lvl[l+1][i] = g_lvl[l][i];
        assign p_lvl[l+1][i] = p_lvl[l][i];
      end
    end
  end

  assign g_out = g_lvl[LEVELS];
  assign p_out = p_lvl[LEVELS];
endmodule
