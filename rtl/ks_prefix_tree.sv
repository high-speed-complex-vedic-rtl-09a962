// ks_prefix_tree: Kogge-Stone parallel prefix network.
//
// Given per-position (generate, propagate) pairs, it returns for every position
// i the group pair of the span [i:0]. There are ceil(log2 N) levels; at level l
// every position i >= 2^l merges its current group with that of position
// i - 2^l through a prefix_op cell, and lower positions pass their value on
// unchanged (the buffers of the graph). Every node drives at most two cells of
// the next level, which gives the minimum logic depth and unit fan-out of the
// Kogge-Stone graph; the price is the large number of cells and long wires in
// the later levels. With N = 16 this is the four-level graph of the 16-bit
// Kogge-Stone adder.
//
// Purely combinational: outputs are valid one prefix-tree delay after inputs.
module ks_prefix_tree #(
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
    localparam int unsigned DIST = 1 << l;
    for (genvar i = 0; i < N; i++) begin : g_node
      if (i >= DIST) begin : g_op
        prefix_op u_op (
          .gi (g_lvl[l][i]),
          .pi (p_lvl[l][i]),
          .gj (g_lvl[l][i-DIST]),
          .pj (p_lvl[l][i-DIST]),
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
