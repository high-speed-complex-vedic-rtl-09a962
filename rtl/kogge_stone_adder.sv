// kogge_stone_adder: WIDTH-bit Kogge-Stone parallel prefix adder.
//
// Three stages, as in a generic parallel prefix adder:
//   1. initial stage  - one pg_half_adder per bit forms G_i = A_i & B_i and
//                       P_i = A_i ^ B_i;
//   2. carry stage    - a ks_prefix_tree turns the per-bit pairs into group
//                       generates G[i:0], which are the carries out of bit i;
//   3. final stage    - S_i = P_i ^ C_(i-1), one XOR per bit.
// The carry input is this design's addition (the prefix graph itself has
// none); it is folded into bit 0 before the tree by one more prefix_op cell,
// G_0' = G_0 | (P_0 & cin), so the tree is unchanged. The adder is used for
// subtraction by inverting B and setting cin.
//
// Purely combinational: sum and cout settle after log2(WIDTH) prefix levels.
module kogge_stone_adder #(
  parameter int unsigned WIDTH = 16           // operand width
) (
  input  logic [WIDTH-1:0] a,                 // operand A
  input  logic [WIDTH-1:0] b,                 // operand B
  input  logic             cin,               // carry into bit 0
  output logic [WIDTH-1:0] sum,               // A + B + cin, low WIDTH bits
  output logic             cout               // carry out of bit WIDTH-1
);
  logic [WIDTH-1:0] g, p;         // stage 1 outputs
  logic [WIDTH-1:0] g_tree;       // tree inputs, cin folded into bit 0
  logic [WIDTH-1:0] c, p_group;   // stage 2 outputs: c[i] = carry out of bit i
  logic             p0_cin_unused;

  for (genvar i = 0; i < WIDTH; i++) begin : g_ha
    pg_half_adder u_ha (.a(a[i]), .b(b[i]), .g(g[i]), .p(p[i]));
  end

  prefix_op u_cin (
    .gi (g[0]), .pi (p[0]), .gj (cin), .pj (1'b0),
    .g  (g_tree[0]), .p (p0_cin_unused)
  );
  if (WIDTH > 1) begin : g_upper
    assign g_tree[WIDTH-1:1] = g[WIDTH-1:1];
  end

  ks_prefix_tree #(.N(WIDTH)) u_tree (
    .g_in  (g_tree),
    .p_in  (p),
    .g_out (c),
    .p_out (p_group)
  );

  // stage 3: sum bits
  always_comb begin
    sum[0] = p[0] ^ cin;
    for (int i = 1; i < WIDTH; i++) sum[i] = p[i] ^ c[i-1];
  end
  assign cout = c[WIDTH-1];
endmodule
