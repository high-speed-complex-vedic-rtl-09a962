// hybrid_ling_adder: WIDTH-bit hybrid parallel prefix adder on Ling carries.
//
// Instead of the real carries c_i, the prefix trees compute Ling pseudo-carries
// H_i = g_i | c_(i-1), with g_i = a_i & b_i and t_i = a_i | b_i. They obey
//   H_i = (g_i | g_(i-1)) | (t_(i-1) & t_(i-2)) & H_(i-2),
// a recurrence that only links positions two apart. The odd-indexed and the
// even-indexed positions therefore form two independent prefix problems of
// WIDTH/2 elements each, with element pairs
//   G*_i = g_i | g_(i-1),   P*_i = t_(i-1) & t_(i-2).
// The odd chain (bits 1, 3, 5, ...) runs through a Kogge-Stone tree and the even
// chain (bits 0, 2, 4, ...) through a Ladner-Fischer tree, each on half the
// width, so each tree is one level shallower and the node fan-out is halved.
// The real carry is recovered from the Ling carry with one AND per bit,
// c_i = t_i & H_i, and the sum is s_i = (a_i ^ b_i) ^ c_(i-1).
// The carry input enters the first element of each chain:
//   H_0 = g_0 | cin,  H_1 = g_1 | g_0 | (t_0 & cin).
//
// The split of odd bits onto Kogge-Stone and even bits onto Ladner-Fischer and
// the use of Ling carries follow the architecture; the exact form of the
// pre-processing equations and the carry input are this design's choices.
// WIDTH must be even. Purely combinational.
module hybrid_ling_adder #(
  parameter int unsigned WIDTH = 16           // operand width, even
) (
  input  logic [WIDTH-1:0] a,                 // operand A
  input  logic [WIDTH-1:0] b,                 // operand B
  input  logic             cin,               // carry into bit 0
  output logic [WIDTH-1:0] sum,               // A + B + cin, low WIDTH bits
  output logic             cout               // carry out of bit WIDTH-1
);
  localparam int unsigned M = WIDTH / 2;      // elements per chain

  logic [WIDTH-1:0] g, p, t;                  // bit generate, half sum, bit transmit
  logic [M-1:0]     go, po, ge, pe;           // odd / even chain element pairs
  logic [M-1:0]     ho, he;                   // Ling carries of odd / even bits
  logic [M-1:0]     po_grp, pe_grp;           // group propagates (not needed)
  logic [WIDTH-1:0] h, c;                     // Ling carries and real carries

  for (genvar i = 0; i < WIDTH; i++) begin : g_ha
    pg_half_adder u_ha (.a(a[i]), .b(b[i]), .g(g[i]), .p(p[i]));
  end
  assign t = a | b;

  // pre-processing: modified Ling element pairs of both chains
  always_comb begin
    ge[0] = g[0] | cin;
    pe[0] = 1'b0;
    go[0] = g[1] | g[0] | (t[0] & cin);
    po[0] = 1'b0;
    for (int k = 1; k < M; k++) begin
      ge[k] = g[2*k]   | g[2*k-1];
      pe[k] = t[2*k-1] & t[2*k-2];
      go[k] = g[2*k+1] | g[2*k];
      po[k] = t[2*k]   & t[2*k-1];
    end
  end

  ks_prefix_tree #(.N(M)) u_odd (
    .g_in (go), .p_in (po), .g_out (ho), .p_out (po_grp)
  );
  lf_prefix_tree #(.N(M)) u_even (
    .g_in (ge), .p_in (pe), .g_out (he), .p_out (pe_grp)
  );

  // interleave the two chains, recover real carries, form the sum
  always_comb begin
    for (int k = 0; k < M; k++) begin
      h[2*k]   = he[k];
      h[2*k+1] = ho[k];
    end
    c = t & h;
    sum[0] = p[0] ^ cin;
    for (int i = 1; i < WIDTH; i++) sum[i] = p[i] ^ c[i-1];
  end
  assign cout = c[WIDTH-1];

  initial begin
    assert (WIDTH % 2 == 0 && WIDTH >= 2)
      else $error("hybrid_ling_adder: WIDTH must be even and at least 2");
  end
endmodule
