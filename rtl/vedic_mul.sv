// vedic_mul: W x W unsigned Vedic multiplier on hybrid Kogge-Stone adders.
//
// The vertical-and-crosswise rule is applied level by level on halves. For
// one pair of S-bit chunks a = {aH, aL}, b = {bH, bL}, four S/2-bit products
// give the vertical products aL*bL, aH*bH and the crosswise products aH*bL,
// aL*bH, which two hybrid_ling_adder blocks combine:
//   cross = aH*bL + aL*bH                            (S-bit adder, carry kept)
//   upper = {aH*bH, aL*bL >> S/2} + cross            (3S/2-bit adder)
//   p     = {upper, low S/2 bits of aL*bL}
// The upper sum never carries out, because the product of two S-bit numbers
// is below 2^(2S).
//
// Level 0 multiplies every 4-bit chunk of a by every 4-bit chunk of b with the
// 4x4 Urdhva-Tiryagbhyam block vedic_mul4. Level l combines the level l-1
// products into products of (4 * 2^l)-bit chunks, until the last level holds
// the single W x W product. At W = 8 there is one combining level: four
// vedic_mul4 blocks, an 8-bit and a 12-bit hybrid adder.
//
// The 4x4 leaf and the use of the hybrid adder for the partial-product sums are
// the architecture's; the split into halves, the recombination order and the
// adder widths are this design's choices. W must be 4 times a power of two
// (4, 8, 16, 32, ...); the default, 8, is the evaluated size.
//
// Purely combinational: a, b in, p out, no clock.
module vedic_mul #(
  parameter int unsigned W = vedic_pkg::DEFAULT_OPW    // operand width
) (
  input  logic [W-1:0]   a,   // multiplicand
  input  logic [W-1:0]   b,   // multiplier
  output logic [2*W-1:0] p    // a * b
);
  localparam int unsigned LEAF   = vedic_pkg::LEAF_W;
  localparam int unsigned LEVELS = $clog2(W / LEAF);   // combining levels

  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    localparam int unsigned S  = LEAF << l;   // chunk width at this level
    localparam int unsigned NC = W / S;       // chunks per operand
    localparam int unsigned H  = S / 2;

    // prod[i][j] = (chunk i of a) * (chunk j of b)
    logic [2*S-1:0] prod [NC][NC];

    for (genvar i = 0; i < NC; i++) begin : g_i
      for (genvar j = 0; j < NC; j++) begin : g_j
        if (l == 0) begin : g_leaf
          vedic_mul4 u_leaf (.a(a[S*i +: S]), .b(b[S*j +: S]), .p(prod[i][j]));
        end else begin : g_comb
          logic [S-1:0]   q_ll, q_hl, q_lh, q_hh;   // aL*bL, aH*bL, aL*bH, aH*bH
          logic [S-1:0]   cross_sum;
          logic           cross_cout;
          logic [3*H-1:0] upper_sum;
          logic           upper_cout;               // always 0, see header

          assign q_ll = g_lvl[l-1].prod[2*i][2*j];
          assign q_hl = g_lvl[l-1].prod[2*i+1][2*j];
          assign q_lh = g_lvl[l-1].prod[2*i][2*j+1];
          assign q_hh = g_lvl[l-1].prod[2*i+1][2*j+1];

          // crosswise products
          hybrid_ling_adder #(.WIDTH(S)) u_cross (
            .a (q_hl), .b (q_lh), .cin (1'b0),
            .sum (cross_sum), .cout (cross_cout)
          );

          // vertical high product and upper half of the low product, plus the
          // crosswise sum
          hybrid_ling_adder #(.WIDTH(3*H)) u_upper (
            .a   ({q_hh, q_ll[S-1:H]}),
            .b   ((3*H)'({cross_cout, cross_sum})),
            .cin (1'b0),
            .sum (upper_sum), .cout (upper_cout)
          );

          assign prod[i][j] = {upper_sum, q_ll[H-1:0]};
        end
      end
    end
  end

  assign p = g_lvl[LEVELS].prod[0][0];

  initial begin
    assert (W >= LEAF && (W & (W - 1)) == 0)
      else $error("vedic_mul: W must be 4 times a power of two");
  end
endmodule
