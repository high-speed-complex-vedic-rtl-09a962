// vedic_mul4: 4x4 unsigned multiplier by the Urdhva-Tiryagbhyam ("vertically
// and crosswise") method.
//
// The product is formed column by column. Column k (k = 0..6) collects every
// crosswise bit product a_i & b_j with i + j = k: one vertical product in
// step 1 (a0 b0), two crossed products in step 2, three in step 3, four in
// step 4, then three, two and finally the single vertical product a3 b3 in
// step 7. The column total plus the carry of the previous column gives the
// product bit k (its LSB) and the carry into column k+1 (the rest). The last
// carry is product bit 7.
//
// Purely combinational: a, b in, p out.
module vedic_mul4 (
  input  logic [3:0] a,   // multiplicand
  input  logic [3:0] b,   // multiplier
  output logic [7:0] p    // a * b
);
  always_comb begin
    logic [3:0] carry;    // carry into the current column (at most 3)
    logic [3:0] col;      // column total: at most 4 products + carry
    carry = '0;
    p     = '0;
    for (int k = 0; k < 7; k++) begin
      col = carry;
      for (int i = 0; i < 4; i++) begin
        if (k - i >= 0 && k - i < 4) col = col + 4'(a[i] & b[k-i]);
      end
      p[k]  = col[0];
      carry = col >> 1;
    end
    p[7] = carry[0];
  end
endmodule
