// vedic_pkg: constants shared by the complex Vedic multiplier.
//
// DEFAULT_OPW is the width of one real or imaginary operand part in the
// default configuration, 8 bits, the multiplier size that is evaluated for this
// architecture. LEAF_W is the width of the smallest Vedic multiplier, the 4x4
// Urdhva-Tiryagbhyam block from which wider multipliers are composed.
// Helper functions give the result widths that follow from an operand width.
package vedic_pkg;

  localparam int unsigned DEFAULT_OPW = 8;   // operand part width, default configuration
  localparam int unsigned LEAF_W      = 4;   // width of the 4x4 leaf multiplier

  // width of the product of two w-bit unsigned numbers
  function automatic int unsigned prod_width(input int unsigned w);
    return 2 * w;
  endfunction

  // width of one complex result part: one bit more than a product, so that
  // the difference (real part) and the sum (imaginary part) of two products
  // never overflow
  function automatic int unsigned cplx_res_width(input int unsigned w);
    return 2 * w + 1;
  endfunction

endpackage
