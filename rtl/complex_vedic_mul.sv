// complex_vedic_mul: complex multiplier built from Vedic multipliers and
// Kogge-Stone adders.
//
// For x = xr + j xi and y = yr + j yi it computes
//   zr = xr*yr - xi*yi        zi = xr*yi + xi*yr
// with four OPW x OPW Vedic multipliers (vedic_mul, whose partial-product sums
// use the hybrid Kogge-Stone / Ladner-Fischer Ling adder) working in
// parallel, followed by two (2*OPW+1)-bit Kogge-Stone adders: one subtracts
// (second operand inverted, carry in set) for the real part, one adds for the
// imaginary part.
//
// Interface: the operand parts are unsigned OPW-bit numbers; the result has a
// (2*OPW+1)-bit two's-complement real part and a (2*OPW+1)-bit unsigned
// imaginary part, so no result overflows. OPW defaults to 8, the evaluated
// multiplier size; 4, 16 and 32 also work. The four-multiplier / two-adder
// organisation, the unsigned parts and the result widths are this design's
// own choices. The carry outs of the two final adders are not needed (the
// result widths already hold every value) and are left unconnected inside.
//
// Timing: purely combinational, no clock and no registers; the critical path
// is one vedic_mul followed by one Kogge-Stone adder.
module complex_vedic_mul #(
  parameter int unsigned OPW  = vedic_pkg::DEFAULT_OPW,        // operand part width
  localparam int unsigned PW  = vedic_pkg::prod_width(OPW),    // product width
  localparam int unsigned RW  = vedic_pkg::cplx_res_width(OPW) // result part width
) (
  input  logic [OPW-1:0]       x_re,  // real part of x
  input  logic [OPW-1:0]       x_im,  // imaginary part of x
  input  logic [OPW-1:0]       y_re,  // real part of y
  input  logic [OPW-1:0]       y_im,  // imaginary part of y
  output logic signed [RW-1:0] z_re,  // x_re*y_re - x_im*y_im
  output logic [RW-1:0]        z_im   // x_re*y_im + x_im*y_re
);
  logic [PW-1:0] rr, ii, ri, ir;      // xr*yr, xi*yi, xr*yi, xi*yr
  logic [RW-1:0] re_sum, im_sum;
  logic          re_cout, im_cout;    // not needed, see header

  vedic_mul #(.W(OPW)) u_rr (.a(x_re), .b(y_re), .p(rr));
  vedic_mul #(.W(OPW)) u_ii (.a(x_im), .b(y_im), .p(ii));
  vedic_mul #(.W(OPW)) u_ri (.a(x_re), .b(y_im), .p(ri));
  vedic_mul #(.W(OPW)) u_ir (.a(x_im), .b(y_re), .p(ir));

  // real part: rr + ~ii + 1 = rr - ii in two's complement
  kogge_stone_adder #(.WIDTH(RW)) u_re (
    .a   ({1'b0, rr}),
    .b   (~{1'b0, ii}),
    .cin (1'b1),
    .sum (re_sum),
    .cout(re_cout)
  );

  // imaginary part: ri + ir, the top bit holds the carry
  kogge_stone_adder #(.WIDTH(RW)) u_im (
    .a   ({1'b0, ri}),
    .b   ({1'b0, ir}),
    .cin (1'b0),
    .sum (im_sum),
    .cout(im_cout)
  );

  assign z_re = signed'(re_sum);
  assign z_im = im_sum;
endmodule
