// tb_complex_vedic_mul: end-to-end self-check of the complex multiplier at its
// default size, 8-bit real and imaginary parts (no parameter is overridden).
//
// It applies corner operands (zero, one, j, the largest parts) followed by
// random complex pairs and compares both result parts with integer complex
// multiplication. It also counts how often each mechanism of the datapath is
// exercised and fails if one never is:
//   - the real-part subtractor producing a negative result (borrow),
//   - the real-part subtractor producing a positive result,
//   - the imaginary-part adder carrying into bit 16,
//   - a carry out of the crosswise adder inside the 8x8 multipliers
//     (aH*bL + aL*bH of the nibble products above 255).
module tb_complex_vedic_mul;
  logic [7:0]         x_re, x_im, y_re, y_im;
  logic signed [16:0] z_re;
  logic [16:0]        z_im;
  int checks = 0, failures = 0;
  int n_neg_re = 0, n_pos_re = 0, n_im_carry = 0, n_cross_carry = 0;

  complex_vedic_mul dut (.x_re, .x_im, .y_re, .y_im, .z_re, .z_im);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit cross_carry(input int a, input int b);
    return ((a >> 4) * (b & 15) + (a & 15) * (b >> 4)) > 255;
  endfunction

  initial begin
    for (int v = 0; v < 200000; v++) begin
      int xr, xi, yr, yi, er, ei;
      case (v)
        0: begin xr = 0;   xi = 0;   yr = 0;   yi = 0;   end
        1: begin xr = 1;   xi = 0;   yr = 37;  yi = 200; end   // times one
        2: begin xr = 0;   xi = 1;   yr = 37;  yi = 200; end   // times j
        3: begin xr = 255; xi = 255; yr = 255; yi = 255; end
        4: begin xr = 0;   xi = 255; yr = 0;   yi = 255; end   // most negative real
        5: begin xr = 255; xi = 0;   yr = 255; yi = 0;   end   // most positive real
        default: begin
          xr = int'($urandom_range(255)); xi = int'($urandom_range(255));
          yr = int'($urandom_range(255)); yi = int'($urandom_range(255));
        end
      endcase
      x_re = 8'(xr); x_im = 8'(xi);
      y_re = 8'(yr); y_im = 8'(yi);
      #1;
      er = xr * yr - xi * yi;
      ei = xr * yi + xi * yr;
      checks++;
      if (int'(z_re) != er || int'(z_im) != ei) begin
        failures++;
        if (failures < 20)
          $display("FAIL (%0d + j%0d)(%0d + j%0d) = %0d + j%0d, expected %0d + j%0d",
                   xr, xi, yr, yi, z_re, z_im, er, ei);
      end
      if (er < 0) n_neg_re++;
      if (er > 0) n_pos_re++;
      if (ei > 65535) n_im_carry++;
      if (cross_carry(xr, yr) || cross_carry(xi, yi) || cross_carry(xr, yi) || cross_carry(xi, yr))
        n_cross_carry++;
    end
    $display("mechanisms: negative real=%0d positive real=%0d imaginary carry=%0d crosswise carry=%0d",
             n_neg_re, n_pos_re, n_im_carry, n_cross_carry);
    if (n_neg_re == 0)      begin failures++; $display("FAIL no negative real part"); end
    if (n_pos_re == 0)      begin failures++; $display("FAIL no positive real part"); end
    if (n_im_carry == 0)    begin failures++; $display("FAIL no imaginary carry"); end
    if (n_cross_carry == 0) begin failures++; $display("FAIL no crosswise carry"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
