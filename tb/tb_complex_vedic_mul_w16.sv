// tb_complex_vedic_mul_w16: self-check of the complex multiplier configured
// for 16-bit operand parts (OPW = 16), the widest multiplier size named for
// this architecture. Corner operands and 100,000 random complex pairs are
// compared with integer complex multiplication on 64-bit integers; it also
// requires both signs of the real part and an imaginary carry into bit 32.
module tb_complex_vedic_mul_w16;
  localparam int unsigned OPW = 16;

  logic [OPW-1:0]       x_re, x_im, y_re, y_im;
  logic signed [2*OPW:0] z_re;
  logic [2*OPW:0]        z_im;
  int checks = 0, failures = 0;
  int n_neg_re = 0, n_pos_re = 0, n_im_carry = 0;

  complex_vedic_mul #(.OPW(OPW)) dut (.x_re, .x_im, .y_re, .y_im, .z_re, .z_im);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 100000; v++) begin
      longint xr, xi, yr, yi, er, ei;
      case (v)
        0: begin xr = 0;     xi = 0;     yr = 0;     yi = 0;     end
        1: begin xr = 65535; xi = 65535; yr = 65535; yi = 65535; end
        2: begin xr = 0;     xi = 65535; yr = 0;     yi = 65535; end
        3: begin xr = 65535; xi = 0;     yr = 65535; yi = 0;     end
        default: begin
          xr = longint'($urandom_range(65535)); xi = longint'($urandom_range(65535));
          yr = longint'($urandom_range(65535)); yi = longint'($urandom_range(65535));
        end
      endcase
      x_re = 16'(xr); x_im = 16'(xi);
      y_re = 16'(yr); y_im = 16'(yi);
      #1;
      er = xr * yr - xi * yi;
      ei = xr * yi + xi * yr;
      checks++;
      if (longint'(z_re) != er || longint'(z_im) != ei) begin
        failures++;
        if (failures < 20)
          $display("FAIL (%0d + j%0d)(%0d + j%0d) = %0d + j%0d, expected %0d + j%0d",
                   xr, xi, yr, yi, z_re, z_im, er, ei);
      end
      if (er < 0) n_neg_re++;
      if (er > 0) n_pos_re++;
      if (ei > 64'hffff_ffff) n_im_carry++;
    end
    $display("mechanisms: negative real=%0d positive real=%0d imaginary carry=%0d",
             n_neg_re, n_pos_re, n_im_carry);
    if (n_neg_re == 0)   begin failures++; $display("FAIL no negative real part"); end
    if (n_pos_re == 0)   begin failures++; $display("FAIL no positive real part"); end
    if (n_im_carry == 0) begin failures++; $display("FAIL no imaginary carry"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
