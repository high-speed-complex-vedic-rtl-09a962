// tb_vedic_mul: self-check of the recursive Vedic multiplier at 4, 8 (the
// default), 16 and 32 bits. The 4- and 8-bit multipliers are checked
// exhaustively; the 16- and 32-bit ones with corner operands (zero, one,
// all ones, single high bits) and random operands. Every product is compared
// with the integer product computed on 64-bit vectors.
module tb_vedic_mul;
  int checks = 0, failures = 0, done = 0;

  localparam int NW = 4;
  localparam int WIDTHS [NW] = '{4, 8, 16, 32};

  for (genvar w = 0; w < NW; w++) begin : g_w
    localparam int W = WIDTHS[w];
    logic [W-1:0]   a, b;
    logic [2*W-1:0] p;

    if (W == 8) begin : g_default
      vedic_mul dut (.a, .b, .p);                  // default parameters
    end else begin : g_sized
      vedic_mul #(.W(W)) dut (.a, .b, .p);
    end

    initial begin
      logic [63:0] ra, rb, mask;
      longint unsigned n;
      mask = (W == 32) ? 64'hffff_ffff : (64'h1 << W) - 64'h1;
      n = (W <= 8) ? (longint'(1) << (2 * W)) : 100000;
      for (longint unsigned v = 0; v < n; v++) begin
        if (W <= 8) begin
          ra = 64'(v) & mask;
          rb = 64'(v >> W) & mask;
        end else begin
          case (v)
            0: begin ra = 0;                  rb = 0;    end
            1: begin ra = mask;               rb = mask; end
            2: begin ra = 1;                  rb = mask; end
            3: begin ra = 64'h1 << (W - 1);   rb = 64'h1 << (W - 1); end
            default: begin ra = {$urandom, $urandom}; rb = {$urandom, $urandom}; end
          endcase
          ra = ra & mask;
          rb = rb & mask;
        end
        a = W'(ra);
        b = W'(rb);
        #1;
        checks++;
        if (64'(p) != ra * rb) begin
          failures++;
          if (failures < 20) $display("FAIL W=%0d %0d * %0d = %0d", W, ra, rb, p);
        end
      end
      done++;
    end
  end

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (done == NW);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
