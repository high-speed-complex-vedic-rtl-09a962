// tb_kogge_stone_adder: self-check of kogge_stone_adder at widths 1, 4, 8, 16, 17, 32 and 64 (16 is the module's
// default). Each width gets corner vectors (all zeros, all ones, a carry
// rippling through every bit, alternating patterns) and random operands with
// a random carry in; sum and carry out are compared with plain integer
// addition done on 65-bit vectors.
module tb_kogge_stone_adder;
  localparam int NW = 7;
  localparam int WIDTHS [NW] = '{1, 4, 8, 16, 17, 32, 64};

  int checks = 0, failures = 0, done = 0;

  for (genvar w = 0; w < NW; w++) begin : g_w
    localparam int W = WIDTHS[w];
    logic [W-1:0] a, b, sum;
    logic         cin, cout;

    kogge_stone_adder #(.WIDTH(W)) dut (.a, .b, .cin, .sum, .cout);

    initial begin
      logic [64:0] ra, rb, exp_v;
      logic [64:0] mask;
      mask = (65'h1 << W) - 65'h1;
      for (int v = 0; v < 20000; v++) begin
        case (v)
          0: begin ra = '0;    rb = '0;    cin = 1'b0; end
          1: begin ra = mask;  rb = '0;    cin = 1'b1; end   // carry through every bit
          2: begin ra = mask;  rb = mask;  cin = 1'b1; end
          3: begin ra = 65'({33{2'b01}}); rb = 65'({33{2'b10}}); cin = 1'b0; end
          4: begin ra = 65'({33{2'b01}}); rb = 65'({33{2'b10}}); cin = 1'b1; end
          5: begin ra = 65'h1; rb = mask;  cin = 1'b0; end
          default: begin
            ra  = {1'b0, $urandom, $urandom};
            rb  = {1'b0, $urandom, $urandom};
            if (v % 4 == 0) rb = ~ra;                      // long propagate chains
            cin = 1'($urandom);
          end
        endcase
        ra = ra & mask;
        rb = rb & mask;
        a = W'(ra);
        b = W'(rb);
        #1;
        exp_v = ra + rb + 65'(cin);
        checks++;
        if (65'({cout, sum}) != exp_v) begin
          failures++;
          $display("FAIL W=%0d a=%h b=%h cin=%0b -> cout=%0b sum=%h expected %h",
                   W, a, b, cin, cout, sum, exp_v);
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
