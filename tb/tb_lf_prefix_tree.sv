// tb_lf_prefix_tree: self-check of the LF prefix network at several sizes
// (1, 5, 8 and 16 positions; 16 is the default). Random and corner
// (generate, propagate) vectors are applied and every output pair is compared
// with a serial left-to-right scan, which computes the same group values one
// position at a time.
module tb_lf_prefix_tree;
  int checks = 0, failures = 0;

  logic [0:0]  g1, p1, go1, po1;
  logic [4:0]  g5, p5, go5, po5;
  logic [7:0]  g8, p8, go8, po8;
  logic [15:0] g16, p16, go16, po16;

  lf_prefix_tree #(.N(1)) dut1  (.g_in(g1),  .p_in(p1),  .g_out(go1),  .p_out(po1));
  lf_prefix_tree #(.N(5)) dut5  (.g_in(g5),  .p_in(p5),  .g_out(go5),  .p_out(po5));
  lf_prefix_tree #(.N(8)) dut8  (.g_in(g8),  .p_in(p8),  .g_out(go8),  .p_out(po8));
  lf_prefix_tree dut16 (.g_in(g16), .p_in(p16), .g_out(go16), .p_out(po16));

  // serial scan reference over the low n positions
  function automatic void scan(input logic [15:0] g, input logic [15:0] p, input int n,
                               output logic [15:0] eg, output logic [15:0] ep);
    logic cg, cp;
    eg = '0; ep = '0;
    cg = 1'b0; cp = 1'b1;
    for (int i = 0; i < n; i++) begin
      cg = g[i] | (p[i] & cg);
      cp = p[i] & cp;
      eg[i] = cg; ep[i] = cp;
    end
  endfunction

  task automatic compare(input int n, input logic [15:0] gin, input logic [15:0] pin,
                         input logic [15:0] gout, input logic [15:0] pout);
    logic [15:0] eg, ep, mask;
    scan(gin, pin, n, eg, ep);
    mask = 16'((32'h1 << n) - 1);
    checks++;
    if (((gout ^ eg) & mask) != 0 || ((pout ^ ep) & mask) != 0) begin
      failures++;
      $display("FAIL N=%0d g=%h p=%h -> g=%h p=%h expected g=%h p=%h",
               n, gin & mask, pin & mask, gout & mask, pout & mask, eg & mask, ep & mask);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] rg, rp;
    for (int v = 0; v < 3000; v++) begin
      if (v < 4) begin
        // corners: all propagate with a single generate at bit 0, all ones, all zeros
        rg = (v == 0) ? 16'h0001 : (v == 1) ? 16'hffff : (v == 2) ? 16'h0000 : 16'h8000;
        rp = (v == 0) ? 16'hffff : (v == 1) ? 16'hffff : (v == 2) ? 16'hffff : 16'h7fff;
      end else begin
        rg = 16'($urandom);
        rp = 16'($urandom) | 16'($urandom);   // propagate-rich, so long chains occur
        rp = rp & ~rg;
      end
      g1 = rg[0:0]; p1 = rp[0:0];
      g5 = rg[4:0]; p5 = rp[4:0];
      g8 = rg[7:0]; p8 = rp[7:0];
      g16 = rg;     p16 = rp;
      #1;
      compare(1,  16'(g1),  16'(p1),  16'(go1),  16'(po1));
      compare(5,  16'(g5),  16'(p5),  16'(go5),  16'(po5));
      compare(8,  16'(g8),  16'(p8),  16'(go8),  16'(po8));
      compare(16, g16, p16, go16, po16);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
