// tb_prefix_op: exhaustive self-check of the prefix operator over all 16
// input combinations. The reference is the meaning of the operator: a carry
// leaves the merged group if the upper group generates one, or propagates the
// one the lower group generates; the merged group propagates only if both do.
module tb_prefix_op;
  logic gi, pi, gj, pj, g, p;
  int checks = 0, failures = 0;

  prefix_op dut (.gi, .pi, .gj, .pj, .g, .p);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic exp_g, exp_p;
      {gi, pi, gj, pj} = 4'(v);
      #1;
      // carry into the merged group is 0 or 1: does one come out?
      exp_g = (gi == 1'b1) ? 1'b1 : ((pi == 1'b1) ? gj : 1'b0);
      exp_p = (pi == 1'b1) ? pj : 1'b0;
      checks++;
      if (g !== exp_g || p !== exp_p) begin
        failures++;
        $display("FAIL gi=%0b pi=%0b gj=%0b pj=%0b -> g=%0b p=%0b", gi, pi, gj, pj, g, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
