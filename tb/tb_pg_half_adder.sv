// tb_pg_half_adder: exhaustive self-check of the generate/propagate cell over
// all four input combinations. Expected values come from integer arithmetic:
// the generate bit is the carry and the propagate bit the sum of a + b.
module tb_pg_half_adder;
  logic a, b, g, p;
  int checks = 0, failures = 0;

  pg_half_adder dut (.a, .b, .g, .p);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      int s;
      {a, b} = 2'(v);
      #1;
      s = int'(a) + int'(b);
      checks++;
      if ({g, p} != 2'(s)) begin
        failures++;
        $display("FAIL a=%0b b=%0b g=%0b p=%0b", a, b, g, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
