// pg_half_adder: the first-stage cell of a parallel prefix adder (the square
// cell of the prefix graph). For one bit position it forms the generate term
// G = A & B and the propagate term P = A ^ B, exactly as a half adder forms its
// carry and sum. Purely combinational, no clock.
module pg_half_adder (
  input  logic a,   // operand A bit
  input  logic b,   // operand B bit
  output logic g,   // generate  = a & b
  output logic p    // propagate = a ^ b
);
  assign g = a & b;
  assign p = a ^ b;
endmodule
