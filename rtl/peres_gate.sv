// peres_gate: 3x3 reversible Peres gate.
//
// P = A, Q = A XOR B, R = (A AND B) XOR C. With C tied to 0 the gate is
// a half adder: Q is the sum and R the carry, while P is a garbage
// output. The reversible ripple-carry adders use it in their lowest bit,
// and the 2x2 Vedic multiplier uses it as its two half adders.
// Purely combinational. The output equations are those of the design
// specification.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
