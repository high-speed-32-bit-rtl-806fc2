// toffoli_gate: 3x3 reversible Toffoli (controlled-controlled-NOT) gate.
//
// P = A, Q = B, R = (A AND B) XOR C. The two control lines pass through
// unchanged and the target line is flipped when both controls are 1, so
// every output pattern maps back to exactly one input pattern. With the
// target input C tied to 0, R is the AND of A and B; that is how the 2x2
// Vedic multiplier forms its bit products, and P and Q are then unused
// (garbage) outputs. Purely combinational.
//
// The use of the Toffoli gate as the AND gate follows the design
// specification; the gate equations are the standard Toffoli definition.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;
endmodule
