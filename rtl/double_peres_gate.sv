// double_peres_gate: 4x4 reversible double Peres gate, used as a full adder.
//
// Outputs: P = A, Q = A XOR B, R = A XOR B XOR Cin,
//          S = ((A XOR B) AND Cin) XOR (A AND B) XOR D.
// With the fourth input D tied to 0, R is the full-adder sum and S the
// full-adder carry (majority of A, B, Cin); P and Q are garbage outputs.
// Purely combinational.
//
// P, Q, R and S (for D = 0) are the equations of the design
// specification. Folding D into S by XOR, which keeps the gate
// reversible for every D, is this design's own completion of the gate.
module double_peres_gate (
  input  logic a,
  input  logic b,
  input  logic cin,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  logic axb;
  assign axb = a ^ b;
  assign p   = a;
  assign q   = axb;
  assign r   = axb ^ cin;
  assign s   = (axb & cin) ^ (a & b) ^ d;
endmodule
