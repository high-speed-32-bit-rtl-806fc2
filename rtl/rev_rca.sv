// rev_rca: N-bit ripple-carry adder built only from reversible gates.
//
// Bit 0 is a Peres gate with its third input at 0 (a half adder, since
// the adder has no carry input); every higher bit is a double Peres gate
// with its fourth input at 0 (a full adder) taking the carry of the bit
// below. The garbage outputs of the gates are left unused. Purely
// combinational: sum = a + b, cout is the carry out of bit N-1.
//
// The gate choice and the missing carry input follow the design
// specification, which draws the 4-bit case (the default N). The width
// is a parameter because the Vedic multiplier needs the same adder at
// 4, 8, 16 and 32 bits.
module rev_rca #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [N:0]   c;     // c[i] is the carry into bit i
  logic [N-1:0] g_p;   // garbage output P of each gate
  logic [N-1:0] g_q;   // garbage output Q of the double Peres gates

  peres_gate u_ha (
    .a(a[0]), .b(b[0]), .c(1'b0),
    .p(g_p[0]), .q(sum[0]), .r(c[1])
  );
  assign g_q[0] = 1'b0;
  assign c[0]   = 1'b0;

  for (genvar i = 1; i < N; i++) begin : g_fa
    double_peres_gate u_fa (
      .a(a[i]), .b(b[i]), .cin(c[i]), .d(1'b0),
      .p(g_p[i]), .q(g_q[i]), .r(sum[i]), .s(c[i+1])
    );
  end

  assign cout = c[N];
endmodule
