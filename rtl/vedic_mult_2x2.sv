// vedic_mult_2x2: 2x2 Urdhva Tiryagbhyam (vertically and crosswise)
// multiplier from reversible gates.
//
// Four Toffoli gates with their target at 0 form the bit products a0b0,
// a1b0, a0b1 and a1b1. q0 is the vertical product a0b0. A Peres half
// adder adds the two crosswise products into q1 and a carry; a second
// Peres half adder adds that carry to the vertical product a1b1, giving
// q2 and q3. Purely combinational, q = a * b.
//
// The gate arrangement follows the design specification. The second
// bit product is a1*b0, as the crosswise step requires.
module vedic_mult_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] q
);
  logic p00, p10, p01, p11;   // bit products a_i * b_j as p<i><j>
  logic c1;                   // carry of the crosswise sum
  logic [3:0] g_a, g_b;       // Toffoli garbage outputs
  logic [1:0] g_p;            // Peres garbage outputs

  toffoli_gate u_t00 (.a(a[0]), .b(b[0]), .c(1'b0), .p(g_a[0]), .q(g_b[0]), .r(p00));
  toffoli_gate u_t10 (.a(a[1]), .b(b[0]), .c(1'b0), .p(g_a[1]), .q(g_b[1]), .r(p10));
  toffoli_gate u_t01 (.a(a[0]), .b(b[1]), .c(1'b0), .p(g_a[2]), .q(g_b[2]), .r(p01));
  toffoli_gate u_t11 (.a(a[1]), .b(b[1]), .c(1'b0), .p(g_a[3]), .q(g_b[3]), .r(p11));

  peres_gate u_ha0 (.a(p10), .b(p01), .c(1'b0), .p(g_p[0]), .q(q[1]), .r(c1));
  peres_gate u_ha1 (.a(c1),  .b(p11), .c(1'b0), .p(g_p[1]), .q(q[2]), .r(q[3]));

  assign q[0] = p00;
endmodule
