// mac32: 32-bit multiply-accumulate unit.
//
// Each clock cycle the unsigned operands m1 and m2 are multiplied by a
// reversible-gate Vedic multiplier, the 64-bit product v is added to the
// accumulator contents y by the block-parallel Kogge-Stone adder with
// carry skip logic, and the sum z is stored back in the accumulator:
//   s <= clr ? 0 : s + m1 * m2      (mod 2^64)
// Multiplier and adder are combinational, so one product is accumulated
// per clock and s shows it one rising edge after the operands are
// applied. The adder's carry out is not used: the sum wraps at 2^64.
//
// The chain multiplier - adder - accumulator with feedback, and the port
// names, follow the design specification. The synchronous clear, the
// rising-edge register and the wrap-around are this design's choices.
module mac32
  import mac_pkg::*;
#(
  parameter int unsigned W = MAC_W
) (
  input  logic           c,
  input  logic           clr,
  input  logic [W-1:0]   m1,
  input  logic [W-1:0]   m2,
  output logic [2*W-1:0] s
);
  logic [2*W-1:0] v;   // product
  logic [2*W-1:0] z;   // adder output
  logic [2*W-1:0] y;   // accumulator contents
  logic           z_co_n;  // adder carry out (inverted), unused: the sum wraps

  vedic_mult #(.W(W)) u_mult (.a(m1), .b(m2), .q(v));

  ks_skip_adder64 #(.N(2*W), .BLK(KS_BLK)) u_add (
    .a(v), .b(y), .s(z), .co_n(z_co_n)
  );

  accumulator #(.N(2*W)) u_acc (.c(c), .clr(clr), .d(z), .y(y));

  assign s = y;
endmodule
