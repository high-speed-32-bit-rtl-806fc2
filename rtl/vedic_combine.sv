// vedic_combine: the adder stage that joins four (W/2)x(W/2) Vedic
// products into one W x W product.
//
// With H = W/2 and the operands split as a = {ah, al}, b = {bh, bl}, the
// inputs are the vertical products ll = al*bl, hh = ah*bh and the
// crosswise products hl = ah*bl, lh = al*bh, each W bits wide. Three
// W-bit reversible ripple-carry adders combine them:
//   middle adder:  m1 = hl + lh                     (carry k1)
//   right adder:   m2 = m1 + (ll >> H)              (carry k2)
//   left adder:    hi = hh + {k1 ^ k2, m2[W-1:H]}
// and q = {hi, m2[H-1:0], ll[H-1:0]}. The middle terms sum to less than
// 2^(W+1), so k1 and k2 are never both 1 and their XOR equals their sum;
// the left adder's carry is always 0 because the product fits in 2W
// bits, so it is left unused. Purely combinational.
//
// The three ripple-carry adders and the zero padding of the right and
// left adders' second operands follow the design specification (drawn
// for W = 4, the default); merging the two middle carries by XOR is this
// design's reading of how they reach the left adder.
module vedic_combine #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0]   ll,
  input  logic [W-1:0]   hl,
  input  logic [W-1:0]   lh,
  input  logic [W-1:0]   hh,
  output logic [2*W-1:0] q
);
  localparam int unsigned H = W / 2;

  logic [W-1:0] m1, m2, hi;
  logic         k1, k2, k3;

  rev_rca #(.N(W)) u_mid   (.a(hl), .b(lh), .sum(m1), .cout(k1));
  rev_rca #(.N(W)) u_right (.a(m1), .b({{H{1'b0}}, ll[W-1:H]}), .sum(m2), .cout(k2));
  rev_rca #(.N(W)) u_left  (.a(hh), .b({{(H-1){1'b0}}, k1 ^ k2, m2[W-1:H]}),
                            .sum(hi), .cout(k3));

  assign q = {hi, m2[H-1:0], ll[H-1:0]};
endmodule
