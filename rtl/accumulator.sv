// accumulator: N-bit D flip-flop register holding the running MAC sum.
//
// On every rising edge of the clock c the register loads d, the adder's
// output, or 0 while clr is high. y is the stored value and is fed back
// to the adder. One cycle from d to y.
//
// A D flip-flop register as the accumulator follows the design
// specification, as do the names c, clr, d and y. The rising edge, the
// synchronous active-high clear and the absence of an enable are this
// design's choices.
module accumulator #(
  parameter int unsigned N = 64
) (
  input  logic         c,
  input  logic         clr,
  input  logic [N-1:0] d,
  output logic [N-1:0] y
);
  always_ff @(posedge c) begin
    if (clr) y <= '0;
    else     y <= d;
  end
endmodule
