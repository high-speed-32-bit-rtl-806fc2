// increment_block: adds a single carry to an N-bit word with a chain of
// half adders.
//
// Half adder i adds bit x[i] to the carry from half adder i-1 (the first
// one takes cin): s[i] = x[i] XOR t[i], t[i+1] = x[i] AND t[i]. The carry
// out of the last half adder is not produced; in the 64-bit adder the
// carry skip logic computes the block carry instead, which keeps this
// chain off the carry path. Purely combinational: s = (x + cin) mod 2^N.
//
// Structure and the unused carry out follow the design specification.
module increment_block #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] x,
  input  logic         cin,
  output logic [N-1:0] s
);
  logic [N-1:0] t;   // t[i] is the carry into half adder i

  assign t[0] = cin;
  for (genvar i = 0; i < N; i++) begin : g_ha
    assign s[i] = x[i] ^ t[i];
    if (i < N - 1) begin : g_c
      assign t[i+1] = x[i] & t[i];
    end
  end
endmodule
