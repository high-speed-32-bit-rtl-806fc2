// carry_skip: carry skip logic of one 8-bit stage of the 64-bit adder.
//
// A stage whose Kogge-Stone block produced carry g and intermediate sum
// x passes on a carry when g is 1, or when a carry arrives (ci) and x is
// all ones, so that adding it ripples through the whole block:
//   carry_out = g | (ci & &x)
// The gate is a compound inverting gate, so the polarity alternates from
// stage to stage and no inverter sits on the carry path:
//   OAI = 0 (AOI stage): g, ci true;     co = ~(g | (ci & &x))      (inverted)
//   OAI = 1 (OAI stage): g, ci inverted; co = ~((ci | ~&x) & g)    (true)
// Purely combinational.
//
// The AOI/OAI choice, the alternation and the inputs used (block carry,
// previous carry, intermediate sum) follow the design specification;
// the all-ones test on the intermediate sum is the usual carry-skip
// propagate condition, which the specification draws as an AND/NAND gate.
module carry_skip #(
  parameter int unsigned N   = 8,
  parameter bit          OAI = 1'b0
) (
  input  logic [N-1:0] x,
  input  logic         g,
  input  logic         ci,
  output logic         co
);
  if (OAI) begin : g_oai
    logic prop_n;
    assign prop_n = ~&x;                  // NAND of the sum bits
    assign co     = ~((ci | prop_n) & g);
  end else begin : g_aoi
    logic prop;
    assign prop = &x;                     // AND of the sum bits
    assign co   = ~(g | (ci & prop));
  end
endmodule
