// ks_skip_adder64: 64-bit adder of 8-bit Kogge-Stone blocks with
// increment blocks and AOI/OAI carry skip logic.
//
// The operands are cut into N/BLK blocks. Every block is added by its own
// Kogge-Stone adder with carry in 0, so all blocks work at once and each
// yields an intermediate sum and a block carry. Block 0's result is final
// and its carry goes to block 1. Every higher block k then
//   - corrects its intermediate sum with an increment block (a chain of
//     half adders) that adds the carry arriving from block k-1, and
//   - forms the carry for block k+1 in its skip logic from its own block
//     carry, the incoming carry and its intermediate sum, without waiting
//     for the increment chain.
// The skip gates alternate AOI (odd k: true carries in, inverted carry
// out) and OAI (even k: inverted carries in, true carry out), so the
// carry path holds one compound gate per block and no inverters. The
// increment block of an OAI stage gets the inverted carry through an
// inverter, off the carry path. The critical path is the Kogge-Stone
// block, the skip gates, and the last increment block.
// Purely combinational. s = (a + b) mod 2^N; co_n is the inverted carry
// out, which with 8 blocks comes straight from the top AOI gate.
//
// Block size, the zero carry-in, the increment blocks, the AOI/OAI skip
// logic and the inverted carry out follow the design specification; the
// lowest block having no skip logic and the order in which AOI and OAI
// alternate are read from its drawing. N must be a multiple of BLK.
module ks_skip_adder64 #(
  parameter int unsigned N   = 64,
  parameter int unsigned BLK = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s,
  output logic         co_n
);
  localparam int unsigned NB = N / BLK;

  logic [NB-1:0] ks_c;    // Kogge-Stone block carries
  logic [NB:0]   cw;      // carry wire into block k; inverted when k-1 is an AOI stage
  logic [N-1:0]  x;       // intermediate sums

  for (genvar k = 0; k < NB; k++) begin : g_blk
    kogge_stone_adder #(.N(BLK)) u_ks (
      .a(a[k*BLK +: BLK]), .b(b[k*BLK +: BLK]),
      .sum(x[k*BLK +: BLK]), .cout(ks_c[k])
    );

    if (k == 0) begin : g_first
      assign s[BLK-1:0] = x[BLK-1:0];
      assign cw[1]      = ks_c[0];
    end else if (k % 2 == 1) begin : g_aoi
      // true carry in, inverted carry out
      increment_block #(.N(BLK)) u_inc (
        .x(x[k*BLK +: BLK]), .cin(cw[k]), .s(s[k*BLK +: BLK])
      );
      carry_skip #(.N(BLK), .OAI(1'b0)) u_skip (
        .x(x[k*BLK +: BLK]), .g(ks_c[k]), .ci(cw[k]), .co(cw[k+1])
      );
    end else begin : g_oai
      // inverted carry in, true carry out
      increment_block #(.N(BLK)) u_inc (
        .x(x[k*BLK +: BLK]), .cin(~cw[k]), .s(s[k*BLK +: BLK])
      );
      carry_skip #(.N(BLK), .OAI(1'b1)) u_skip (
        .x(x[k*BLK +: BLK]), .g(~ks_c[k]), .ci(cw[k]), .co(cw[k+1])
      );
    end
  end

  assign cw[0] = 1'b0;   // no carry into the adder

  // The last stage's carry is inverted when it is an AOI stage (odd index).
  if ((NB - 1) % 2 == 1) begin : g_co_inv
    assign co_n = cw[NB];
  end else begin : g_co_true
    assign co_n = ~cw[NB];
  end
endmodule
