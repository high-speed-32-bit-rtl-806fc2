// vedic_mult: W x W unsigned Vedic (Urdhva Tiryagbhyam) multiplier from
// reversible gates.
//
// A W x W product is formed from four (W/2)x(W/2) products: the two
// vertical ones (low x low, high x high) and the two crosswise ones
// (high x low, low x high), all computed at the same time and joined by
// the three-adder stage vedic_combine. Applied all the way down, the
// multiplier is a tree: level 1 holds (W/2)^2 gate-level 2x2
// multipliers, one for every pair of 2-bit operand chunks, and each
// level above joins groups of four products into products of twice the
// width, until level log2(W) holds the single W x W product. Product
// p[i][j] of a level with chunk width S is (a chunk i) x (b chunk j),
// chunk i being bits i*S .. i*S+S-1. Purely combinational: q = a * b.
//
// Building the NxN multiplier from four N/2 x N/2 multipliers and
// three ripple-carry adders, starting from the reversible 2x2
// multiplier, follows the design specification. W must be a power of
// two and at least 4.
module vedic_mult #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] q
);
  localparam int unsigned L = $clog2(W);   // number of levels

  if (W < 4 || (1 << L) != W) begin : g_bad_w
    $error("vedic_mult: W must be a power of two and at least 4");
  end

  for (genvar l = 1; l <= L; l++) begin : g_lvl
    localparam int unsigned S  = 1 << l;   // chunk width of this level
    localparam int unsigned NC = W / S;    // chunks per operand
    logic [2*S-1:0] p [NC][NC];

    for (genvar i = 0; i < NC; i++) begin : g_i
      for (genvar j = 0; j < NC; j++) begin : g_j
        if (l == 1) begin : g_leaf
          vedic_mult_2x2 u_m (.a(a[i*2 +: 2]), .b(b[j*2 +: 2]), .q(p[i][j]));
        end else begin : g_node
          vedic_combine #(.W(S)) u_c (
            .ll(g_lvl[l-1].p[2*i][2*j]),
            .hl(g_lvl[l-1].p[2*i+1][2*j]),
            .lh(g_lvl[l-1].p[2*i][2*j+1]),
            .hh(g_lvl[l-1].p[2*i+1][2*j+1]),
            .q (p[i][j])
          );
        end
      end
    end
  end

  assign q = g_lvl[L].p[0][0];
endmodule
