// kogge_stone_adder: N-bit Kogge-Stone parallel-prefix adder, carry in 0.
//
// Each bit first forms generate g = a AND b and propagate p = a XOR b.
// log2(N) prefix levels follow; at level l every bit i >= 2^l merges its
// (G, P) pair with that of bit i - 2^l:
//   G' = G_i | (P_i & G_(i-2^l)),   P' = P_i & P_(i-2^l)
// so after the last level G_i is the carry out of bits i..0. The sum bit
// i is p_i XOR G_(i-1), and cout is G_(N-1). Purely combinational.
//
// The adder type, its 8-bit width and the zero carry input follow the
// design specification; the prefix tree is the standard radix-2
// Kogge-Stone form. N must be a power of two.
module kogge_stone_adder #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] sum,
  output logic         cout
);
  localparam int unsigned L = $clog2(N);

  logic [N-1:0] gen [L+1];
  logic [N-1:0] pro [L+1];
  logic [N-1:0] p0;

  assign p0     = a ^ b;
  assign gen[0] = a & b;
  assign pro[0] = p0;

  for (genvar l = 0; l < L; l++) begin : g_lvl
    localparam int unsigned D = 1 << l;
    for (genvar i = 0; i < N; i++) begin : g_bit
      if (i >= D) begin : g_merge
        assign gen[l+1][i] = gen[l][i] | (pro[l][i] & gen[l][i-D]);
        assign pro[l+1][i] = pro[l][i] & pro[l][i-D];
      end else begin : g_pass
        assign gen[l+1][i] = gen[l][i];
        assign pro[l+1][i] = pro[l][i];
      end
    end
  end

  assign sum  = p0 ^ {gen[L][N-2:0], 1'b0};
  assign cout = gen[L][N-1];
endmodule
