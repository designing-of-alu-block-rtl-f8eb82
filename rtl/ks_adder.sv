// ks_adder: N-bit Kogge-Stone parallel-prefix adder.
//
// Three sections, as in the classic Kogge-Stone structure:
//   1. Pre-processing: per bit, propagate p_i = a_i xor b_i and
//      generate g_i = a_i and b_i.
//   2. Carry look-ahead (prefix) network: log2(N) levels. At level l every
//      bit i >= 2^l combines its group with the group 2^l positions below:
//        G = G_hi or (P_hi and G_lo),   P = P_hi and P_lo
//      so after the last level G of bit i is the carry out of bit i.
//   3. Post-processing: sum_i = p_i xor c_(i-1).
// The carry-in is folded into the generate of bit 0 (g_0 | p_0 & cin), which
// keeps the network a pure prefix tree; that folding and the carry-in/out
// ports are this design's additions so the same adder can subtract and compare.
//
// Interface: purely combinational, a + b + cin -> {cout, sum}. N must be >= 1.
module ks_adder #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0] p0;                  // bitwise propagate (kept for the sum)
  logic [N-1:0] gg [LEVELS+1];       // group generate after each level
  logic [N-1:0] pp [LEVELS+1];       // group propagate after each level
  logic [N-1:0] carry;               // carry out of each bit

  // 1. pre-processing
  assign p0    = a ^ b;
  assign pp[0] = p0;
  if (N > 1) begin : g_pre_hi
    assign gg[0][N-1:1] = a[N-1:1] & b[N-1:1];
  end
  assign gg[0][0] = (a[0] & b[0]) | (p0[0] & cin);

  // 2. prefix network: one black/grey cell per bit and level
  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned D = 1 << l;
    for (genvar i = 0; i < N; i++) begin : g_bit
      if (i >= D) begin : g_cell
        assign gg[l+1][i] = gg[l][i] | (pp[l][i] & gg[l][i-D]);
        assign pp[l+1][i] = pp[l][i] & pp[l][i-D];
      end else begin : g_pass
        assign gg[l+1][i] = gg[l][i];
        assign pp[l+1][i] = pp[l][i];
      end
    end
  end

  // 3. post-processing
  assign carry = gg[LEVELS];
  always_comb begin
    sum[0] = p0[0] ^ cin;
    for (int i = 1; i < N; i++) sum[i] = p0[i] ^ carry[i-1];
  end
  assign cout = carry[N-1];

endmodule
