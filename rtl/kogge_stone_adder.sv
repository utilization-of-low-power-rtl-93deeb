// kogge_stone_adder: W-bit parallel-prefix adder.
//
// sum = a + b + cin (mod 2^W), cout = carry out of bit W-1. Bit i generates
// g = a & b and propagates p = a ^ b; the carry-in is folded into bit 0's
// generate. clog2(W) prefix levels then combine (G, P) pairs at distances
// 1, 2, 4, ...: G[i] |= P[i] & G[i-d], P[i] &= P[i-d]. After the last level
// G[i] is the carry out of bit i, so every carry is ready after log2(W)
// two-gate levels, independent of W. Purely combinational.
//
// The Kogge-Stone adder as the fast adder of the multiplier-based filter
// follows the described design; this parallel-prefix formulation is the
// textbook one.
module kogge_stone_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned LEVELS = (W > 1) ? $clog2(W) : 1;

  logic [W-1:0] p0;
  logic [W-1:0] g [LEVELS+1];
  logic [W-1:0] p [LEVELS+1];

  always_comb begin
    p0   = a ^ b;
    g[0] = a & b;
    g[0][0] = (a[0] & b[0]) | (p0[0] & cin);
    p[0] = p0;
    for (int lv = 0; lv < LEVELS; lv++) begin
      for (int i = 0; i < W; i++) begin
        if (i >= (1 << lv)) begin
          g[lv+1][i] = g[lv][i] | (p[lv][i] & g[lv][i - (1 << lv)]);
          p[lv+1][i] = p[lv][i] & p[lv][i - (1 << lv)];
        end else begin
          g[lv+1][i] = g[lv][i];
          p[lv+1][i] = p[lv][i];
        end
      end
    end
    sum[0] = p0[0] ^ cin;
    for (int i = 1; i < W; i++) sum[i] = p0[i] ^ g[LEVELS][i-1];
    cout = g[LEVELS][W-1];
  end

endmodule
