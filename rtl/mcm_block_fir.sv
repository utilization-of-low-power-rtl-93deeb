// mcm_block_fir: fixed-coefficient block FIR in transposed form, built from
// multiplier-less MCM units.
//
// Same interface and timing as reconfigurable_block_fir (L samples in and L
// out per clock, one clock of latency, in_valid stalls the filter), but the
// N taps H are fixed at elaboration and every multiplication is shift-add.
// Output sample i of block k needs, for short weight vector m, the products
// h(mL+j) * x(kL+i-j), j = 0 .. L-1. The input matrix of a block holds 2L-1
// distinct samples: the L current ones and the last L-1 of the previous
// block. Two configurations produce those products:
//   CONFIG = 1 (type I):  2L-1 mcm_units, one per distinct sample; the last
//                         L-1 samples of the previous block are registered
//                         and multiplied again.
//   CONFIG = 2 (type II): only the L current samples go through an mcm_unit
//                         (each multiplied by all N taps); the products of
//                         samples 1 .. L-1 are registered and reused in the
//                         next cycle instead of being recomputed.
// The products are summed into r_m and the same pipeline_adder_unit as in
// the reconfigurable filter forms Y_k = r_0 + z^-1(r_1 + ... + z^-1 r_{M-1}).
//
// MCM-based multiplication, the transposed block structure and the existence
// of a type I and a type II configuration follow the described design; how
// the two types differ (recomputing versus registering the products of the
// previous block) and type II as the default are this design's reading.
// The default taps are a 16-tap linear-phase (symmetric) low-pass filter: a
// Hamming-windowed ideal low-pass with cut-off at a quarter of the sample
// rate, scaled so that the largest tap is 7 and rounded to 4-bit signed
// values.
module mcm_block_fir #(
  parameter int unsigned L      = fir_pkg::BLOCK_L,
  parameter int unsigned N      = fir_pkg::TAPS_N,
  parameter int unsigned DATA_W = fir_pkg::DATA_W,
  parameter int unsigned COEF_W = fir_pkg::COEF_W,
  parameter int unsigned OUT_W  = fir_pkg::OUT_W,
  parameter int unsigned CONFIG = 2,
  parameter logic signed [COEF_W-1:0] H [N] =
    '{0, 0, 0, 0, -1, -1, 2, 7, 7, 2, -1, -1, 0, 0, 0, 0},
  localparam int unsigned M     = N / L,
  localparam int unsigned PW    = DATA_W + COEF_W,
  localparam int unsigned RW    = fir_pkg::sum_width(DATA_W, COEF_W, L)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x_blk [L],
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  y_blk [L]
);

  if (N % L != 0) begin : g_bad_size
    $error("mcm_block_fir: N must be a multiple of L");
  end

  if (CONFIG != 1 && CONFIG != 2) begin : g_bad_config
    $error("mcm_block_fir: CONFIG must be 1 or 2");
  end

  // Products of the current block's samples with every tap.
  logic signed [PW-1:0] p_cur  [L][N];
  // Products of the previous block's samples; only t = 1 .. L-1 are used.
  logic signed [PW-1:0] p_prev [L][N];
  logic signed [RW-1:0] r      [M][L];
  logic signed [OUT_W-1:0] y   [L];

  for (genvar t = 0; t < L; t++) begin : g_mcm
    mcm_unit #(.K(N), .DATA_W(DATA_W), .COEF_W(COEF_W), .C(H)) u_mcm (
      .x(x_blk[t]), .p(p_cur[t])
    );
  end

  if (CONFIG == 1) begin : g_type1
    // register the previous block's samples and multiply them again
    logic signed [DATA_W-1:0] x_prev [L];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int t = 0; t < L; t++) x_prev[t] <= '0;
      end else if (in_valid) begin
        x_prev <= x_blk;
      end
    end

    assign p_prev[0] = '{default: '0};
    for (genvar t = 1; t < L; t++) begin : g_mcm_prev
      mcm_unit #(.K(N), .DATA_W(DATA_W), .COEF_W(COEF_W), .C(H)) u_mcm (
        .x(x_prev[t]), .p(p_prev[t])
      );
    end
  end else begin : g_type2
    // register the current block's products for the next block
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int t = 0; t < L; t++)
          for (int n = 0; n < N; n++) p_prev[t][n] <= '0;
      end else if (in_valid) begin
        p_prev <= p_cur;
      end
    end
  end

  // r_m[i] = sum_j h(mL+j) * x(kL+i-j)
  always_comb begin
    for (int m = 0; m < M; m++) begin
      for (int i = 0; i < L; i++) begin
        logic signed [RW-1:0] acc;
        acc = '0;
        for (int j = 0; j < L; j++) begin
          if (i >= j) acc += RW'(p_cur[i-j][m*L+j]);
          else        acc += RW'(p_prev[L+i-j][m*L+j]);
        end
        r[m][i] = acc;
      end
    end
  end

  pipeline_adder_unit #(.L(L), .M(M), .RW(RW), .OUT_W(OUT_W)) u_pau (
    .clk, .rst_n, .en(in_valid), .r, .y
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int i = 0; i < L; i++) y_blk[i] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y_blk <= y;
    end
  end

endmodule
