// reconfigurable_block_fir: block FIR filter in transposed form with
// reconfigurable coefficients.
//
// Every clock with in_valid high it takes one block of L input samples,
// x_blk[0] oldest, and one clock later presents the L output samples of that
// block on y_blk with out_valid high: a throughput of L samples per clock.
// The N taps are split into M = N/L short weight vectors c_m (taps
// mL .. mL+L-1). The datapath is
//   register_unit              -> input matrix S_k (L rows of L samples)
//   coefficient_selection_unit -> c_0 .. c_{M-1} of the active set
//   M inner_product_units      -> r_m = S_k * c_m
//   pipeline_adder_unit        -> Y_k = r_0 + z^-1(r_1 + z^-1(... r_{M-1}))
//   output register            -> y_blk, out_valid
// so y(n) = sum_{t=0}^{N-1} h(t) x(n-t) with the history of previous blocks
// kept in the adder chain. When in_valid is low all state holds (a stall) and
// out_valid drops for one cycle. Coefficients are written through the
// coefficient port and an idle set can be made active with set_sel; while a
// change of coefficients travels down the adder chain, the next M-1 output
// blocks mix old and new taps, as in any transposed-form filter.
//
// The structure (RU, CSU, M IPUs, adder chain) follows the described design.
// The one-cycle output register, the valid handshake and the coefficient
// port are choices of this design.
module reconfigurable_block_fir #(
  parameter int unsigned L      = fir_pkg::BLOCK_L,
  parameter int unsigned N      = fir_pkg::TAPS_N,
  parameter int unsigned DATA_W = fir_pkg::DATA_W,
  parameter int unsigned COEF_W = fir_pkg::COEF_W,
  parameter int unsigned OUT_W  = fir_pkg::OUT_W,
  parameter int unsigned NSETS  = 2,
  localparam int unsigned M     = N / L,
  localparam int unsigned RW    = fir_pkg::sum_width(DATA_W, COEF_W, L),
  localparam int unsigned SET_W = (NSETS > 1) ? $clog2(NSETS) : 1,
  localparam int unsigned IDX_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // sample stream
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x_blk [L],
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  y_blk [L],
  // reconfiguration
  input  logic                     coef_wr_en,
  input  logic [SET_W-1:0]         coef_wr_set,
  input  logic [IDX_W-1:0]         coef_wr_idx,
  input  logic signed [COEF_W-1:0] coef_wr_data,
  input  logic [SET_W-1:0]         set_sel
);

  if (N % L != 0) begin : g_bad_size
    $error("reconfigurable_block_fir: N must be a multiple of L");
  end

  logic signed [DATA_W-1:0] rows [L][L];
  logic signed [COEF_W-1:0] w    [M][L];
  logic signed [RW-1:0]     r    [M][L];
  logic signed [OUT_W-1:0]  y    [L];

  register_unit #(.L(L), .DATA_W(DATA_W)) u_ru (
    .clk, .rst_n, .in_valid, .x_blk, .rows
  );

  coefficient_selection_unit #(.L(L), .N(N), .COEF_W(COEF_W), .NSETS(NSETS)) u_csu (
    .clk, .rst_n,
    .wr_en(coef_wr_en), .wr_set(coef_wr_set), .wr_idx(coef_wr_idx),
    .wr_data(coef_wr_data), .set_sel, .w
  );

  for (genvar m = 0; m < M; m++) begin : g_ipu
    inner_product_unit #(.L(L), .DATA_W(DATA_W), .COEF_W(COEF_W), .RW(RW)) u_ipu (
      .rows, .w(w[m]), .r(r[m])
    );
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
