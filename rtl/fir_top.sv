// fir_top: the two block FIR filters side by side on one input stream.
//
// One block of L samples enters per clock (in_valid high) and feeds both
//   - reconfigurable_block_fir: taps held in a two-set coefficient store that
//     is written through the coef_* port and switched with set_sel, and
//   - mcm_block_fir: fixed low-pass taps, multiplier-less shift-add products
//     (type II configuration by default, type I with MCM_CONFIG = 1).
// Each returns its output block one clock after the input block, with its
// own valid flag. Dropping in_valid stalls both filters with their state
// kept. Both filters have the same default sizes: L = 4 samples per block,
// N = 16 taps, 8-bit signed samples, 4-bit signed taps and 16-bit signed
// outputs. Running both on one stream is a choice of this design; it lets the
// fixed and the reconfigurable realizations be compared sample by sample
// when the reconfigurable one is loaded with the fixed taps.
module fir_top #(
  parameter int unsigned L      = fir_pkg::BLOCK_L,
  parameter int unsigned N      = fir_pkg::TAPS_N,
  parameter int unsigned DATA_W = fir_pkg::DATA_W,
  parameter int unsigned COEF_W = fir_pkg::COEF_W,
  parameter int unsigned OUT_W  = fir_pkg::OUT_W,
  parameter int unsigned NSETS  = 2,
  parameter int unsigned MCM_CONFIG = 2,   // 1: type I, 2: type II MCM filter
  parameter logic signed [COEF_W-1:0] H_FIXED [N] =
    '{0, 0, 0, 0, -1, -1, 2, 7, 7, 2, -1, -1, 0, 0, 0, 0},
  localparam int unsigned SET_W = (NSETS > 1) ? $clog2(NSETS) : 1,
  localparam int unsigned IDX_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x_blk [L],
  // reconfigurable filter
  input  logic                     coef_wr_en,
  input  logic [SET_W-1:0]         coef_wr_set,
  input  logic [IDX_W-1:0]         coef_wr_idx,
  input  logic signed [COEF_W-1:0] coef_wr_data,
  input  logic [SET_W-1:0]         set_sel,
  output logic                     rcf_valid,
  output logic signed [OUT_W-1:0]  rcf_y [L],
  // fixed MCM filter
  output logic                     mcm_valid,
  output logic signed [OUT_W-1:0]  mcm_y [L]
);

  reconfigurable_block_fir #(
    .L(L), .N(N), .DATA_W(DATA_W), .COEF_W(COEF_W), .OUT_W(OUT_W), .NSETS(NSETS)
  ) u_rcf (
    .clk, .rst_n, .in_valid, .x_blk,
    .out_valid(rcf_valid), .y_blk(rcf_y),
    .coef_wr_en, .coef_wr_set, .coef_wr_idx, .coef_wr_data, .set_sel
  );

  mcm_block_fir #(
    .L(L), .N(N), .DATA_W(DATA_W), .COEF_W(COEF_W), .OUT_W(OUT_W), .CONFIG(MCM_CONFIG),
    .H(H_FIXED)
  ) u_mcm (
    .clk, .rst_n, .in_valid, .x_blk,
    .out_valid(mcm_valid), .y_blk(mcm_y)
  );

endmodule
