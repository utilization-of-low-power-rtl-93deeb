// coefficient_selection_unit: coefficient store of the reconfigurable FIR.
//
// Holds NSETS sets of N signed coefficients and delivers the selected set as
// M = N/L short weight vectors, w[m][j] = h(mL + j), one vector per inner
// product unit, every cycle. Reconfiguring the filter means either writing
// new coefficients (wr_en, wr_set, wr_idx, wr_data; one coefficient per
// clock) or switching the active set with set_sel. Two sets let a new filter
// be loaded into the idle set while the other one runs, then be switched in
// between two blocks. The read path is combinational from the registered
// store; a write becomes visible on the next cycle. All coefficients reset to
// zero.
//
// Splitting the N taps into M short weight vectors for M inner product units
// follows the described structure. The number of sets, the write port and
// the reset value are choices of this design.
module coefficient_selection_unit #(
  parameter int unsigned L      = fir_pkg::BLOCK_L,
  parameter int unsigned N      = fir_pkg::TAPS_N,
  parameter int unsigned COEF_W = fir_pkg::COEF_W,
  parameter int unsigned NSETS  = 2,
  localparam int unsigned M     = N / L,
  localparam int unsigned SET_W = (NSETS > 1) ? $clog2(NSETS) : 1,
  localparam int unsigned IDX_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [SET_W-1:0]         wr_set,
  input  logic [IDX_W-1:0]         wr_idx,
  input  logic signed [COEF_W-1:0] wr_data,
  input  logic [SET_W-1:0]         set_sel,
  output logic signed [COEF_W-1:0] w [M][L]
);

  logic signed [COEF_W-1:0] coef [NSETS][N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NSETS; s++)
        for (int n = 0; n < N; n++) coef[s][n] <= '0;
    end else if (wr_en && 32'(wr_set) < NSETS && 32'(wr_idx) < N) begin
      coef[wr_set][wr_idx] <= wr_data;
    end
  end

  always_comb begin
    for (int m = 0; m < M; m++)
      for (int j = 0; j < L; j++)
        w[m][j] = (32'(set_sel) < NSETS) ? coef[set_sel][m*L+j] : '0;
  end

endmodule
