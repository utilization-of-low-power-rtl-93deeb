// register_unit: forms the input matrix of a block FIR from the sample stream.
//
// Block k of the input is x_blk = {x(kL), x(kL+1), ..., x(kL+L-1)}, with
// x_blk[0] the oldest sample. Output row i, column j of the L x L input
// matrix S_k is the sample x(kL+i-j): row i is the window of L samples that
// output sample y(kL+i) needs for one short weight vector. Samples with
// i-j < 0 belong to the previous block, so the unit keeps the last L-1 samples
// of that block in a register that is loaded whenever in_valid is high; the
// rest of the matrix is wired straight from the current input (no latency).
// The register resets to zero, so the filter starts from an all-zero history.
//
// Forming L rows in parallel from the current block follows the described
// register unit; the zero reset and the in_valid load enable are choices of
// this design.
module register_unit #(
  parameter int unsigned L      = fir_pkg::BLOCK_L,
  parameter int unsigned DATA_W = fir_pkg::DATA_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,              // load this block
  input  logic signed [DATA_W-1:0] x_blk [L],             // current block
  output logic signed [DATA_W-1:0] rows  [L][L]           // rows[i][j] = x(kL+i-j)
);

  // prev[t] holds x((k-1)L + t); only t = 1 .. L-1 are ever read.
  logic signed [DATA_W-1:0] prev [L];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < L; t++) prev[t] <= '0;
    end else if (in_valid) begin
      for (int t = 0; t < L; t++) prev[t] <= x_blk[t];
    end
  end

  always_comb begin
    for (int i = 0; i < L; i++) begin
      for (int j = 0; j < L; j++) begin
        if (i >= j) rows[i][j] = x_blk[i-j];
        else        rows[i][j] = prev[L+i-j];
      end
    end
  end

endmodule
