// pipeline_adder_unit: the transposed-form delay-add chain of a block FIR.
//
// It combines the M partial result vectors r_0 .. r_{M-1} of one block
// (r_m = S_k * c_m, from the inner product or MCM stage) into the output block
//   Y = r_0 + z^-1 ( r_1 + z^-1 ( r_2 + ... + z^-1 r_{M-1} ) )
// where z^-1 is a delay of one block (one enabled clock). There are M-1
// registers of L words: acc[M-1] <= r_{M-1}, acc[m] <= r_m + acc[m+1], and the
// output y = r_0 + acc[1] is combinational. Each addition is a
// kogge_stone_adder. The registers advance only when en is high, so a pause
// in the input stream does not disturb the filter state. Registers reset to
// zero. Every word is OUT_W bits, signed; the inputs are sign-extended to it.
//
// The nested delay-add equation follows the described design; the enable,
// the reset and the combinational final addition are this design's choices.
module pipeline_adder_unit #(
  parameter int unsigned L     = fir_pkg::BLOCK_L,
  parameter int unsigned M     = fir_pkg::TAPS_N / fir_pkg::BLOCK_L,
  parameter int unsigned RW    = fir_pkg::sum_width(fir_pkg::DATA_W, fir_pkg::COEF_W, fir_pkg::BLOCK_L),
  parameter int unsigned OUT_W = fir_pkg::OUT_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic signed [RW-1:0]    r [M][L],
  output logic signed [OUT_W-1:0] y [L]
);

  if (M == 1) begin : g_single
    always_comb for (int i = 0; i < L; i++) y[i] = OUT_W'(r[0][i]);
  end else begin : g_chain
    // acc[m] holds stage m (m = 1 .. M-1); nxt[m] is its next value.
    logic [OUT_W-1:0] acc [1:M-1][L];
    logic [OUT_W-1:0] nxt [1:M-1][L];

    for (genvar i = 0; i < L; i++) begin : g_lane
      assign nxt[M-1][i] = OUT_W'(r[M-1][i]);
      for (genvar m = 1; m < M - 1; m++) begin : g_stage
        logic unused_cout;
        kogge_stone_adder #(.W(OUT_W)) u_add (
          .a(OUT_W'(r[m][i])), .b(acc[m+1][i]), .cin(1'b0),
          .sum(nxt[m][i]), .cout(unused_cout)
        );
      end
      logic [OUT_W-1:0] y_sum;
      logic             unused_cout_y;
      kogge_stone_adder #(.W(OUT_W)) u_out (
        .a(OUT_W'(r[0][i])), .b(acc[1][i]), .cin(1'b0),
        .sum(y_sum), .cout(unused_cout_y)
      );
      assign y[i] = signed'(y_sum);
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int m = 1; m < M; m++)
          for (int i = 0; i < L; i++) acc[m][i] <= '0;
      end else if (en) begin
        acc <= nxt;
      end
    end
  end

endmodule
