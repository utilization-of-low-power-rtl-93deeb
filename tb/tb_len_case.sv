// tb_len_case: one filter length of the filter-length sweep. Instantiates
// the reconfigurable and the fixed MCM block FIR with N taps (L = 4, 8-bit
// samples, 4-bit taps, exact output width), loads the reconfigurable filter
// with the same taps the fixed one is built with, streams random blocks
// with random stalls and compares both outputs with fir_model_pkg. Reports
// its counts and raises done when finished.
module tb_len_case #(
  parameter int N = 16
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output bit   done
);
  import fir_model_pkg::*;
  localparam int L = 4, DW = 8, CW = 4;
  localparam int OW = DW + CW + $clog2(N);
  localparam int IW = $clog2(N);

  typedef logic signed [CW-1:0] taps_t [N];
  // arbitrary taps covering every 4-bit value: h(n) = ((5n + 3) mod 16) - 8
  function automatic taps_t mk_taps();
    taps_t t;
    for (int n = 0; n < N; n++) t[n] = CW'(((5*n + 3) % 16) - 8);
    return t;
  endfunction
  localparam taps_t H = mk_taps();

  logic in_valid = 0;
  logic signed [DW-1:0] x_blk [L];
  logic rv, mv;
  logic signed [OW-1:0] ry [L];
  logic signed [OW-1:0] my [L];
  logic wr_en = 0;
  logic [IW-1:0] wr_idx = '0;
  logic signed [CW-1:0] wr_data = '0;

  reconfigurable_block_fir #(.L(L), .N(N), .OUT_W(OW)) u_rcf (
    .clk, .rst_n, .in_valid, .x_blk, .out_valid(rv), .y_blk(ry),
    .coef_wr_en(wr_en), .coef_wr_set(1'b0), .coef_wr_idx(wr_idx), .coef_wr_data(wr_data),
    .set_sel(1'b0));
  mcm_block_fir #(.L(L), .N(N), .OUT_W(OW), .H(H)) u_mcm (
    .clk, .rst_n, .in_valid, .x_blk, .out_valid(mv), .y_blk(my));

  fir_model model = new(L, N);

  initial begin
    int taps [];
    bit prev_valid;
    checks = 0; failures = 0; done = 0; prev_valid = 0;
    for (int t = 0; t < L; t++) x_blk[t] = '0;
    taps = new[N];
    for (int n = 0; n < N; n++) taps[n] = int'(H[n]);
    @(posedge rst_n);
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      wr_en = 1; wr_idx = IW'(n); wr_data = H[n];
    end
    @(negedge clk);
    wr_en = 0;
    for (int c = 0; c < 600; c++) begin
      int blk [];
      blk = new[L];
      @(negedge clk);
      in_valid = ($urandom % 5) != 0;
      for (int t = 0; t < L; t++) begin x_blk[t] = DW'($urandom); blk[t] = int'(x_blk[t]); end
      @(posedge clk);
      prev_valid = in_valid;
      if (in_valid) model.push(blk, taps);
      #1;
      checks += 2;
      if (rv != prev_valid) failures++;
      if (mv != prev_valid) failures++;
      if (prev_valid)
        for (int i = 0; i < L; i++) begin
          int e;
          e = model.y(model.blocks() - 1, i);
          checks += 2;
          if (int'(ry[i]) != e) begin
            failures++;
            if (failures < 5) $display("N=%0d rcf y[%0d]=%0d exp %0d", N, i, ry[i], e);
          end
          if (int'(my[i]) != e) begin
            failures++;
            if (failures < 5) $display("N=%0d mcm y[%0d]=%0d exp %0d", N, i, my[i], e);
          end
        end
    end
    $display("N=%0d: blocks=%0d checks=%0d failures=%0d", N, model.blocks(), checks, failures);
    done = 1;
  end
endmodule
