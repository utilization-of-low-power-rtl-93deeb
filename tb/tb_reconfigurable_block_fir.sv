// tb_reconfigurable_block_fir: streams random 8-bit blocks through the
// reconfigurable block FIR at its default size (L = 4, N = 16) with random
// stalls, random coefficient writes into both sets and random set switches,
// and compares every output block with fir_model_pkg. It also checks the
// timing: out_valid must follow in_valid by exactly one clock, i.e. one
// block of L outputs per clock at a latency of one clock.
module tb_reconfigurable_block_fir;
  import fir_model_pkg::*;

  localparam int L = 4, N = 16, DW = 8, CW = 4, OW = 16, NSETS = 2;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [DW-1:0] x_blk [L];
  logic out_valid;
  logic signed [OW-1:0] y_blk [L];
  logic coef_wr_en = 0;
  logic [0:0] coef_wr_set = 0, set_sel = 0;
  logic [3:0] coef_wr_idx = 0;
  logic signed [CW-1:0] coef_wr_data = 0;
  int checks = 0, failures = 0;
  int stalls = 0, switches = 0, writes = 0;

  int ref_mem [NSETS][N];
  fir_model model = new(L, N);

  reconfigurable_block_fir #(.L(L), .N(N), .DATA_W(DW), .COEF_W(CW), .OUT_W(OW),
                             .NSETS(NSETS)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit prev_valid = 0;
    for (int s = 0; s < NSETS; s++) for (int n = 0; n < N; n++) ref_mem[s][n] = 0;
    for (int t = 0; t < L; t++) x_blk[t] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      int blk [];
      int taps [];
      @(negedge clk);
      // outputs of the previous cycle
      checks++;
      if (out_valid !== prev_valid) begin
        failures++;
        $display("cycle %0d: out_valid=%0b expected %0b", cyc, out_valid, prev_valid);
      end
      if (prev_valid) begin
        for (int i = 0; i < L; i++) begin
          int e;
          e = model.y(model.blocks() - 1, i);
          checks++;
          if (int'(y_blk[i]) != e) begin
            failures++;
            if (failures < 10)
              $display("block %0d y[%0d]=%0d expected %0d", model.blocks() - 1, i, y_blk[i], e);
          end
        end
      end
      // new stimulus: mostly valid, coefficient traffic in bursts
      in_valid     = ($urandom % 5) != 0;
      coef_wr_en   = (cyc < 40) || (($urandom % 4) == 0);
      coef_wr_set  = 1'($urandom);
      coef_wr_idx  = 4'($urandom);
      coef_wr_data = CW'($urandom);
      if (($urandom % 50) == 0) begin set_sel = ~set_sel; switches++; end
      blk = new[L];
      for (int t = 0; t < L; t++) begin
        x_blk[t] = DW'($urandom);
        blk[t] = int'(x_blk[t]);
      end
      taps = new[N];
      for (int n = 0; n < N; n++) taps[n] = ref_mem[set_sel][n];
      @(posedge clk);
      prev_valid = in_valid;
      if (in_valid) model.push(blk, taps); else stalls++;
      if (coef_wr_en) begin
        ref_mem[coef_wr_set][coef_wr_idx] = int'(coef_wr_data);
        writes++;
      end
    end
    if (stalls == 0)   begin failures++; $display("no stall exercised"); end
    if (switches == 0) begin failures++; $display("no set switch exercised"); end
    $display("blocks=%0d stalls=%0d switches=%0d writes=%0d", model.blocks(), stalls, switches, writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
