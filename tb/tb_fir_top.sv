// tb_fir_top: end-to-end test of fir_top at its default size (L = 4,
// N = 16, 8-bit samples, 4-bit taps, 16-bit outputs); no parameter is
// overridden. Phases:
//   1. Two-tap example: the reconfigurable filter gets taps h0 = 1, h1 = 2
//      (all others 0) and a constant input of 5; its output must be 5 for
//      the very first sample and 15 from then on.
//   2. Impulse: a single 1 followed by zeros; the fixed MCM filter must
//      return its 16 taps, four per block, in order.
//   3. Background reload: the fixed filter's taps are written into the idle
//      set 1 while set 0 keeps filtering, then set_sel switches to set 1.
//   4. A long random stream with random stalls, further switches and
//      rewrites; both outputs are compared every block with fir_model_pkg,
//      and whenever both filters run the same taps their outputs must agree.
// Every cycle out_valid must equal the previous cycle's in_valid (one block
// per clock, one clock of latency). The test counts stalls, set switches,
// coefficient writes, output blocks that mix old and new taps after a
// switch, and blocks where both filters agree; each must happen at least
// once.
module tb_fir_top;
  import fir_model_pkg::*;

  localparam int L = 4, N = 16, M = N / L;
  localparam int FIXED [N] = '{0, 0, 0, 0, -1, -1, 2, 7, 7, 2, -1, -1, 0, 0, 0, 0};

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [7:0] x_blk [L];
  logic coef_wr_en = 0;
  logic [0:0] coef_wr_set = 0, set_sel = 0;
  logic [3:0] coef_wr_idx = 0;
  logic signed [3:0] coef_wr_data = 0;
  logic rcf_valid, mcm_valid;
  logic signed [15:0] rcf_y [L];
  logic signed [15:0] mcm_y [L];

  int checks = 0, failures = 0;
  int n_stall = 0, n_switch = 0, n_write = 0, n_mixed = 0, n_agree = 0;
  int last_switch_blk = -100;

  int ref_mem [2][N];
  fir_model rcf_model = new(L, N);
  fir_model mcm_model = new(L, N);
  bit prev_valid = 0;

  fir_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("FAIL: %s", what);
    end
  endtask

  // One clock: apply stimulus at the falling edge, update the models at the
  // rising edge, then compare the registered outputs just after that edge.
  task automatic step(bit valid, int samples [L], bit wr, int wset, int widx, int wdata,
                      bit sw);
    int blk [], taps [], fixed [];
    @(negedge clk);
    in_valid = valid;
    for (int t = 0; t < L; t++) x_blk[t] = 8'(samples[t]);
    coef_wr_en = wr; coef_wr_set = 1'(wset); coef_wr_idx = 4'(widx); coef_wr_data = 4'(wdata);
    if (sw) begin set_sel = ~set_sel; n_switch++; last_switch_blk = rcf_model.blocks(); end
    blk = new[L]; for (int t = 0; t < L; t++) blk[t] = samples[t];
    taps = new[N]; for (int n = 0; n < N; n++) taps[n] = ref_mem[set_sel][n];
    fixed = new[N]; for (int n = 0; n < N; n++) fixed[n] = FIXED[n];
    @(posedge clk);
    prev_valid = valid;
    if (valid) begin
      rcf_model.push(blk, taps);
      mcm_model.push(blk, fixed);
    end else n_stall++;
    if (wr) begin ref_mem[wset][widx] = wdata; n_write++; end
    #1;
    check(rcf_valid == prev_valid && mcm_valid == prev_valid, "valid timing");
    if (prev_valid) begin
      int k = rcf_model.blocks() - 1;
      begin
        bit same;
        same = 1;
        for (int i = 0; i < L; i++) begin
          check(int'(rcf_y[i]) == rcf_model.y(k, i),
                $sformatf("rcf block %0d y[%0d]=%0d exp %0d", k, i, rcf_y[i], rcf_model.y(k, i)));
          check(int'(mcm_y[i]) == mcm_model.y(k, i),
                $sformatf("mcm block %0d y[%0d]=%0d exp %0d", k, i, mcm_y[i], mcm_model.y(k, i)));
          if (rcf_y[i] != mcm_y[i]) same = 0;
        end
        if (same && k > M) n_agree++;
      end
      if (k > last_switch_blk && k < last_switch_blk + M) n_mixed++;
    end
  endtask

  task automatic idle_write(int wset, int widx, int wdata);
    int z [L] = '{default: 0};
    step(0, z, 1, wset, widx, wdata, 0);
  endtask

  initial begin
    int s [L];
    int z [L] = '{default: 0};
    for (int a = 0; a < 2; a++) for (int n = 0; n < N; n++) ref_mem[a][n] = 0;
    for (int t = 0; t < L; t++) x_blk[t] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // 1. two-tap example: h0 = 1, h1 = 2, constant input 5
    idle_write(0, 0, 1);
    idle_write(0, 1, 2);
    for (int b = 0; b < 6; b++) begin
      s = '{5, 5, 5, 5};
      step(1, s, 0, 0, 0, 0, 0);
      for (int i = 0; i < L; i++)
        check(int'(rcf_y[i]) == ((b == 0 && i == 0) ? 5 : 15),
              $sformatf("two-tap example block %0d y[%0d]=%0d", b, i, rcf_y[i]));
    end
    // flush with zeros so the impulse below starts from a clean history
    for (int b = 0; b < M + 1; b++) step(1, z, 0, 0, 0, 0, 0);

    // 2. impulse response of the fixed filter
    for (int b = 0; b < M + 1; b++) begin
      s = (b == 0) ? '{1, 0, 0, 0} : z;
      step(1, s, 0, 0, 0, 0, 0);
      for (int i = 0; i < L; i++)
        if (b < M)
          check(int'(mcm_y[i]) == FIXED[b*L+i],
                $sformatf("impulse tap %0d = %0d", b*L+i, mcm_y[i]));
        else
          check(mcm_y[i] == 0, "impulse tail");
    end

    // 3. load the fixed taps into set 1 while set 0 keeps running, then switch
    for (int n = 0; n < N; n++) begin
      for (int t = 0; t < L; t++) s[t] = $urandom_range(0, 255) - 128;
      step(1, s, 1, 1, n, FIXED[n], 0);
    end
    for (int t = 0; t < L; t++) s[t] = $urandom_range(0, 255) - 128;
    step(1, s, 0, 0, 0, 0, 1);

    // 4. random stream
    for (int c = 0; c < 4000; c++) begin
      bit v, sw, wr;
      int ws;
      v  = ($urandom % 6) != 0;
      sw = ($urandom % 200) == 0;
      wr = ($urandom % 10) == 0;
      ws = (set_sel == 1) ? 0 : 1;   // rewrite mostly the idle set
      if (($urandom % 4) == 0) ws = int'(set_sel);
      for (int t = 0; t < L; t++) s[t] = $urandom_range(0, 255) - 128;
      step(v, s, wr, ws, $urandom_range(0, N-1), $urandom_range(0, 15) - 8, sw);
    end

    $display("output blocks=%0d stalls=%0d set switches=%0d coefficient writes=%0d",
             rcf_model.blocks(), n_stall, n_switch, n_write);
    $display("blocks mixing old and new taps=%0d blocks where both filters agree=%0d",
             n_mixed, n_agree);
    check(n_stall > 0,  "no stall happened");
    check(n_switch > 0, "no set switch happened");
    check(n_write > 0,  "no coefficient write happened");
    check(n_mixed > 0,  "no block mixed old and new taps");
    check(n_agree > 0,  "the two filters never agreed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
