// tb_mcm_block_fir: streams random 8-bit blocks, including runs of the
// extreme values -128 and 127, through the fixed MCM block FIR with its
// default 16 low-pass taps and random stalls, and compares each output block
// with the convolution computed by fir_model_pkg, for both configurations:
// type II (registered products, the default) and type I (previous samples
// multiplied again). A further instance with L = 2 and 6 arbitrary taps
// checks that the structure is not tied to the default size. out_valid must
// follow in_valid by one clock.
module tb_mcm_block_fir;
  import fir_model_pkg::*;

  localparam int L = 4, N = 16, DW = 8, CW = 4, OW = 16;
  localparam int L2 = 2, N2 = 6;
  localparam logic signed [CW-1:0] H  [N] =
    '{0, 0, 0, 0, -1, -1, 2, 7, 7, 2, -1, -1, 0, 0, 0, 0};
  localparam logic signed [CW-1:0] H2 [N2] = '{-8, 5, -3, 6, 3, -7};

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [DW-1:0] x_blk [L];
  logic signed [DW-1:0] x2    [L2];
  logic out_valid, out_valid2, out_valid1;
  logic signed [OW-1:0] y1    [L];
  logic signed [OW-1:0] y_blk [L];
  logic signed [OW-1:0] y2    [L2];
  int checks = 0, failures = 0, stalls = 0;

  fir_model model  = new(L, N);
  fir_model model2 = new(L2, N2);

  mcm_block_fir dut (.*);
  mcm_block_fir #(.CONFIG(1)) dut1 (
    .clk, .rst_n, .in_valid, .x_blk, .out_valid(out_valid1), .y_blk(y1));
  mcm_block_fir #(.L(L2), .N(N2), .H(H2)) dut2 (
    .clk, .rst_n, .in_valid, .x_blk(x2), .out_valid(out_valid2), .y_blk(y2));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [DW-1:0] stim(int cyc);
    if (cyc >= 100 && cyc < 130) return -128;
    if (cyc >= 130 && cyc < 160) return 127;
    return DW'($urandom);
  endfunction

  initial begin
    bit prev_valid = 0;
    int taps [], taps2 [];
    taps = new[N];  foreach (H[n])  taps[n]  = int'(H[n]);
    taps2 = new[N2]; foreach (H2[n]) taps2[n] = int'(H2[n]);
    for (int t = 0; t < L; t++) x_blk[t] = '0;
    for (int t = 0; t < L2; t++) x2[t] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      int blk [], blk2 [];
      @(negedge clk);
      checks += 2;
      if (out_valid !== prev_valid) failures++;
      if (out_valid2 !== prev_valid) failures++;
      checks++;
      if (out_valid1 !== prev_valid) failures++;
      if (prev_valid) begin
        for (int i = 0; i < L; i++) begin
          int e;
          e = model.y(model.blocks() - 1, i);
          checks++;
          if (int'(y_blk[i]) != e) begin
            failures++;
            if (failures < 10) $display("block %0d y[%0d]=%0d expected %0d",
                                        model.blocks() - 1, i, y_blk[i], e);
          end
          checks++;
          if (int'(y1[i]) != e) begin
            failures++;
            if (failures < 10) $display("type I: block %0d y[%0d]=%0d expected %0d",
                                        model.blocks() - 1, i, y1[i], e);
          end
        end
        for (int i = 0; i < L2; i++) begin
          int e;
          e = model2.y(model2.blocks() - 1, i);
          checks++;
          if (int'(y2[i]) != e) begin
            failures++;
            if (failures < 10) $display("L=2: block %0d y[%0d]=%0d expected %0d",
                                        model2.blocks() - 1, i, y2[i], e);
          end
        end
      end
      in_valid = ($urandom % 5) != 0;
      blk = new[L];
      for (int t = 0; t < L; t++) begin x_blk[t] = stim(cyc); blk[t] = int'(x_blk[t]); end
      blk2 = new[L2];
      for (int t = 0; t < L2; t++) begin x2[t] = stim(cyc); blk2[t] = int'(x2[t]); end
      @(posedge clk);
      prev_valid = in_valid;
      if (in_valid) begin
        model.push(blk, taps);
        model2.push(blk2, taps2);
      end else stalls++;
    end
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
