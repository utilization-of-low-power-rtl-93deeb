// tb_filter_lengths: the filter-length sweep of the evaluation, 8, 16, 32
// and 64 taps at block size 4, run for both block FIR realizations (one
// tb_len_case per length, all in parallel).
module tb_filter_lengths;
  localparam int NCASES = 4;
  localparam int LENGTHS [NCASES] = '{8, 16, 32, 64};

  logic clk = 0, rst_n = 0;
  int c_checks [NCASES];
  int c_fail   [NCASES];
  bit c_done   [NCASES];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar g = 0; g < NCASES; g++) begin : g_len
    tb_len_case #(.N(LENGTHS[g])) u_case (
      .clk, .rst_n, .checks(c_checks[g]), .failures(c_fail[g]), .done(c_done[g]));
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all_done;
    repeat (3) @(posedge clk);
    rst_n = 1;
    do begin
      @(posedge clk);
      all_done = 1;
      for (int g = 0; g < NCASES; g++) if (!c_done[g]) all_done = 0;
    end while (!all_done);
    for (int g = 0; g < NCASES; g++) begin
      checks += c_checks[g];
      failures += c_fail[g];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
