// tb_register_unit: checks that the register unit forms rows[i][j] =
// x(kL+i-j) from the current block and the held previous block, including
// across stalls (in_valid low must keep the history) and from reset (zero
// history). The expected matrix is built from a flat record of every
// accepted sample.
module tb_register_unit;
  localparam int L = 4;
  localparam int W = 8;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [W-1:0] x_blk [L];
  logic signed [W-1:0] rows  [L][L];
  int checks = 0, failures = 0;

  // every accepted sample, oldest first
  logic signed [W-1:0] hist [$];

  register_unit #(.L(L), .DATA_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [W-1:0] sample(int n);
    return (n < 0) ? '0 : hist[n];
  endfunction

  task automatic check_rows();
    int base = hist.size();  // index of x_blk[0] in the stream
    for (int i = 0; i < L; i++)
      for (int j = 0; j < L; j++) begin
        logic signed [W-1:0] exp_v;
        exp_v = (i >= j) ? x_blk[i-j] : sample(base + i - j);
        checks++;
        if (rows[i][j] !== exp_v) begin
          failures++;
          if (failures < 10)
            $display("rows[%0d][%0d] = %0d, expected %0d", i, j, rows[i][j], exp_v);
        end
      end
  endtask

  int stalls = 0;
  initial begin
    for (int t = 0; t < L; t++) x_blk[t] = W'($urandom);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      for (int t = 0; t < L; t++) x_blk[t] = W'($urandom);
      #1 check_rows();
      @(posedge clk);
      if (in_valid) for (int t = 0; t < L; t++) hist.push_back(x_blk[t]);
      else stalls++;
    end
    if (stalls == 0) begin failures++; $display("no stall exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
