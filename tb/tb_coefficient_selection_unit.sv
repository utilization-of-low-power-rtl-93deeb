// tb_coefficient_selection_unit: writes random coefficients into both sets
// in random order while the active set switches randomly, and checks every
// cycle that w[m][j] equals tap mL+j of the selected set of a reference
// copy of the store (writes visible from the next cycle, zero after reset).
module tb_coefficient_selection_unit;
  localparam int L = 4, N = 16, CW = 4, NSETS = 2, M = N / L;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0;
  logic [0:0] wr_set = 0, set_sel = 0;
  logic [3:0] wr_idx = 0;
  logic signed [CW-1:0] wr_data = 0;
  logic signed [CW-1:0] w [M][L];
  int checks = 0, failures = 0, switches = 0, writes = 0;
  logic signed [CW-1:0] ref_mem [NSETS][N];

  coefficient_selection_unit #(.L(L), .N(N), .COEF_W(CW), .NSETS(NSETS)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < NSETS; s++) for (int n = 0; n < N; n++) ref_mem[s][n] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      wr_en   = ($urandom % 3) != 0;
      wr_set  = 1'($urandom);
      wr_idx  = 4'($urandom);
      wr_data = CW'($urandom);
      if (($urandom % 8) == 0) begin set_sel = ~set_sel; switches++; end
      #1;
      for (int m = 0; m < M; m++) for (int j = 0; j < L; j++) begin
        checks++;
        if (w[m][j] !== ref_mem[set_sel][m*L+j]) begin
          failures++;
          if (failures < 10)
            $display("set %0d w[%0d][%0d]=%0d expected %0d", set_sel, m, j,
                     w[m][j], ref_mem[set_sel][m*L+j]);
        end
      end
      @(posedge clk);
      if (wr_en) begin ref_mem[wr_set][wr_idx] = wr_data; writes++; end
    end
    if (switches == 0 || writes == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
