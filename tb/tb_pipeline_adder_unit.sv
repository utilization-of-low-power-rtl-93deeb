// tb_pipeline_adder_unit: feeds random partial-result vectors r_0 .. r_{M-1}
// with random stalls and checks y(k) = sum_m r_m(k - m), where k counts only
// enabled cycles (the chain must hold while en is low). Also runs an M = 1
// instance, which has no registers.
module tb_pipeline_adder_unit;
  localparam int L = 4, M = 4, RW = 14, OW = 16;

  logic clk = 0, rst_n = 0, en = 0;
  logic signed [RW-1:0] r  [M][L];
  logic signed [OW-1:0] y  [L];
  logic signed [OW-1:0] y1 [L];
  logic signed [RW-1:0] r1 [1][L];
  int checks = 0, failures = 0, stalls = 0;

  // r vectors of enabled cycles, oldest first
  int hist [$][M][L];

  pipeline_adder_unit #(.L(L), .M(M), .RW(RW), .OUT_W(OW)) dut (.*);
  pipeline_adder_unit #(.L(L), .M(1), .RW(RW), .OUT_W(OW)) dut1 (
    .clk, .rst_n, .en, .r(r1), .y(y1));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 1000; k++) begin
      int cur [M][L];
      @(negedge clk);
      en = ($urandom % 4) != 0;
      for (int m = 0; m < M; m++) for (int i = 0; i < L; i++) begin
        r[m][i] = RW'($urandom);
        cur[m][i] = int'(r[m][i]);
      end
      for (int i = 0; i < L; i++) r1[0][i] = r[0][i];
      #1;
      for (int i = 0; i < L; i++) begin
        int e;
          e = cur[0][i];
        for (int m = 1; m < M; m++)
          if (hist.size() >= m) e += hist[hist.size()-m][m][i];
        checks += 2;
        if (int'(y[i]) != e) begin
          failures++;
          if (failures < 10) $display("cycle %0d y[%0d]=%0d expected %0d", k, i, y[i], e);
        end
        if (int'(y1[i]) != cur[0][i]) failures++;
      end
      @(posedge clk);
      if (en) hist.push_back(cur); else stalls++;
    end
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
