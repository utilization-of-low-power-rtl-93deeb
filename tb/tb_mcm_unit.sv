// tb_mcm_unit: the 16 constants are every 4-bit signed value, -8 .. 7, and
// every 8-bit input is applied, so each product the unit can form at this
// size is compared with plain integer multiplication.
module tb_mcm_unit;
  localparam int K  = 16;
  localparam int DW = 8;
  localparam int CW = 4;
  localparam logic signed [CW-1:0] C [K] =
    '{-8, -7, -6, -5, -4, -3, -2, -1, 0, 1, 2, 3, 4, 5, 6, 7};

  logic signed [DW-1:0]    x;
  logic signed [DW+CW-1:0] p [K];
  int checks = 0, failures = 0;

  mcm_unit #(.K(K), .DATA_W(DW), .COEF_W(CW), .C(C)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -128; v < 128; v++) begin
      x = DW'(v);
      #1;
      for (int k = 0; k < K; k++) begin
        checks++;
        if (int'(p[k]) != v * (k - 8)) begin
          failures++;
          if (failures < 10) $display("x=%0d c=%0d: p=%0d", v, k - 8, p[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
