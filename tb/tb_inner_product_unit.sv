// tb_inner_product_unit: random and extreme matrices and weight vectors;
// each output is compared with a sum of products computed in integer
// arithmetic.
module tb_inner_product_unit;
  localparam int L  = 4;
  localparam int DW = 8;
  localparam int CW = 4;
  localparam int RW = DW + CW + $clog2(L);

  logic signed [DW-1:0] rows [L][L];
  logic signed [CW-1:0] w    [L];
  logic signed [RW-1:0] r    [L];
  int checks = 0, failures = 0;

  inner_product_unit #(.L(L), .DATA_W(DW), .COEF_W(CW)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      for (int i = 0; i < L; i++) for (int j = 0; j < L; j++)
        rows[i][j] = (k == 0) ? -128 : (k == 1) ? 127 : DW'($urandom);
      for (int j = 0; j < L; j++)
        w[j] = (k == 0) ? -8 : (k == 1) ? -8 : CW'($urandom);
      #1;
      for (int i = 0; i < L; i++) begin
        int e;
          e = 0;
        for (int j = 0; j < L; j++) e += int'(rows[i][j]) * int'(w[j]);
        checks++;
        if (int'(r[i]) != e) begin
          failures++;
          if (failures < 10) $display("r[%0d] = %0d, expected %0d", i, r[i], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
