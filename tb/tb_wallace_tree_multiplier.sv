// tb_wallace_tree_multiplier: exhaustive check of the default 8 x 4-bit
// signed multiplier, plus random operands for a 12 x 7-bit instance (seven
// reduction rows' worth of partial products), against integer products.
module tb_wallace_tree_multiplier;
  logic signed [7:0]  a;
  logic signed [3:0]  b;
  logic signed [11:0] p;
  logic signed [11:0] a2;
  logic signed [6:0]  b2;
  logic signed [18:0] p2;
  int checks = 0, failures = 0;

  wallace_tree_multiplier #(.AW(8),  .BW(4)) dut  (.a, .b, .p);
  wallace_tree_multiplier #(.AW(12), .BW(7)) dut2 (.a(a2), .b(b2), .p(p2));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = -128; x < 128; x++)
      for (int y = -8; y < 8; y++) begin
        a = 8'(x); b = 4'(y);
        a2 = 12'($urandom); b2 = 7'($urandom);
        #1;
        checks += 2;
        if (int'(p) != x * y) begin
          failures++;
          if (failures < 10) $display("%0d * %0d = %0d", x, y, p);
        end
        if (int'(p2) != int'(a2) * int'(b2)) begin
          failures++;
          if (failures < 10) $display("%0d * %0d = %0d (12x7)", a2, b2, p2);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
