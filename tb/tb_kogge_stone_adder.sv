// tb_kogge_stone_adder: exhaustive check of an 8-bit instance (all a, b and
// carry-in) and random operands for 16- and 13-bit instances (a width that
// is not a power of two), against integer addition including carry out.
module tb_kogge_stone_adder;
  logic [7:0]  a8, b8, s8;
  logic [15:0] a16, b16, s16;
  logic [12:0] a13, b13, s13;
  logic        cin, c8, c16, c13;
  int checks = 0, failures = 0;

  kogge_stone_adder #(.W(8))  u8  (.a(a8),  .b(b8),  .cin, .sum(s8),  .cout(c8));
  kogge_stone_adder #(.W(16)) u16 (.a(a16), .b(b16), .cin, .sum(s16), .cout(c16));
  kogge_stone_adder #(.W(13)) u13 (.a(a13), .b(b13), .cin, .sum(s13), .cout(c13));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        for (int c = 0; c < 2; c++) begin
          a8 = 8'(x); b8 = 8'(y); cin = 1'(c);
          a16 = 16'($urandom); b16 = 16'($urandom);
          a13 = 13'($urandom); b13 = 13'($urandom);
          #1;
          checks += 3;
          if ({c8, s8} != 9'(x + y + c)) begin
            failures++;
            if (failures < 10) $display("8-bit %0d + %0d + %0d = %0d", x, y, c, {c8, s8});
          end
          if ({c16, s16} != 17'(int'(a16) + int'(b16) + c)) failures++;
          if ({c13, s13} != 14'(int'(a13) + int'(b13) + c)) failures++;
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
