// wallace_tree_multiplier: signed AW x BW multiplier built as a Wallace tree.
//
// The three classic stages:
//   1. Partial products. Row j (j < BW-1) is a, sign-extended to P = AW+BW
//      bits and shifted left j, if b[j] is set. The sign bit of b weighs
//      -2^(BW-1), so its row is the one's complement of a << (BW-1), plus a
//      separate row holding the +1 that completes the two's complement.
//      All arithmetic is modulo 2^P, so the sum of the BW+1 rows is a*b.
//   2. Reduction. Levels of carry-save (3:2) adders: each group of three
//      rows becomes a sum row (a ^ b ^ c) and a carry row (majority, shifted
//      left one); leftover rows pass through. Row counts go 5 -> 4 -> 3 -> 2
//      for a 4-bit b, with one full-adder delay per level.
//   3. Final addition of the last two rows with a kogge_stone_adder.
// Purely combinational; p = a * b exactly, P = AW + BW bits, signed.
//
// A Wallace tree multiplier with a Kogge-Stone final adder follows the
// described design; the signed partial-product scheme and the word-wide
// carry-save rows are this design's way of building it.
module wallace_tree_multiplier #(
  parameter int unsigned AW = fir_pkg::DATA_W,
  parameter int unsigned BW = fir_pkg::COEF_W,
  localparam int unsigned P = AW + BW
) (
  input  logic signed [AW-1:0] a,
  input  logic signed [BW-1:0] b,
  output logic signed [P-1:0]  p
);

  localparam int unsigned R0 = BW + 1;

  function automatic int unsigned next_rows(int unsigned n);
    return 2 * (n / 3) + n % 3;
  endfunction

  function automatic int unsigned rows_at(int unsigned lvl);
    int unsigned n = R0;
    for (int unsigned l = 0; l < lvl; l++) n = next_rows(n);
    return n;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned n = R0, l = 0;
    while (n > 2) begin
      n = next_rows(n);
      l++;
    end
    return l;
  endfunction

  localparam int unsigned NL = num_levels();

  logic [P-1:0] pp [R0];

  // stage 1: partial products
  always_comb begin
    logic [P-1:0] a_ext;
    a_ext = P'(a);
    for (int j = 0; j < R0; j++) pp[j] = '0;
    for (int j = 0; j < BW - 1; j++)
      if (b[j]) pp[j] = a_ext << j;
    if (b[BW-1]) begin
      pp[BW-1] = ~(a_ext << (BW - 1));
      pp[BW]   = P'(1);
    end
  end

  // stage 2: carry-save reduction, one generate scope per level
  for (genvar l = 0; l < NL; l++) begin : g_level
    localparam int unsigned NIN  = rows_at(l);
    localparam int unsigned NOUT = next_rows(NIN);
    localparam int unsigned NG   = NIN / 3;
    localparam int          NREM = int'(NIN % 3);
    logic [P-1:0] in_r  [NIN];
    logic [P-1:0] out_r [NOUT];

    for (genvar k = 0; k < NIN; k++) begin : g_in
      if (l == 0) begin : g_first
        assign in_r[k] = pp[k];
      end else begin : g_next
        assign in_r[k] = g_level[l-1].out_r[k];
      end
    end

    always_comb begin
      for (int g = 0; g < NG; g++) begin
        logic [P-1:0] x, y, z;
        x = in_r[3*g];
        y = in_r[3*g+1];
        z = in_r[3*g+2];
        out_r[2*g]   = x ^ y ^ z;
        out_r[2*g+1] = ((x & y) | (x & z) | (y & z)) << 1;
      end
      for (int r = 0; r < NREM; r++) out_r[2*NG+r] = in_r[3*NG+r];
    end
  end

  // stage 3: final carry-propagate addition
  logic [P-1:0] fin_a, fin_b, sum;
  logic         unused_cout;

  if (NL == 0) begin : g_no_tree
    assign fin_a = pp[0];
    assign fin_b = pp[1];
  end else begin : g_tree
    assign fin_a = g_level[NL-1].out_r[0];
    assign fin_b = g_level[NL-1].out_r[1];
  end

  kogge_stone_adder #(.W(P)) u_final (
    .a(fin_a), .b(fin_b), .cin(1'b0), .sum(sum), .cout(unused_cout)
  );

  assign p = signed'(sum);

endmodule
