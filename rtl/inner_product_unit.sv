// inner_product_unit: multiplies the L x L input matrix by one short weight
// vector.
//
// r[i] = sum_j rows[i][j] * w[j], for i = 0 .. L-1. Each of the L outputs is
// the inner product of one matrix row with the L-tap weight vector w (taps
// mL .. mL+L-1 of the filter, for the m-th unit). Every product comes from a
// wallace_tree_multiplier, and the L products of a row are summed by a
// binary tree of kogge_stone_adders (clog2(L) levels; an odd leftover passes
// to the next level). Everything is combinational, inside one clock period,
// matching the cycle time T = T_mult + T_add + T_fulladd * log2(L) of the
// described structure. The result keeps full precision, RW = DATA_W + COEF_W
// + clog2(L) bits, signed.
//
// L parallel inner products per unit and the Wallace-tree multiplier with
// Kogge-Stone adders follow the described design; the shape of the adder
// tree is this design's choice.
module inner_product_unit #(
  parameter int unsigned L      = fir_pkg::BLOCK_L,
  parameter int unsigned DATA_W = fir_pkg::DATA_W,
  parameter int unsigned COEF_W = fir_pkg::COEF_W,
  parameter int unsigned RW     = fir_pkg::sum_width(DATA_W, COEF_W, L)
) (
  input  logic signed [DATA_W-1:0] rows [L][L],
  input  logic signed [COEF_W-1:0] w    [L],
  output logic signed [RW-1:0]     r    [L]
);

  localparam int unsigned PW = DATA_W + COEF_W;
  localparam int unsigned NLA = (L > 1) ? $clog2(L) : 0;

  // number of operands left after `lvl` levels of pairwise addition
  function automatic int unsigned count_at(int unsigned lvl);
    int unsigned n = L;
    for (int unsigned l = 0; l < lvl; l++) n = (n + 1) / 2;
    return n;
  endfunction

  for (genvar i = 0; i < L; i++) begin : g_row
    logic signed [PW-1:0] prod [L];
    logic [RW-1:0] opnd [L];

    for (genvar j = 0; j < L; j++) begin : g_mul
      wallace_tree_multiplier #(.AW(DATA_W), .BW(COEF_W)) u_mul (
        .a(rows[i][j]), .b(w[j]), .p(prod[j])
      );
      assign opnd[j] = RW'(prod[j]);   // sign-extend
    end

    // level l adds the count_at(l) operands of the level before it in pairs
    for (genvar l = 0; l < NLA; l++) begin : g_level
      localparam int unsigned NIN  = count_at(l);
      localparam int unsigned NOUT = (NIN + 1) / 2;
      logic [RW-1:0] in_v  [NIN];
      logic [RW-1:0] out_v [NOUT];

      for (genvar k = 0; k < NIN; k++) begin : g_in
        if (l == 0) begin : g_first
          assign in_v[k] = opnd[k];
        end else begin : g_next
          assign in_v[k] = g_level[l-1].out_v[k];
        end
      end

      for (genvar g = 0; g < NIN / 2; g++) begin : g_add
        logic unused_cout;
        kogge_stone_adder #(.W(RW)) u_add (
          .a(in_v[2*g]), .b(in_v[2*g+1]), .cin(1'b0),
          .sum(out_v[g]), .cout(unused_cout)
        );
      end
      if (NIN % 2 == 1) begin : g_pass
        assign out_v[NOUT-1] = in_v[NIN-1];
      end
    end

    if (NLA == 0) begin : g_no_tree
      assign r[i] = signed'(opnd[0]);
    end else begin : g_tree
      assign r[i] = signed'(g_level[NLA-1].out_v[0]);
    end
  end

endmodule
