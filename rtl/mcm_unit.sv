// mcm_unit: multiplier-less multiple constant multiplication.
//
// Multiplies one signed input sample x by K fixed signed constants C[0..K-1]
// using only shifts, additions and subtractions: p[k] = x * C[k]. Each
// constant is recoded at elaboration time into canonic signed digits (CSD,
// digits -1/0/+1 with no two adjacent non-zero digits), and the product is
// the sum of x shifted to each non-zero digit position, added or subtracted
// by the digit's sign. CSD needs at most about half as many adders as plain
// binary. Zero and power-of-two constants cost no adder at all. The unit is
// combinational. The output width DATA_W + COEF_W holds every product
// exactly.
//
// The default constants are the 16 taps of the default fixed low-pass
// filter (see mcm_block_fir); an enclosing filter always passes its own.
//
// Replacing the multipliers of a fixed filter by shift-add MCM follows the
// described design; CSD recoding (rather than a shared-subexpression search)
// is this design's choice.
module mcm_unit #(
  parameter int unsigned K      = fir_pkg::TAPS_N,
  parameter int unsigned DATA_W = fir_pkg::DATA_W,
  parameter int unsigned COEF_W = fir_pkg::COEF_W,
  parameter logic signed [COEF_W-1:0] C [K] =
    '{0, 0, 0, 0, -1, -1, 2, 7, 7, 2, -1, -1, 0, 0, 0, 0},
  localparam int unsigned PW    = DATA_W + COEF_W
) (
  input  logic signed [DATA_W-1:0] x,
  output logic signed [PW-1:0]     p [K]
);

  // CSD digits of v, as two masks: bit b of the result is set where the digit
  // at weight 2^b is +1 (neg = 0) or -1 (neg = 1).
  function automatic logic [COEF_W:0] csd_mask(logic signed [COEF_W-1:0] c, bit neg);
    int v;
    logic [COEF_W:0] mask;
    v = int'(c);
    mask = '0;
    for (int b = 0; b <= COEF_W; b++) begin
      if ((v & 1) != 0) begin
        if ((v & 3) == 1) begin
          if (!neg) mask[b] = 1'b1;
          v = v - 1;
        end else begin
          if (neg) mask[b] = 1'b1;
          v = v + 1;
        end
      end
      v = v >>> 1;
    end
    return mask;
  endfunction

  for (genvar k = 0; k < K; k++) begin : g_const
    localparam logic [COEF_W:0] POS = csd_mask(C[k], 1'b0);
    localparam logic [COEF_W:0] NEG = csd_mask(C[k], 1'b1);

    always_comb begin
      logic signed [PW:0] acc;
      acc = '0;
      for (int b = 0; b <= COEF_W; b++) begin
        if (POS[b]) acc = acc + ((PW+1)'(x) <<< b);
        if (NEG[b]) acc = acc - ((PW+1)'(x) <<< b);
      end
      p[k] = PW'(acc);
    end
  end

endmodule
