// fir_pkg: widths shared by the block FIR filters.
//
// A block FIR takes L input samples per clock and returns L output samples
// per clock. The N filter taps are split into M = N/L short weight vectors of
// L taps each. The sizes below are the defaults of every module: block size
// L = 4 and a 16-tap filter (order 15), 8-bit signed samples, 4-bit signed
// coefficients and a 16-bit signed output, which is exactly the full-precision
// width of a 16-term sum of 8x4-bit products. The module parameters repeat
// these defaults so that a module can be resized on its own.
package fir_pkg;

  localparam int unsigned BLOCK_L = 4;   // samples per block (per clock)
  localparam int unsigned TAPS_N  = 16;  // filter length
  localparam int unsigned DATA_W  = 8;   // input sample width, signed
  localparam int unsigned COEF_W  = 4;   // coefficient width, signed
  localparam int unsigned OUT_W   = 16;  // output sample width, signed

  // Width of a full-precision sum of `terms` products of a-bit by b-bit
  // signed numbers.
  function automatic int unsigned sum_width(int unsigned a, int unsigned b,
                                            int unsigned terms);
    return a + b + $clog2(terms);
  endfunction

endpackage
