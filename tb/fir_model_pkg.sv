// fir_model_pkg: reference model of a block FIR filter in transposed form,
// for the testbenches.
//
// The model keeps every accepted input block together with the taps that
// were active in the cycle it was accepted. Output sample i of block k is
//   y(kL+i) = sum_{m=0}^{M-1} sum_{j=0}^{L-1} h_{k-m}(mL+j) * x(kL+i-mL-j)
// where h_{k-m} are the taps active when block k-m was accepted and samples
// before the first one are zero. With unchanging taps this is the ordinary
// convolution y(n) = sum_t h(t) x(n-t); when the taps change it reproduces
// the mixing of old and new taps that a transposed-form filter shows.
package fir_model_pkg;

  class fir_model;
    int L, N, M;
    int x [$];        // accepted samples, oldest first
    int h [$][];      // taps in effect for each accepted block

    function new(int l, int n);
      L = l; N = n; M = n / l;
    endfunction

    function void push(int blk [], int taps []);
      for (int t = 0; t < L; t++) x.push_back(blk[t]);
      h.push_back(taps);
    endfunction

    function int blocks();
      return h.size();
    endfunction

    // output sample i of block k
    function int y(int k, int i);
      int s = 0;
      for (int m = 0; m < M; m++) begin
        if (k - m < 0) continue;
        for (int j = 0; j < L; j++) begin
          int n = k*L + i - m*L - j;
          if (n >= 0) s += h[k-m][m*L+j] * x[n];
        end
      end
      return s;
    endfunction
  endclass

endpackage
