// fir_pkg: sizes and default coefficients shared by the LUT-based FIR filter.
//
// The filter has N_TAPS = 4 taps and a 4-input look-up table of 2^4 = 16
// entries, the numbers the original design uses. Input samples are
// B_DATA = 4 bits wide: one table look-up is made per input bit, and the
// description computes y(n) after four look-ups. The coefficient word length
// (4 bits) and the coefficient values are this design's choice: a binomial
// low-pass response h = {1, 3, 3, 1}.
package fir_pkg;

  localparam int N_TAPS  = 4;  // number of filter coefficients h(0..N-1)
  localparam int LUT_IN  = 4;  // address bits of one look-up table
  localparam int B_DATA  = 4;  // input sample word length B
  localparam int W_COEF  = 4;  // coefficient word length

  typedef logic signed [W_COEF-1:0] coef_t;

  // Default low-pass coefficients, h(0) first.
  localparam coef_t DEFAULT_COEF [N_TAPS] = '{4'sd1, 4'sd3, 4'sd3, 4'sd1};

  // Bits needed to hold the sum of 2^k words of width w.
  function automatic int sum_width(int w, int n);
    return w + $clog2(n);
  endfunction

endpackage
