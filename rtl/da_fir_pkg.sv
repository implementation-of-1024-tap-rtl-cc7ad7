// da_fir_pkg: sizes, types and the default coefficient set shared by the
// distributed-arithmetic (DA) FIR filter.
//
// The filter multiplies nothing: every coefficient product is replaced by
// lookups into small tables of precomputed coefficient sums (one table per
// group of LUT_K taps) that are addressed by one bit of LUT_K input samples
// at a time. The constants below fix the word sizes of that datapath:
//   DATA_W   input sample width, two's complement (8 bits, as given for the
//            filter input).
//   COEF_W   coefficient width, two's complement (8 bits, so that a
//            sample-by-coefficient product is the 16-bit product the
//            filter's specification lists; a 16-bit coefficient width is
//            also mentioned for the MAC reference and is not used here).
//   LUT_K    address bits of one lookup table (4: the 16-entry table).
//   MAX_TAPS largest filter order the coefficient array type can hold
//            (1024, the filter order of the design).
//   OUT_W    width of the filter's output word Q (16 bits).
// Internal words are sized so that nothing can overflow; only the 16-bit
// output word is saturated.
package da_fir_pkg;

  localparam int DATA_W   = 8;
  localparam int COEF_W   = 8;
  localparam int LUT_K    = 4;
  localparam int MAX_TAPS = 1024;
  localparam int OUT_W    = 16;

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef coef_t coef_array_t [MAX_TAPS];

  // Width of one lookup-table entry: the sum of LUT_K coefficients.
  function automatic int lut_w();
    return COEF_W + $clog2(LUT_K);
  endfunction

  // Width of the sum of all lookup-table outputs of a TAPS-tap filter.
  function automatic int sum_w(int taps);
    return COEF_W + $clog2(taps);
  endfunction

  // Width of the full-precision filter result for data_w-bit samples.
  function automatic int acc_w(int taps, int data_w);
    return sum_w(taps) + data_w;
  endfunction

  // Default coefficients: a triangular (Bartlett) low-pass window of
  // length taps, h(k) = floor((2*min(k, taps-1-k) + 1) * 127 / taps).
  // Entries from index taps upwards are zero.
  function automatic coef_array_t bartlett_coefs(int taps);
    coef_array_t c;
    for (int k = 0; k < MAX_TAPS; k++) begin
      int m;
      m = (k < taps - 1 - k) ? k : taps - 1 - k;
      c[k] = (k < taps) ? coef_t'(((2 * m + 1) * 127) / taps) : coef_t'(0);
    end
    return c;
  endfunction

endpackage
