// fir_mcm_pkg: sizes shared by the block FIR filter built from multiple
// constant multiplication (MCM) units.
//
// The filter length (16 taps) and the block size (4 samples per clock) are
// the sizes of the reference design. The 8-bit sample and coefficient widths
// are those shown on the signals of its simulation waveform. Outputs are
// kept at full precision, so no rounding or overflow can occur inside the
// filter. Every module takes these values as parameter defaults, so a
// different size is set by parameter override only.
package fir_mcm_pkg;

  localparam int unsigned N_TAPS  = 16;  // filter length N
  localparam int unsigned BLOCK_L = 4;   // block size L (samples per clock)
  localparam int unsigned IN_W    = 8;   // input sample width, two's complement
  localparam int unsigned COEF_W  = 8;   // coefficient width, two's complement

  // Full-precision width of a product and of an N-term sum of products.
  function automatic int unsigned prod_width(int unsigned in_w, int unsigned coef_w);
    return in_w + coef_w;
  endfunction

  function automatic int unsigned sum_width(int unsigned in_w, int unsigned coef_w,
                                            int unsigned n_terms);
    return in_w + coef_w + $clog2(n_terms);
  endfunction

endpackage
