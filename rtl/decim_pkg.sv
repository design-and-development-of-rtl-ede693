// decim_pkg: shared sample format and helpers for the multistage decimation filter.
//
// Audio samples travel between stages as 16-bit two's-complement words (Q1.15) and the
// low-pass coefficients are 16-bit Q1.15 words as well. Neither width is fixed by the
// filter specification, which gives only rates, band edges, attenuations and orders; 16 bits
// is this implementation's choice for an audio path. The helper below sizes a MAC
// accumulator so that a sum of NTAPS full-scale products can never overflow.
package decim_pkg;

  localparam int unsigned SAMPLE_W = 16;  // sample word width (Q1.15)
  localparam int unsigned COEF_W   = 16;  // coefficient word width (Q1.15)

  typedef logic signed [SAMPLE_W-1:0] sample_t;

  // Accumulator width for a dot product of ntaps (dw x cw)-bit signed products.
  function automatic int unsigned acc_width(int unsigned dw, int unsigned cw,
                                            int unsigned ntaps);
    return dw + cw + $clog2(ntaps);
  endfunction

endpackage
