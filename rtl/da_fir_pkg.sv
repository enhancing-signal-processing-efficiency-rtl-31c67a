// Shared constants of the DA-LUT FIR filter and its SDR equalizer system.
//
// The filter length (64 taps) and the block size (8 samples handled per
// clock) are those of the reference configuration this design follows.
// The word lengths and the LUT partition size are this design's own
// choices: the filter is built for 16-bit two's-complement samples and
// Q1.15 coefficients, and the coefficients are split into groups of four,
// so each group needs a 16-entry distributed-arithmetic look-up table.
package da_fir_pkg;
  localparam int unsigned DATA_W = 16;  // sample word length (bits)
  localparam int unsigned COEF_W = 16;  // coefficient word length (bits)
  localparam int unsigned FRAC_W = 15;  // fraction bits of a coefficient
  localparam int unsigned TAPS   = 64;  // filter length
  localparam int unsigned BLOCK  = 8;   // samples per clock (block size)
  localparam int unsigned GRP    = 4;   // coefficients per DA look-up table

  // Width of a LUT entry: sum of GRP coefficients.
  function automatic int unsigned lut_width(int unsigned coef_w, int unsigned grp);
    return coef_w + $clog2(grp);
  endfunction

  // Width of the full-precision filter sum.
  function automatic int unsigned acc_width(int unsigned data_w, int unsigned coef_w,
                                            int unsigned taps);
    return data_w + coef_w + $clog2(taps);
  endfunction
endpackage
