// awg_pkg: types, widths and helper functions shared by the resampling
// arbitrary waveform generator.
//
// Samples are 16-bit two's complement, matching the 16k-bit wide sample
// FIFO of the parallel structure (k samples of 16 bits per word). The phase
// of an output sample is a PHASE_W-bit normalised fraction with one extra
// sign bit on top; the time interval u handed to the filter bank is the top
// U_W bits of that fraction. Filter coefficients are signed fixed point with
// COEF_FRAC fractional bits; inside the filter, values carry ACC_GUARD extra
// fractional bits so that only the final rounding loses precision. Everything except the 16-bit sample width is a
// choice of this design.
package awg_pkg;

  localparam int unsigned SAMPLE_W  = 16;  // DAC sample width (16k-bit FIFO word)
  localparam int unsigned PHASE_W   = 32;  // fractional bits of omega and eta
  localparam int unsigned U_W       = 16;  // bits of the time interval u
  localparam int unsigned COEF_W    = 24;  // coefficient width
  localparam int unsigned COEF_FRAC = 20;  // fractional bits of a coefficient
  localparam int unsigned ACC_GUARD = 8;   // fractional guard bits kept through the filter
  localparam int unsigned ACC_W     = 40;  // sub-filter / Horner accumulator width

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic        [U_W-1:0]      uint_t;     // time interval, unsigned fraction
  typedef logic signed [COEF_W-1:0]   coef_t;
  typedef logic signed [ACC_W-1:0]    acc_t;
  typedef logic        [PHASE_W-1:0]  omega_t;    // control word, fraction of 1
  typedef logic        [PHASE_W:0]    phase_t;    // sign bit + fraction

  // Round an accumulator value (ACC_GUARD fractional bits) to the nearest
  // integer, halves upward, and saturate it to the sample range.
  function automatic sample_t sat_sample(input acc_t a);
    localparam acc_t MAXV = acc_t'((1 <<< (SAMPLE_W-1)) - 1);
    localparam acc_t MINV = -acc_t'(1 <<< (SAMPLE_W-1));
    acc_t v;
    v = (a + acc_t'(1 <<< (ACC_GUARD-1))) >>> ACC_GUARD;
    if (v > MAXV)      return sample_t'(MAXV);
    else if (v < MINV) return sample_t'(MINV);
    else               return sample_t'(v);
  endfunction

endpackage
