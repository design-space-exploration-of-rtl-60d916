// stadj_pkg: types and constants shared by the symbol timing adjustment receiver.
//
// The receiver samples a low-IF QAM-16 signal with a fixed clock at Fs = K * Fsym
// (K = 3) and recovers the symbol instants by quadratic interpolation at complex
// baseband. All filter datapaths carry 10-bit two's-complement samples, scaled so
// that the integer range [-512, 511] stands for [-1, 1). The fractional delay mu is
// an unsigned 10-bit fraction of one sample period.
//
// From the source design: K = 3, the 10-bit filter wordlength, the rolloff 0.2,
// the IF at 0.75 * Fsym and the compensation design point mu = 0.25.
// Own choices: the mu width, the filter lengths and every coefficient value.
//
// SRRC_COEF: 25 taps, t = (n - 12) / 3 symbol periods, h(t) the square-root raised
//   cosine with rolloff 0.2, normalised to unit energy (sum of h^2 = 1) and
//   rounded to round(512 * h). Span +-4 symbols.
// COMP_COEF: 5 taps in units of 1/256. They are the least-squares fit, over the
//   band |f| <= 0.2 Fs that the baseband signal occupies, of
//   H_interp(f, mu=0.25) * H_comp(f) = exp(-j 2 pi f (1.25 + 2)),
//   i.e. the cascade of interpolator and compensation filter is a pure delay
//   (all-pass) at mu = 0.25, the main tap being tap 2.
package stadj_pkg;

  localparam int W      = 10;  // sample / internal filter wordlength
  localparam int MU_W   = 10;  // fractional delay wordlength (unsigned)
  localparam int K      = 3;   // symbol oversampling ratio Fs / Fsym

  typedef logic signed [W-1:0] sample_t;

  // complex baseband sample
  typedef struct packed {
    sample_t i;
    sample_t q;
  } iq_t;

  // data (matched) filter
  localparam int SRRC_TAPS = 25;
  localparam int SRRC_CW   = 10;
  localparam int SRRC_CF   = 9;   // coefficient fraction bits
  localparam logic signed [SRRC_CW-1:0] SRRC_COEF [SRRC_TAPS] = '{
    10'sd8,   -10'sd4,  -10'sd16, -10'sd11,  10'sd13,  10'sd31,  10'sd14,
   -10'sd34,  -10'sd62, -10'sd16,  10'sd111, 10'sd251, 10'sd312, 10'sd251,
    10'sd111, -10'sd16, -10'sd62, -10'sd34,  10'sd14,  10'sd31,  10'sd13,
   -10'sd11,  -10'sd16, -10'sd4,   10'sd8
  };

  // compensation filter
  localparam int COMP_TAPS = 5;
  localparam int COMP_CW   = 10;
  localparam int COMP_CF   = 8;
  localparam int COMP_MAIN = 2;   // index of the main tap
  localparam logic signed [COMP_CW-1:0] COMP_COEF [COMP_TAPS] = '{
    10'sd9, -10'sd20, 10'sd265, 10'sd7, -10'sd6
  };

  // QAM-16 decision levels at the decimator output: +-LEVEL_A, +-3*LEVEL_A
  localparam int LEVEL_A = 92;

  // saturate a wide signed value to a W-bit sample
  function automatic sample_t sat_w(input longint v);
    longint hi, lo;
    hi = (longint'(1) <<< (W - 1)) - 1;
    lo = -(longint'(1) <<< (W - 1));
    if (v > hi)      return sample_t'(hi);
    else if (v < lo) return sample_t'(lo);
    else             return sample_t'(v);
  endfunction

endpackage
