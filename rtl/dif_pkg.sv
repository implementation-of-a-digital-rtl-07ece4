// dif_pkg: types, constants and coefficient tables shared by the digital IF
// transceiver.
//
// The transceiver runs at a single 64 MHz sample clock. Three WiMAX bandwidth
// profiles are supported (7, 3.5 and 1.75 MHz). Each profile's baseband runs at
// twice the fundamental frequency of the OFDM system (16, 8 and 4 MHz), so the
// filters interpolate or decimate by 4, 8 and 16.
//
// All filters are 129-tap raised-cosine filters with roll-off 0.115 and 16-bit
// coefficients. The tap values are not given as numbers. They are computed here
// at elaboration time from the raised-cosine impulse response:
//
//   t    = 2 * fc / fs * n                        n = -64 .. 64
//   h(n) = sinc(t) * cos(pi*beta*t) / (1 - (2*beta*t)^2)
//   c(n) = round(32768 * L * h(n) / sum_n h(n))      (Q1.15)
//
// The scaling makes the taps sum to L, which gives the zero-stuffed
// interpolator (and, divided by L, the decimator) a DC gain of exactly one
// despite the truncation to 129 taps. Three coefficient sets exist:
//   * 7 MHz profile:     x4 at 64 MHz, fc = 3.5 MHz
//   * 3.5 MHz profile:   x8 at 64 MHz, fc = 2 MHz (also the second stage of the
//                        1.75 MHz profile)
//   * 1.75 MHz profile:  first stage x2 at 8 MHz, fc = 1.2 MHz
// The NCO sine table (1024 points, amplitude 32767) is computed the same way.
package dif_pkg;

  // Bandwidth profiles (register encoding is this design's choice).
  typedef enum logic [1:0] {
    PROF_7M   = 2'd0,
    PROF_3M5  = 2'd1,
    PROF_1M75 = 2'd2
  } profile_t;

  localparam int unsigned TAPS    = 129;
  localparam int unsigned COEF_W  = 16;
  localparam int unsigned COEF_FRAC = 15;
  localparam real         ROLLOFF = 0.115;

  // NCO
  localparam int unsigned PHASE_W = 32;
  localparam int unsigned LUT_AW  = 10;
  localparam int unsigned AMP_W   = 16;

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef coef_t coef_set_t [TAPS];
  typedef logic signed [AMP_W-1:0] amp_t;
  typedef amp_t sin_lut_t [2**LUT_AW];

  localparam real PI = 3.14159265358979323846;

  // Raised-cosine impulse response at sample n for normalised cutoff fcn = fc/fs.
  function automatic real rc_impulse(input int n, input real fcn, input real beta);
    real t, s, d;
    t = 2.0 * fcn * real'(n);
    if (n == 0) s = 1.0;
    else        s = $sin(PI * t) / (PI * t);
    d = 1.0 - (2.0 * beta * t) * (2.0 * beta * t);
    // Removable singularity at t = +-1/(2*beta): limit is sinc(t) * pi/4.
    if (d < 1.0e-9 && d > -1.0e-9) return s * PI / 4.0;
    return s * $cos(PI * beta * t) / d;
  endfunction

  function automatic int round_real(input real x);
    return (x >= 0.0) ? $rtoi(x + 0.5) : -$rtoi(-x + 0.5);
  endfunction

  // Quantised coefficient set for an interpolation factor l, cutoff fc and
  // sample rate fs (both in MHz).
  function automatic coef_set_t rc_coefs(input int l, input real fc, input real fs);
    coef_set_t c;
    real gain, total;
    total = 0.0;
    for (int k = 0; k < TAPS; k++) total += rc_impulse(k - (TAPS - 1) / 2, fc / fs, ROLLOFF);
    gain = real'(l) / total;
    for (int k = 0; k < TAPS; k++) begin
      c[k] = coef_t'(round_real(gain * rc_impulse(k - (TAPS - 1) / 2, fc / fs, ROLLOFF)
                                * real'(2 ** COEF_FRAC)));
    end
    return c;
  endfunction

  localparam coef_set_t COEF_7M   = rc_coefs(4, 3.5, 64.0);
  localparam coef_set_t COEF_3M5  = rc_coefs(8, 2.0, 64.0);
  localparam coef_set_t COEF_1M75 = rc_coefs(2, 1.2, 8.0);

  // Full-wave sine table, amplitude 2^15-1.
  function automatic sin_lut_t make_sin_lut();
    sin_lut_t t;
    for (int k = 0; k < 2 ** LUT_AW; k++)
      t[k] = amp_t'(round_real(32767.0 * $sin(2.0 * PI * real'(k) / real'(2 ** LUT_AW))));
    return t;
  endfunction

  localparam sin_lut_t SIN_LUT = make_sin_lut();

  localparam logic [PHASE_W-1:0] FTW_12M = 32'h3000_0000;   // 12/64 * 2^32
  localparam logic [PHASE_W-1:0] FTW_20M = 32'h5000_0000;   // 20/64 * 2^32

  // Interpolation / decimation factor of a profile.
  function automatic int unsigned rate_of(input profile_t p);
    case (p)
      PROF_7M:   return 4;
      PROF_3M5:  return 8;
      default:   return 16;
    endcase
  endfunction

  // Saturate a wide signed value to w bits (w <= 32).
  function automatic logic signed [31:0] sat(input logic signed [63:0] x, input int unsigned w);
    logic signed [63:0] hi, lo;
    hi = (64'sd1 <<< (w - 1)) - 64'sd1;
    lo = -(64'sd1 <<< (w - 1));
    if (x > hi) return 32'(hi);
    if (x < lo) return 32'(lo);
    return 32'(x);
  endfunction

endpackage
