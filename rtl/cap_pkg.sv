// cap_pkg: constants, types and constant tables shared by the 2D CAP
// transmitter.
//
// The transmitter turns a pseudo-random bit stream into 4-bit symbol
// indices, maps each index onto a 16-point square constellation (a_k, b_k),
// and then produces the transmit signal in two ways: with a pair of
// orthogonal shaping filters (the classic carrierless amplitude/phase
// modulator) and with an 8-point inverse FFT built around a single radix-2
// butterfly whose twiddle factors are applied by a CORDIC rotator.
//
// Taken from the source description: the four transmitter functions
// (random generator, constellation mapper, modulation, IFFT), the 16-point
// constellation with levels +-1/+-3 and its bit assignment, 8-bit symbol
// words, 3 IFFT stages (so 8 points), one butterfly, four RAMs and CORDIC.
// This design's own choices: the PRBS polynomial, 16-bit IFFT samples,
// 4 samples per symbol, the 16-tap shaping filters, the 12-bit coefficients
// and the number of CORDIC iterations.
//
// The constant tables (shaping filters, CORDIC arctangents and gain) are
// computed at elaboration from their formulas, so no numbers are pasted in.
package cap_pkg;

  // ---------------------------------------------------------------- symbols
  localparam int BITS_PER_SYM = 4;   // 16-point constellation: 4 bits/symbol
  localparam int SYM_W        = 8;   // width of a_k and b_k words

  typedef logic [BITS_PER_SYM-1:0] sym_idx_t;

  // One constellation point: in-phase a_k and quadrature b_k.
  typedef struct packed {
    logic signed [SYM_W-1:0] a;
    logic signed [SYM_W-1:0] b;
  } sym_t;

  // ---------------------------------------------------------------- shaping
  localparam int SPS        = 4;               // samples per symbol
  localparam int SPAN       = 4;               // filter span in symbols
  localparam int SHAPE_TAPS = SPS * SPAN;      // 16 taps
  localparam int COEF_W     = 12;              // signed coefficient width
  localparam int SHAPE_OUT_W = SYM_W + COEF_W + $clog2(2 * SPAN);  // exact sum

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef coef_t coef_tab_t [SHAPE_TAPS];

  localparam real PI = 3.141592653589793;

  // In-phase (quad = 0) or quadrature (quad = 1) shaping filter:
  //   f[n] = round((2^(COEF_W-1)-1) * w(n) * cos|sin(2*pi*fc*t)),
  //   t = n - (SHAPE_TAPS-1)/2, w(n) = sin^2(pi*(n+0.5)/SHAPE_TAPS), fc = 1/SPS.
  // The cosine filter is even and the sine filter odd about the centre,
  // so the two impulse responses are orthogonal (a Hilbert pair).
  function automatic coef_tab_t shape_table(bit quad);
    coef_tab_t r;
    real t, w, c;
    for (int n = 0; n < SHAPE_TAPS; n++) begin
      t = real'(n) - real'(SHAPE_TAPS - 1) / 2.0;
      w = $sin(PI * (real'(n) + 0.5) / real'(SHAPE_TAPS));
      w = w * w;
      c = quad ? $sin(2.0 * PI * t / real'(SPS)) : $cos(2.0 * PI * t / real'(SPS));
      r[n] = coef_t'($rtoi(w * c * real'((1 << (COEF_W - 1)) - 1) +
                           ((w * c >= 0.0) ? 0.5 : -0.5)));
    end
    return r;
  endfunction

  localparam coef_tab_t SHAPE_I = shape_table(1'b0);
  localparam coef_tab_t SHAPE_Q = shape_table(1'b1);

  // ---------------------------------------------------------------- IFFT
  localparam int N_FFT  = 8;                 // 3 radix-2 stages
  localparam int DATA_W = 16;                // real and imaginary sample width
  localparam int ANG_W  = 16;                // binary angle: 2^ANG_W = full turn
  localparam int CORDIC_ITER = 18;

endpackage
