// msfb_pkg: constants and elaboration-time helper functions shared by the
// multistage filter-bank channelizer.
//
// The numeric constants are the dual-mode GSM/W-CDMA configuration: an
// 80 Msps ADC, a 16-channel front-end filter bank decimating by 2 with a
// 144-tap prototype, a 32-channel back-end filter bank decimating by 8 with a
// 256-tap prototype, a 4/25 rate changer into the back-end (GSM) and a
// 12/125 rate changer with upsampling by 4 for W-CDMA.
//
// The functions run only during elaboration. They design the prototype
// low-pass filters (Kaiser-windowed ideal low-pass whose transition band is
// placed exactly between the configured passband and stopband edges; a
// window design of the given length reaches about 70 dB (front end) and
// 65 dB (back end) of stopband attenuation), recode
// coefficients into canonical signed digits, and reduce fractions.
package msfb_pkg;

  // ---------------------------------------------------------------- config
  localparam int ADC_W         = 16;   // ADC sample width (design choice)
  localparam int CH_W          = 18;   // complex sample width after the front end
  localparam int COEF_W        = 16;   // prototype coefficient word (16-bit CSD)

  localparam int FE_K          = 16;   // front-end channels
  localparam int FE_M          = 2;    // front-end decimation (T = 8)
  localparam int FE_N          = 144;  // front-end prototype length
  localparam int FE_D_PERMIL   = 40;   // overlap factor d = 0.04, in 1/1000

  localparam int BE_K          = 32;   // back-end channels
  localparam int BE_M          = 8;    // back-end decimation (T = 4)
  localparam int BE_N          = 256;  // back-end prototype length
  localparam int BE_D_PERMIL   = 0;    // no overlap in the back end

  localparam int GSM_SRC_NUM   = 4;    // GSM conversion ratio 4/25
  localparam int GSM_SRC_DEN   = 25;
  localparam int GSM_SRC_L     = 1;    // number of subfilters U
  localparam int WCDMA_SRC_NUM = 12;   // W-CDMA conversion ratio 12/125
  localparam int WCDMA_SRC_DEN = 125;
  localparam int WCDMA_SRC_L   = 4;

  localparam real PI = 3.14159265358979323846;


  // ------------------------------------------------------------- functions
  function automatic real bessel_i0(real x);
    real s = 1.0;
    real t = 1.0;
    for (int k = 1; k < 50; k++) begin
      t = t * (x / (2.0 * k)) * (x / (2.0 * k));
      s += t;
    end
    return s;
  endfunction

  // Kaiser window value at tap n of an N-tap window.
  function automatic real kaiser(int n, int N, real beta);
    real a;
    if (N <= 1) return 1.0;
    a = (2.0 * n) / (N - 1) - 1.0;
    return bessel_i0(beta * $sqrt(1.0 - a * a)) / bessel_i0(beta);
  endfunction

  // Kaiser beta that fits the transition band of an N-tap prototype for a
  // K-channel bank: passband edge (1+d)*pi/K, stopband edge 2*pi/K. Uses
  // Kaiser's length formula A = 2.285*(N-1)*dw + 8 to find the attenuation
  // the window reaches and his beta formula for that attenuation.
  function automatic real kaiser_beta(int N, int K, int d_permil);
    real dw = (1.0 - d_permil / 1000.0) * PI / K;
    real a  = 2.285 * (N - 1) * dw + 8.0;
    if (a > 50.0) return 0.1102 * (a - 8.7);
    return 0.5842 * ((a - 21.0) ** 0.4) + 0.07886 * (a - 21.0);
  endfunction

  // Ideal low-pass impulse response (cutoff wc rad/sample, unity DC gain)
  // at tap n of an N-tap linear-phase filter.
  function automatic real ideal_lp(int n, int N, real wc);
    real t = n - (N - 1) / 2.0;
    if (t == 0.0) return wc / PI;
    return $sin(wc * t) / (PI * t);
  endfunction

  // Canonical signed digit recoding of an integer: bit i of pos / neg is set
  // when digit i is +1 / -1. No two adjacent digits are non-zero.
  function automatic logic [63:0] csd_pos(longint c);
    logic [63:0] m = '0;
    longint x = c;
    for (int i = 0; i < 64; i++) begin
      if (x % 2 != 0) begin
        if (((x % 4) + 4) % 4 == 1) begin m[i] = 1'b1; x = x - 1; end
        else x = x + 1;
      end
      x = x / 2;
    end
    return m;
  endfunction

  function automatic logic [63:0] csd_neg(longint c);
    logic [63:0] m = '0;
    longint x = c;
    for (int i = 0; i < 64; i++) begin
      if (x % 2 != 0) begin
        if (((x % 4) + 4) % 4 == 1) x = x - 1;
        else begin m[i] = 1'b1; x = x + 1; end
      end
      x = x / 2;
    end
    return m;
  endfunction

  function automatic int csd_weight(longint c);
    logic [63:0] p = csd_pos(c);
    logic [63:0] n = csd_neg(c);
    return $countones(p) + $countones(n);
  endfunction

  function automatic int gcd(int a, int b);
    int x = a;
    int y = b;
    while (y != 0) begin
      int t = x % y;
      x = y;
      y = t;
    end
    return x;
  endfunction

  // Quantise a real value to an integer, rounding to nearest.
  function automatic longint qround(real v);
    return longint'($floor(v + 0.5));
  endfunction

endpackage
