// rx_pkg: sizes, types and coefficient formulas shared by the 8-PAM digital receiver.
//
// The receiver samples a 75 MHz IF signal at 300 MHz, mixes it with a 74.9 MHz local
// oscillator so that the 200 kHz receive band lands on 0..200 kHz, low-pass filters and
// decimates by 375 to 800 kHz, selects one channel with a band-pass FIR, mixes that channel
// to 0 Hz and decides 8-PAM symbols by averaging over one symbol period.
//
// Rates, filter lengths, band edges, attenuations, channel plans and the 8-PAM bit mapping
// follow the receiver's specification. Word widths, the fixed-point formats and the use of
// Kaiser-windowed sinc taps for every filter (computed here from closed-form formulas) are
// this design's own choices.
package rx_pkg;

  // ---------------------------------------------------------------- rates and sizes
  localparam int ADC_W      = 12;            // ADC sample width
  localparam int DATA_W     = 18;            // internal sample width
  localparam int COEF_W     = 18;            // FIR coefficient width, Q1.17
  localparam int LO_W       = 12;            // local oscillator sample width, Q1.11
  localparam int MIX_GAIN   = 2;             // each mixer scales its product up by 2**MIX_GAIN
  localparam int DECIM      = 375;           // 300 MHz / 800 kHz

  localparam int LPF1_TAPS  = 272;           // order 271, runs at 300 MHz
  localparam int LPF2_TAPS  = 82;            // order 81, runs at 800 kHz
  localparam int BPF25_TAPS = 242;           // 25 kHz channel spacing
  localparam int BPF8_TAPS  = 369;           // 8.33 kHz channel spacing
  localparam int N_CH25     = 8;             // 25, 50 .. 200 kHz
  localparam int N_CH8      = 12;            // 8.33, 16.67 .. 100 kHz
  localparam int BPF_BANK_DEPTH = N_CH25 * BPF25_TAPS + N_CH8 * BPF8_TAPS;

  // First local oscillator: 74.9 MHz sampled at 300 MHz repeats after 3000 samples (749 cycles).
  localparam int LO1_LEN    = 3000;
  localparam int LO1_CYCLES = 749;
  // Second local oscillator: one cycle of 8.333 kHz at 800 kHz is 96 samples; channel k of the
  // 8.33 kHz plan steps the table by k, channel k of the 25 kHz plan by 3k.
  localparam int LO2_LEN    = 96;
  localparam int LO2_FRAC   = 8;             // fractional phase bits of the second LO

  // Normalised filter corners (cutoff / sample rate) and Kaiser shape factors.
  // beta = 0.1102 * (A - 8.7) for A = 90 dB and A = 65 dB.
  localparam real LPF1_FC   = 2.8e6 / 300.0e6;   // midway between 600 kHz and 5 MHz
  localparam real LPF2_FC   = 225.0e3 / 800.0e3; // midway between 200 kHz and 250 kHz
  localparam real BPF25_FC  = 13.5e3 / 800.0e3;  // half-width midway between 10 and 17 kHz
  localparam real BPF8_FC   = 5.075e3 / 800.0e3; // half-width midway between 2.78 and 7.37 kHz
  localparam real BETA_90DB = 8.959;
  localparam real BETA_65DB = 6.204;

  localparam real PI = 3.14159265358979323846;

  typedef enum logic {SPACING_25K = 1'b0, SPACING_8K33 = 1'b1} spacing_e;

  typedef logic signed [ADC_W-1:0]  adc_t;
  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [LO_W-1:0]   lo_t;

  // ---------------------------------------------------------------- coefficient formulas
  // Modified Bessel function of the first kind, order 0, by its power series.
  function automatic real bessel_i0(real x);
    real term, sum, q;
    sum  = 1.0;
    term = 1.0;
    q    = x / 2.0;
    for (int k = 1; k < 40; k++) begin
      term = term * (q / k) * (q / k);
      sum  = sum + term;
    end
    return sum;
  endfunction

  // Tap n of an ntaps-long Kaiser-windowed ideal low-pass with cutoff fc (fraction of the
  // sample rate), centred on (ntaps-1)/2 so the filter is causal with linear phase.
  function automatic real kaiser_lp_tap(int n, int ntaps, real fc, real beta);
    real m, t, r, sinc_v, win;
    m = (ntaps - 1) / 2.0;
    t = n - m;
    if (t == 0.0) sinc_v = 2.0 * fc;
    else          sinc_v = $sin(2.0 * PI * fc * t) / (PI * t);
    r   = t / m;
    win = bessel_i0(beta * $sqrt(1.0 - r * r)) / bessel_i0(beta);
    return sinc_v * win;
  endfunction

  // Round a real coefficient to Q1.17 with saturation.
  function automatic coef_t quantize_coef(real h);
    real s;
    s = h * real'(1 << (COEF_W - 1));
    if (s >  real'((1 << (COEF_W - 1)) - 1)) return coef_t'((1 << (COEF_W - 1)) - 1);
    if (s < -real'(1 << (COEF_W - 1)))       return coef_t'(-(1 << (COEF_W - 1)));
    return coef_t'($rtoi(s < 0.0 ? s - 0.5 : s + 0.5));
  endfunction

  // Clip a wide signed value to the internal sample width.
  function automatic sample_t saturate(logic signed [63:0] v);
    if (v > 64'sd131071)  return sample_t'(18'sh1FFFF);
    if (v < -64'sd131072) return sample_t'(18'sh20000);
    return sample_t'(v);
  endfunction

  // ---------------------------------------------------------------- group delay
  // Delay from ADC input to the channel-filter output, in 800 kHz samples scaled by 2**8:
  // LPF1 (in 300 MHz samples, divided by the decimation), LPF2 and the selected band-pass.
  function automatic int delay_q8(spacing_e sp);
    int d;
    d = ((LPF1_TAPS - 1) * 128 + DECIM / 2) / DECIM + (LPF2_TAPS - 1) * 128;
    d = d + ((sp == SPACING_8K33) ? (BPF8_TAPS - 1) : (BPF25_TAPS - 1)) * 128;
    return d;
  endfunction

  // ---------------------------------------------------------------- 8-PAM mapping
  // Bit block b (0..7) is sent as amplitude 2b - 7: 000 -> -7, 001 -> -5 ... 111 -> +7.
  function automatic int pam8_level(logic [2:0] bits);
    return 2 * int'(bits) - 7;
  endfunction

  // ---------------------------------------------------------------- display
  // Seven-segment pattern for a decimal digit, segments {g,f,e,d,c,b,a}, active low as on
  // common-anode displays.
  function automatic logic [6:0] seg7_digit(logic [3:0] d);
    case (d)
      4'd0: return 7'b1000000;
      4'd1: return 7'b1111001;
      4'd2: return 7'b0100100;
      4'd3: return 7'b0110000;
      4'd4: return 7'b0011001;
      4'd5: return 7'b0010010;
      4'd6: return 7'b0000010;
      4'd7: return 7'b1111000;
      4'd8: return 7'b0000000;
      4'd9: return 7'b0010000;
      default: return 7'b0111111;   // a dash
    endcase
  endfunction

endpackage
