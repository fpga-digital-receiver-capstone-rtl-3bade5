// lowpass_mac: 800 kHz low-pass filter (LPF2) on the time-shared FIR engine.
//
// After decimation to 800 kHz this filter limits the signal to the 200 kHz receive band:
// order 81 (82 taps), pass band to 200 kHz, stop band from 250 kHz, 90 dB, Kaiser window.
// Its taps live in an on-chip table read one per clock by a fir_mac engine.
// The length, band edges, attenuation and window method follow the receiver's design; the
// tap values come from the Kaiser-windowed sinc formula (cutoff midway between the band
// edges, beta from the attenuation) scaled to unity DC gain, which is this design's own.
//
// Interface and timing are those of fir_mac with ntaps fixed at NTAPS: y(n) follows x(n) by
// NTAPS + 2 clocks; samples must be at least NTAPS + 2 clocks apart. Group delay is
// (NTAPS-1)/2 samples.
module lowpass_mac
  import rx_pkg::*;
#(
  parameter int  NTAPS = LPF2_TAPS,
  parameter real FC    = LPF2_FC,
  parameter real BETA  = BETA_90DB
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    in_valid,
  input  sample_t x,
  output logic    ready,
  output logic    out_valid,
  output sample_t y
);
  localparam int AW = $clog2(NTAPS);

  coef_t rom[NTAPS];
  initial begin
    real t[NTAPS];
    real sum;
    sum = 0.0;
    for (int k = 0; k < NTAPS; k++) begin
      t[k] = kaiser_lp_tap(k, NTAPS, FC, BETA);
      sum  = sum + t[k];
    end
    for (int k = 0; k < NTAPS; k++) rom[k] = quantize_coef(t[k] / sum);
  end

  logic [AW-1:0] coef_addr;
  coef_t         coef;

  always_ff @(posedge clk) coef <= rom[coef_addr];

  fir_mac #(.N_MAX(NTAPS)) u_mac (
    .clk, .rst,
    .ntaps     ($clog2(NTAPS+1)'(NTAPS)),
    .in_valid, .x, .ready,
    .coef_addr (coef_addr),
    .coef      (coef),
    .out_valid, .y
  );

endmodule
