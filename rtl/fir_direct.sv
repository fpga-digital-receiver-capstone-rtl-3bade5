// fir_direct: fully parallel direct-form FIR low-pass filter (LPF1).
//
// A delay line holds the last NTAPS samples x(n) .. x(n-NTAPS+1); every valid sample shifts
// it by one and the filter forms y(n) = sum_k h(k) * x(n-k) with one multiplier per tap, so
// it accepts a new sample on every clock. This is the tapped-delay-line structure of the
// receiver's FIR schematic: delays across the top, a tap weight on each, and an adder chain.
// Here the adder chain is written as one sum; a synthesis tool may balance it.
//
// Coefficients: a Kaiser-windowed sinc with cutoff FC (fraction of the sample rate) and shape
// BETA, scaled to unity gain at DC and rounded to Q1.17. The defaults give the 272-tap
// (order 271) front-end low-pass that runs at the 300 MHz ADC rate and removes the sum term
// near 150 MHz after the first mixer: pass band to 600 kHz, stop band from 5 MHz, 90 dB.
// The window method, order, band edges and attenuation follow the receiver's design; the tap
// values are computed from the formula because no table of them is given, and are
// therefore this design's own.
//
// Timing: `out_valid`/`y` follow the `in_valid` that shifted in x(n) by two clocks. The
// delay line resets to zero. Group delay is (NTAPS-1)/2 samples.
module fir_direct
  import rx_pkg::*;
#(
  parameter int  NTAPS = LPF1_TAPS,
  parameter real FC    = LPF1_FC,
  parameter real BETA  = BETA_90DB
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    in_valid,
  input  sample_t x,
  output logic    out_valid,
  output sample_t y
);
  coef_t   h[NTAPS];
  sample_t dl[NTAPS];

  initial begin
    real t[NTAPS];
    real sum;
    sum = 0.0;
    for (int k = 0; k < NTAPS; k++) begin
      t[k] = kaiser_lp_tap(k, NTAPS, FC, BETA);
      sum  = sum + t[k];
    end
    for (int k = 0; k < NTAPS; k++) h[k] = quantize_coef(t[k] / sum);
  end

  // dl[0] is the newest sample, so the output uses the delay line after the shift.
  logic signed [63:0] acc;
  always_comb begin
    acc = 64'sd0;
    for (int k = 0; k < NTAPS; k++) acc += 64'(h[k] * dl[k]);
  end

  logic shifted;
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NTAPS; k++) dl[k] <= '0;
      shifted   <= 1'b0;
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      shifted <= in_valid;
      if (in_valid) begin
        dl[0] <= x;
        for (int k = 1; k < NTAPS; k++) dl[k] <= dl[k-1];
      end
      out_valid <= shifted;
      if (shifted) y <= saturate((acc + (64'sd1 <<< (COEF_W - 2))) >>> (COEF_W - 1));
    end
  end

endmodule
