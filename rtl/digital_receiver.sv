// digital_receiver: 8-PAM digital receiver for one channel out of a 200 kHz band at 75 MHz.
//
// Signal path (one clock = one ADC sample at 300 MHz):
//   ADC (12 bit) -> mixer with the 74.9 MHz first LO (one-period table)      : band to 0..200 kHz
//   -> LPF1, 272-tap parallel FIR at 300 MHz                                  : removes the ~150 MHz sum term
//   -> keep 1 sample in 375                                                   : 800 kHz
//   -> LPF2, 82-tap FIR on a time-shared MAC                                  : limits to 200 kHz
//   -> channel band-pass from a table of 20 filters, picked by the switches   : one channel
//   -> mixer with the second LO at the channel frequency                      : channel to 0 Hz
//   -> average over each symbol and round to the nearest 8-PAM level          : 3 bits per symbol
//   -> bit stream, MSB first
// The selected channel is shown on two seven-segment digits.
//
// Interface: `adc_valid` qualifies `adc_data`; the sample taken in the first valid cycle
// after reset is sample 0, and the ADC is expected to deliver one sample per clock (the
// 800 kHz stages assume 375 clocks per decimated sample). `sw_channel` is the binary
// channel number and `sw_spacing` the channel plan. Outputs are the decided symbols
// (`sym_valid`, `sym_bits`, `sym_level`), the same bits as a serial stream for the audio
// DAC, and the display segments.
//
// Timing: a symbol decision appears one clock after the last 800 kHz sample of its window;
// the path delay from the ADC to the band-pass output is delay_q8()/256 samples at 800 kHz
// (about 161 for 25 kHz channels, 225 for 8.33 kHz channels), and the symbol windows are
// placed to match it. SPS is the symbol length in 800 kHz samples, LEVEL_UNIT the value of
// one amplitude unit at the demodulator: the default assumes symbol amplitudes of 128 ADC
// codes per unit (+-7 -> +-896 codes) at the ADC.
module digital_receiver
  import rx_pkg::*;
#(
  parameter int SPS        = 50,
  parameter int LEVEL_UNIT = 512
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       adc_valid,
  input  adc_t       adc_data,
  input  logic [3:0] sw_channel,
  input  logic       sw_spacing,
  output logic       chan_valid,
  output logic       sym_valid,
  output logic [2:0] sym_bits,
  output logic signed [3:0] sym_level,
  output logic       bit_valid,
  output logic       bit_out,
  output logic [6:0] hex_tens,
  output logic [6:0] hex_units
);
  // ---------------------------------------------------------------- channel settings
  logic [$clog2(BPF_BANK_DEPTH)-1:0]   coef_base;
  logic [$clog2(BPF8_TAPS+1)-1:0]      ntaps;
  logic [5:0]                          lo2_step;
  logic [$clog2(LO2_LEN)+LO2_FRAC-1:0] lo2_phase;
  logic [$clog2(SPS)-1:0]              sym_offset;

  channel_decoder #(.SPS(SPS)) u_chdec (
    .clk, .rst, .sw_channel,
    .spacing    (spacing_e'(sw_spacing)),
    .chan_valid (chan_valid),
    .coef_base, .ntaps,
    .lo_step    (lo2_step),
    .lo_phase   (lo2_phase),
    .sym_offset
  );

  seg7_display u_disp (
    .clk, .rst,
    .channel   (sw_channel),
    .valid     (chan_valid),
    .hex_tens, .hex_units
  );

  // ---------------------------------------------------------------- 300 MHz front end
  lo_t     lo1;
  logic    mix1_valid, lpf1_valid, dec_valid;
  sample_t mix1_y, lpf1_y, dec_y;

  lo_dds #(.LEN(LO1_LEN), .CYCLES(LO1_CYCLES), .FRAC(0), .STEP_W(1)) u_lo1 (
    .clk, .rst,
    .advance    (adc_valid),
    .step       (1'b1),
    .phase_init ('0),
    .lo         (lo1)
  );

  mixer #(.IN_W(ADC_W)) u_mix1 (
    .clk, .rst,
    .in_valid  (adc_valid),
    .x         (adc_data),
    .lo        (lo1),
    .out_valid (mix1_valid),
    .y         (mix1_y)
  );

  fir_direct u_lpf1 (
    .clk, .rst,
    .in_valid  (mix1_valid),
    .x         (mix1_y),
    .out_valid (lpf1_valid),
    .y         (lpf1_y)
  );

  decimator #(.RATIO(DECIM)) u_dec (
    .clk, .rst,
    .in_valid  (lpf1_valid),
    .x         (lpf1_y),
    .out_valid (dec_valid),
    .y         (dec_y)
  );

  // ---------------------------------------------------------------- 800 kHz channel path
  logic    lpf2_valid, bpf_valid, mix2_valid;
  logic    lpf2_ready, bpf_ready;
  sample_t lpf2_y, bpf_y, mix2_y;
  lo_t     lo2;

  lowpass_mac u_lpf2 (
    .clk, .rst,
    .in_valid  (dec_valid),
    .x         (dec_y),
    .ready     (lpf2_ready),
    .out_valid (lpf2_valid),
    .y         (lpf2_y)
  );

  channel_filter u_bpf (
    .clk, .rst,
    .coef_base, .ntaps,
    .in_valid  (lpf2_valid),
    .x         (lpf2_y),
    .ready     (bpf_ready),
    .out_valid (bpf_valid),
    .y         (bpf_y)
  );

  // Both MAC filters finish a sample within the 375 clocks before the next one (84 and at
  // most 371 clocks), so neither is ever busy when a sample arrives.
  a_lpf2_keeps_up: assert property (@(posedge clk) disable iff (rst) dec_valid |-> lpf2_ready);
  a_bpf_keeps_up:  assert property (@(posedge clk) disable iff (rst) lpf2_valid |-> bpf_ready);

  lo_dds #(.LEN(LO2_LEN), .CYCLES(1), .FRAC(LO2_FRAC), .STEP_W(6)) u_lo2 (
    .clk, .rst,
    .advance    (bpf_valid),
    .step       (lo2_step),
    .phase_init (lo2_phase),
    .lo         (lo2)
  );

  mixer #(.IN_W(DATA_W)) u_mix2 (
    .clk, .rst,
    .in_valid  (bpf_valid),
    .x         (bpf_y),
    .lo        (lo2),
    .out_valid (mix2_valid),
    .y         (mix2_y)
  );

  // ---------------------------------------------------------------- symbols and bits
  pam8_demod #(.SPS(SPS), .LEVEL_UNIT(LEVEL_UNIT)) u_demod (
    .clk, .rst,
    .enable    (chan_valid),
    .sym_offset,
    .in_valid  (mix2_valid),
    .x         (mix2_y),
    .sym_valid, .sym_bits, .sym_level
  );

  bit_serializer u_ser (
    .clk, .rst,
    .sym_valid, .sym_bits,
    .bit_valid, .bit_out
  );

endmodule
