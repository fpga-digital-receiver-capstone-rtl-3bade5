// channel_decoder: turns the channel switches into the settings of the channel path.
//
// Four switches give the channel number in binary (off,on,on,off selects channel 6) and a
// fifth picks the channel plan: 25 kHz spacing (channels 1..8 at 25..200 kHz) or 8.33 kHz
// spacing (channels 1..12 at 8.33..100 kHz). Channel 0, or a number beyond the plan, selects
// nothing and clears `chan_valid`.
//
// For a valid channel the decoder gives
//   coef_base  - start of that channel's band-pass filter in the coefficient table
//   ntaps      - its length, 242 or 369 taps
//   lo_step    - second-LO step through the 96-entry table (8.333 kHz per step)
//   lo_phase   - second-LO phase offset in 1/256 entries, -lo_step*D mod 96, where D is the
//                group delay from the ADC to the band-pass output; it lines the oscillator up
//                with the carrier phase that the filters have delayed
//   sym_offset - round(D) mod SPS, the 800 kHz sample count at which symbol windows start
//
// Timing: all outputs are registered, one clock after the switches; reset clears
// `chan_valid`. The binary switch code and the two plans follow the receiver's description;
// the plan switch, the bank layout and the delay compensation are this design's own.
module channel_decoder
  import rx_pkg::*;
#(
  parameter int SPS = 50
) (
  input  logic                               clk,
  input  logic                               rst,
  input  logic [3:0]                         sw_channel,
  input  spacing_e                           spacing,
  output logic                               chan_valid,
  output logic [$clog2(BPF_BANK_DEPTH)-1:0]  coef_base,
  output logic [$clog2(BPF8_TAPS+1)-1:0]     ntaps,
  output logic [5:0]                         lo_step,
  output logic [$clog2(LO2_LEN)+LO2_FRAC-1:0] lo_phase,
  output logic [$clog2(SPS)-1:0]             sym_offset
);
  localparam int MODQ = LO2_LEN << LO2_FRAC;

  int k, nch, step, d;
  logic [$clog2(BPF_BANK_DEPTH)-1:0] base;
  logic [$clog2(BPF8_TAPS+1)-1:0]    taps;

  always_comb begin
    k    = int'(sw_channel);
    nch  = (spacing == SPACING_8K33) ? N_CH8 : N_CH25;
    step = (spacing == SPACING_8K33) ? k : 3 * k;
    taps = (spacing == SPACING_8K33) ? $bits(taps)'(BPF8_TAPS) : $bits(taps)'(BPF25_TAPS);
    d    = delay_q8(spacing);
    base = $bits(base)'((spacing == SPACING_8K33) ? N_CH25 * BPF25_TAPS + (k - 1) * BPF8_TAPS
                                                  : (k - 1) * BPF25_TAPS);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      chan_valid <= 1'b0;
      coef_base  <= '0;
      ntaps      <= '0;
      lo_step    <= '0;
      lo_phase   <= '0;
      sym_offset <= '0;
    end else begin
      chan_valid <= (k >= 1) && (k <= nch);
      coef_base  <= (k >= 1 && k <= nch) ? base : '0;
      ntaps      <= taps;
      lo_step    <= 6'(step);
      lo_phase   <= $bits(lo_phase)'((MODQ - ((step * d) % MODQ)) % MODQ);
      sym_offset <= $bits(sym_offset)'(((d + 128) >> 8) % SPS);
    end
  end

endmodule
