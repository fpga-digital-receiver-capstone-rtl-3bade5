// pam8_demod: symbol sampler and 8-PAM decision.
//
// Input is the channel signal after it has been mixed down to 0 Hz, at 800 kHz. Each
// symbol lasts SPS samples. The block adds up the SPS samples of one symbol (an
// integrate-and-dump average, which also suppresses the mixer's 2*fc term), then rounds
// the average to the nearest 8-PAM level -7, -5 .. +7 by comparing the sum with the seven
// decision thresholds (2j - 6) * LEVEL_UNIT * SPS, j = 0..6. LEVEL_UNIT is the value one
// amplitude unit has at the input. The level is mapped back to its bit block:
// -7 -> 000, -5 -> 001 ... +7 -> 111.
//
// Symbol windows start at the samples whose count since reset, modulo SPS, equals
// `sym_offset`, so the windows line up with the transmitter's symbols once the path delay
// is known (channel_decoder supplies it). A window that was already under way at reset is
// dropped. While `enable` is low nothing is output.
//
// Timing: `sym_valid` pulses one clock after the last sample of a window. Averaging every
// 50 samples, rounding to the nearest symbol and the bit mapping follow the receiver's
// description; symbol timing from the known path delay and the threshold form of the
// rounding are this design's own.
module pam8_demod
  import rx_pkg::*;
#(
  parameter int SPS        = 50,
  parameter int LEVEL_UNIT = 512
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    enable,
  input  logic [$clog2(SPS)-1:0]  sym_offset,
  input  logic                    in_valid,
  input  sample_t                 x,
  output logic                    sym_valid,
  output logic [2:0]              sym_bits,
  output logic signed [3:0]       sym_level
);
  localparam int CW = $clog2(SPS);

  logic [CW-1:0]      cnt, last_idx;
  logic               started;
  logic signed [47:0] acc, sum;
  logic [2:0]         lvl;

  always_comb begin
    last_idx = (sym_offset == '0) ? CW'(SPS - 1) : sym_offset - 1'b1;
    sum      = ((cnt == sym_offset) ? 48'sd0 : acc) + 48'(x);
    lvl      = '0;
    for (int j = 0; j < 7; j++)
      if (sum > 48'sd1 * (2 * j - 6) * LEVEL_UNIT * SPS) lvl = lvl + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt       <= '0;
      started   <= 1'b0;
      acc       <= '0;
      sym_valid <= 1'b0;
      sym_bits  <= '0;
      sym_level <= '0;
    end else begin
      sym_valid <= 1'b0;
      if (in_valid) begin
        cnt <= (cnt == CW'(SPS - 1)) ? '0 : cnt + 1'b1;
        acc <= sum;
        if (cnt == sym_offset) started <= 1'b1;
        if (cnt == last_idx && (started || cnt == sym_offset) && enable) begin
          sym_valid <= 1'b1;
          sym_bits  <= lvl;
          sym_level <= 4'(2 * int'(lvl) - 7);
        end
      end
      if (!enable) started <= 1'b0;
    end
  end

endmodule
