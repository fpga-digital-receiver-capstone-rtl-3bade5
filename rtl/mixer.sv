// mixer: digital down-conversion multiplier.
//
// Multiplies each input sample by the local-oscillator sample for the same instant and
// scales the product back to the internal width: y = sat((x * lo) >>> (LO_W - 1 - MIX_GAIN)).
// With a Q1.11 oscillator this is x*cos(...) times 2**MIX_GAIN; the extra gain keeps the
// products of small ADC codes well above the rounding noise of the later filters.
// Multiplying a tone at f1 by one at f2 leaves components at f1 - f2 and f1 + f2; the
// filter after the mixer removes the sum.
//
// Interface: `in_valid` qualifies `x`; the same pulse should advance the oscillator so
// that `lo` belongs to the next sample afterwards. Timing: one register, so `out_valid`
// and `y` follow `in_valid` and `x` by one clock.
//
// The mixing by multiplication follows the receiver's description; the gain, rounding by
// truncation and saturation are this design's own.
module mixer
  import rx_pkg::*;
#(
  parameter int IN_W = ADC_W
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] x,
  input  lo_t                    lo,
  output logic                   out_valid,
  output sample_t                y
);
  logic signed [IN_W+LO_W-1:0] prod;

  always_comb prod = x * lo;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= saturate(64'(prod >>> (LO_W - 1 - MIX_GAIN)));
    end
  end

endmodule
