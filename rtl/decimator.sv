// decimator: keeps one sample in RATIO.
//
// Counts valid input samples and passes on samples 0, RATIO, 2*RATIO ... counted from
// reset, so the output stream at fs/RATIO starts with the first input sample. It does no
// filtering itself: the low-pass ahead of it (LPF1) limits the band first.
//
// Timing: one register; `out_valid` pulses one clock after the kept `in_valid`.
//
// The 300 MHz to 800 kHz rate change (RATIO 375) follows the receiver's description; keeping
// the first sample of each group is this design's choice.
module decimator
  import rx_pkg::*;
#(
  parameter int RATIO = DECIM
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    in_valid,
  input  sample_t x,
  output logic    out_valid,
  output sample_t y
);
  logic [$clog2(RATIO)-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid && (cnt == '0);
      if (in_valid) begin
        if (cnt == '0) y <= x;
        cnt <= (cnt == $bits(cnt)'(RATIO - 1)) ? '0 : cnt + 1'b1;
      end
    end
  end

endmodule
