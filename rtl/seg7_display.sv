// seg7_display: shows the selected channel number on two seven-segment digits.
//
// The channel number (0..15) is split into tens and units and each digit is turned into a
// segment pattern {g,f,e,d,c,b,a}, active low. A leading zero is blanked; when no valid
// channel is selected both digits show a dash.
//
// Timing: registered, one clock after its inputs. Showing the current channel on the board's
// seven-segment display follows the receiver's description; the digit format is this
// design's own.
module seg7_display
  import rx_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] channel,
  input  logic       valid,
  output logic [6:0] hex_tens,
  output logic [6:0] hex_units
);
  logic [3:0] tens, units;

  always_comb begin
    tens  = (channel >= 4'd10) ? 4'd1 : 4'd0;
    units = (channel >= 4'd10) ? channel - 4'd10 : channel;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hex_tens  <= 7'b1111111;
      hex_units <= 7'b1111111;
    end else if (!valid) begin
      hex_tens  <= seg7_digit(4'hF);
      hex_units <= seg7_digit(4'hF);
    end else begin
      hex_tens  <= (tens == 4'd0) ? 7'b1111111 : seg7_digit(tens);
      hex_units <= seg7_digit(units);
    end
  end

endmodule
