// tb_channel_decoder: every switch setting (16 channel codes x 2 plans) against values
// worked out here: channel validity (1..8 for 25 kHz, 1..12 for 8.33 kHz), table window
// (8 x 242 taps, then 12 x 369), filter length, LO step (3k or k eighths of 25 kHz), and the
// delay compensation. The path delay is recomputed here in real arithmetic:
// 135.5/375 + 40.5 + 120.5 (25 kHz plan) or + 184 (8.33 kHz plan) samples at 800 kHz; the
// LO phase must be -step*D in 1/256 entries of the 96-entry table and the symbol offset
// round(D) mod 50. Outputs are checked one clock after the switches change.
module tb_channel_decoder;
  import rx_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0]  sw_channel = '0;
  spacing_e    spacing = SPACING_25K;
  logic        chan_valid;
  logic [12:0] coef_base;
  logic [8:0]  ntaps;
  logic [5:0]  lo_step;
  logic [14:0] lo_phase;
  logic [5:0]  sym_offset;

  channel_decoder #(.SPS(50)) dut (.*);

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    checks++;
    if (chan_valid) begin failures++; $display("valid with channel 0"); end
    for (int p = 0; p < 2; p++)
      for (int c = 0; c < 16; c++) begin
        bit  ev;
        int  eb, en, es, eph, eoff;
        real d;
        @(negedge clk);
        sw_channel = 4'(c);
        spacing    = spacing_e'(p);
        @(negedge clk);
        ev  = (c >= 1) && (c <= (p ? 12 : 8));
        en  = p ? 369 : 242;
        es  = p ? c : 3 * c;
        eb  = !ev ? 0 : (p ? 8 * 242 + (c - 1) * 369 : (c - 1) * 242);
        d   = 135.5 / 375.0 + 40.5 + (p ? 184.0 : 120.5);
        eph = (24576 - (es * int'($floor(d * 256.0 + 0.5))) % 24576) % 24576;
        eoff = int'($floor(d + 0.5)) % 50;
        checks++;
        if (chan_valid !== ev || int'(coef_base) != eb || int'(ntaps) != en ||
            int'(lo_step) != es || int'(lo_phase) != eph || int'(sym_offset) != eoff) begin
          failures++;
          $display("plan %0d ch %0d: v%b base %0d n %0d step %0d ph %0d off %0d; expected v%b %0d %0d %0d %0d %0d",
                   p, c, chan_valid, coef_base, ntaps, lo_step, lo_phase, sym_offset,
                   ev, eb, en, es, eph, eoff);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
