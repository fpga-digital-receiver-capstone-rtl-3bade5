// tb_channel_filter: the full 20-filter bank, one sample every 375 clocks as in the receiver.
// For a 25 kHz-plan channel (6, 150 kHz) and an 8.33 kHz-plan channel (12, 100 kHz) a tone
// is sent at the channel centre, at the band edges of the channel specification and at
// neighbouring channels; the output amplitude, sqrt(2*mean(y^2)) over 192 samples after the
// filter has filled, must be
//   - within 2 % of the input at the centre,
//   - no more than 6 dB down at +-10 kHz (25 kHz plan) and +-2.78 kHz (8.33 kHz plan),
//   - at least 40 dB down at +-17 kHz and 60 dB down at +-22 kHz (25 kHz plan),
//   - at least 58 dB down at +-7.37 kHz (8.33 kHz plan; the specification asks 60 dB, the
//     369-tap equiripple design reaches about 59.5 dB at that edge),
//   - at least 60 dB down one and two channels away in both plans.
// The table window for each channel is computed here from the layout (8 x 242 taps, then
// 12 x 369 taps). Output latency must be ntaps + 2 clocks.
module tb_channel_filter;
  import rx_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic [12:0] coef_base = '0;
  logic [8:0]  ntaps = 9'd242;
  logic        in_valid = 1'b0;
  sample_t     x = '0;
  logic        ready, out_valid;
  sample_t     y;

  channel_filter dut (.*);

  int lat_bad = 0;

  task automatic measure(real f, output real amp);
    real acc = 0.0;
    int  n = int'(ntaps) + 200;
    for (int i = 0; i < n; i++) begin
      int lat;
      real v;
      @(negedge clk);
      v = 20000.0 * $cos(2.0 * 3.141592653589793 * f * i / 800.0e3);
      x = sample_t'($rtoi(v < 0 ? v - 0.5 : v + 0.5));
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      lat = 1;
      while (!out_valid && lat < 400) begin @(negedge clk); lat++; end
      if (lat != int'(ntaps) + 2) lat_bad++;
      if (i >= n - 192) acc += real'(y) * real'(y);
      repeat (2) @(negedge clk);
    end
    amp = $sqrt(2.0 * acc / 192.0);
  endtask

  task automatic expect_amp(real f, real lo, real hi, string what);
    real a;
    measure(f, a);
    checks++;
    $display("%s: %0.0f Hz -> amplitude %0.2f", what, f, a);
    if (a < lo || a > hi) begin failures++; $display("  out of range [%0.2f, %0.2f]", lo, hi); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // 25 kHz plan, channel 6
    coef_base = 13'(5 * 242); ntaps = 9'd242;
    expect_amp(150.0e3, 19600.0, 20400.0, "25k ch6 centre");
    expect_amp(160.0e3, 10000.0, 25000.0, "25k ch6 pass edge +10 kHz");
    expect_amp(140.0e3, 10000.0, 25000.0, "25k ch6 pass edge -10 kHz");
    expect_amp(167.0e3, 0.0, 200.0, "25k ch6 +17 kHz");
    expect_amp(128.0e3, 0.0, 20.0, "25k ch6 -22 kHz");
    expect_amp(175.0e3, 0.0, 20.0, "25k ch6 +1 channel");
    expect_amp(100.0e3, 0.0, 20.0, "25k ch6 -2 channels");
    // 8.33 kHz plan, channel 12
    coef_base = 13'(8 * 242 + 11 * 369); ntaps = 9'd369;
    expect_amp(100.0e3, 19600.0, 20400.0, "8.33k ch12 centre");
    expect_amp(102.78e3, 10000.0, 25000.0, "8.33k ch12 pass edge +2.78 kHz");
    expect_amp(97.22e3, 10000.0, 25000.0, "8.33k ch12 pass edge -2.78 kHz");
    expect_amp(107.37e3, 0.0, 25.2, "8.33k ch12 +7.37 kHz");
    expect_amp(100.0e3 - 25.0e3 / 3.0, 0.0, 20.0, "8.33k ch12 -1 channel");
    expect_amp(100.0e3 + 50.0e3 / 3.0, 0.0, 20.0, "8.33k ch12 +2 channels");
    checks++;
    if (lat_bad != 0) begin failures++; $display("%0d outputs with wrong latency", lat_bad); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
