// tb_lowpass_mac: LPF2 at its full size (82 taps), one sample every 90 clocks.
//   - latency: each output arrives 84 clocks after its sample;
//   - DC: 40000 in must settle to 40000 +- 3 out;
//   - pass band: a 100 kHz tone of amplitude 40000 (at 800 kHz) must keep its amplitude within
//     1 %; the 40.5-sample group delay puts the output samples half a sample off the peaks,
//     so the largest output sample is 40000*cos(pi/8) = 36955;
//   - stop band: a 300 kHz tone of amplitude 100000 must come out below 10 (80 dB down).
module tb_lowpass_mac;
  import rx_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic    in_valid = 1'b0;
  sample_t x = '0;
  logic    ready, out_valid;
  sample_t y;

  lowpass_mac dut (.*);

  int lat_bad = 0;

  task automatic run_tone(real amp, real f, int n, output int peak, output int last);
    peak = 0;
    for (int i = 0; i < n; i++) begin
      int lat;
      real v;
      @(negedge clk);
      v = amp * $cos(2.0 * 3.141592653589793 * f * i / 800.0e3);
      x = sample_t'($rtoi(v < 0 ? v - 0.5 : v + 0.5));
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      lat = 1;
      while (!out_valid && lat < 200) begin @(negedge clk); lat++; end
      if (lat != 84) lat_bad++;
      if (i > 100) begin
        if (y > peak) peak = int'(y);
        if (-y > peak) peak = -int'(y);
      end
      last = int'(y);
      repeat (3) @(negedge clk);
    end
  endtask

  initial begin
    int pk, last;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    run_tone(40000.0, 0.0, 120, pk, last);
    checks++;
    if (last > 40003 || last < 39997) begin failures++; $display("DC out %0d", last); end
    run_tone(40000.0, 100.0e3, 200, pk, last);
    checks++;
    if (pk > 37325 || pk < 36585) begin failures++; $display("100 kHz peak %0d", pk); end
    run_tone(100000.0, 300.0e3, 200, pk, last);
    checks++;
    if (pk >= 10) begin failures++; $display("300 kHz peak %0d", pk); end
    checks++;
    if (lat_bad != 0) begin failures++; $display("%0d outputs with wrong latency", lat_bad); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
