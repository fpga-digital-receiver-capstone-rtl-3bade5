// tb_fir_direct: LPF1 at its full 272-tap size.
//   - impulse response: an impulse of 2**16 must return round(h(k) * 2**16) for every k,
//     where h is recomputed here (Kaiser window by its own series, sinc, unit DC gain),
//     within 1 LSB, with y(0) appearing two clocks after the impulse is taken;
//   - DC: a constant 50000 must settle to 50000 +- 2;
//   - stop band: a 150 MHz input (alternating +-100000), the sum term a mixer leaves, must
//     come out below 4 in magnitude (over 90 dB down);
//   - samples are accepted only with in_valid: gaps must not change the result.
module tb_fir_direct;
  import rx_pkg::*;

  localparam int N = 272;
  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic    in_valid = 1'b0;
  sample_t x = '0;
  logic    out_valid;
  sample_t y;

  fir_direct dut (.*);

  real href[N];

  function automatic real i0(real z);
    real s = 1.0, t = 1.0;
    for (int k = 1; k < 50; k++) begin
      t = t * (z * z / 4.0) / real'(k * k);
      s = s + t;
    end
    return s;
  endfunction

  // collect outputs
  sample_t outs[$];
  always @(posedge clk) if (out_valid) outs.push_back(y);

  task automatic push(sample_t v, bit gap);
    @(negedge clk);
    x = v; in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    if (gap) repeat ($urandom_range(0, 2)) @(negedge clk);
  endtask

  initial begin
    real sum = 0.0;
    real fc = 2.8e6 / 300.0e6, b = 8.959, m = (N - 1) / 2.0;
    for (int k = 0; k < N; k++) begin
      real t, s;
      t = k - m;
      s = (t == 0.0) ? 2.0 * fc : $sin(2.0 * 3.141592653589793 * fc * t) / (3.141592653589793 * t);
      href[k] = s * i0(b * $sqrt(1.0 - (t / m) * (t / m))) / i0(b);
      sum += href[k];
    end
    for (int k = 0; k < N; k++) href[k] = href[k] / sum;

    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // latency of the first output
    @(negedge clk);
    x = 18'sd65536; in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    checks++;
    if (out_valid) begin failures++; $display("output too early"); end
    @(negedge clk);
    checks++;
    if (!out_valid) begin failures++; $display("no output two clocks after the input"); end
    for (int k = 1; k < N + 10; k++) push('0, 1'b1);
    for (int k = 0; k < N; k++) begin
      int e;
      e = int'($floor(href[k] * 65536.0 + 0.5));
      checks++;
      if (outs[k] > e + 1 || outs[k] < e - 1) begin
        failures++;
        if (failures < 10) $display("h(%0d): got %0d expected %0d", k, outs[k], e);
      end
    end
    repeat (4) @(negedge clk);
    outs.delete();
    // DC
    for (int k = 0; k < N + 20; k++) push(18'sd50000, k % 7 == 0);
    repeat (4) @(negedge clk);
    for (int k = N; k < N + 20; k++) begin
      checks++;
      if (outs[k] > 50002 || outs[k] < 49998) begin
        failures++; $display("DC output %0d", outs[k]);
      end
    end
    repeat (4) @(negedge clk);
    outs.delete();
    // 150 MHz
    for (int k = 0; k < N + 20; k++) push((k % 2) ? -18'sd100000 : 18'sd100000, 1'b0);
    repeat (4) @(negedge clk);
    for (int k = N; k < N + 20; k++) begin
      checks++;
      if (outs[k] > 3 || outs[k] < -3) begin
        failures++; $display("150 MHz leaks through: %0d", outs[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
