// tb_fir_mac: the time-shared FIR engine with an 8-entry buffer and a coefficient memory
// modelled here (random Q1.17 taps, one clock read latency). Random samples are sent
// whenever the engine is ready, with the tap count changed between samples (1..8). Each
// output must equal sat(round(sum_k h(k) x(n-k) / 2**17)) computed here from the sample
// history, arrive exactly ntaps + 2 clocks after its sample, and the engine must report
// ready again by then.
module tb_fir_mac;
  import rx_pkg::*;

  localparam int NM = 8;
  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0] ntaps = 4'd8;
  logic       in_valid = 1'b0;
  sample_t    x = '0;
  logic       ready;
  logic [2:0] coef_addr;
  coef_t      coef;
  logic       out_valid;
  sample_t    y;

  fir_mac #(.N_MAX(NM)) dut (.*);

  coef_t rom[NM];
  always_ff @(posedge clk) coef <= rom[coef_addr];

  sample_t hist[$];

  initial begin
    for (int k = 0; k < NM; k++) rom[k] = coef_t'($urandom);
    rom[0] = 18'sh1FFFF;               // large taps to exercise saturation
    for (int k = 0; k < NM; k++) hist.push_front('0);
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int i = 0; i < 400; i++) begin
      longint acc, e;
      int lat, nt;
      @(negedge clk);
      nt = (i % 5 == 4) ? $urandom_range(1, NM) : NM;
      ntaps = 4'(nt);
      x = (i % 13 == 0) ? 18'sh1FFFF : sample_t'($urandom);
      checks++;
      if (!ready) begin failures++; $display("engine not ready"); end
      in_valid = 1'b1;
      hist.push_front(x);
      void'(hist.pop_back());
      acc = 0;
      for (int k = 0; k < nt; k++) acc += longint'(rom[k]) * longint'(hist[k]);
      e = (acc + (64'sd1 <<< 16)) >>> 17;
      if (e > 131071) e = 131071;
      if (e < -131072) e = -131072;
      @(negedge clk);
      in_valid = 1'b0;
      ntaps = 4'($urandom);           // must not matter while the output is computed
      lat = 1;
      while (!out_valid && lat < 40) begin @(negedge clk); lat++; end
      checks++;
      if (lat != nt + 2 || longint'(y) != e) begin
        failures++;
        if (failures < 10) $display("sample %0d: y=%0d expected %0d, latency %0d for %0d taps", i, y, e, lat, nt);
      end
      checks++;
      if (!ready) begin failures++; $display("not ready after output"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
