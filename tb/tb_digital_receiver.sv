// tb_digital_receiver: end-to-end test of the receiver at its default parameters.
//
// A transmitter model builds the 300 MHz ADC stream: two 8-PAM signals, P on the 150 kHz
// channel (moved to 200 kHz, the top of the band, from setting C on) and Q on the 100 kHz
// channel of the band, each a square-pulse symbol stream
// (bits b -> amplitude 2b-7, 128 ADC codes per unit) on a carrier at 74.9 MHz + f, plus
// approximately Gaussian noise of about 13 codes rms. P changes symbol every 4 symbol
// periods, Q every 16 (its 8.33 kHz channel is too narrow for faster symbols).
//
// The receiver is taken through five settings:
//   A  25 kHz plan, channel 6 (150 kHz)   -> must decode P, rejecting Q
//   B  8.33 kHz plan, channel 12 (100 kHz) -> must decode Q, rejecting P   (plan switch)
//   C  25 kHz plan, channel 4 (100 kHz)   -> must decode Q                 (channel change)
//   E  25 kHz plan, channel 8 (200 kHz, switch code 1000, the highest)  -> must decode P
//   D  channel 0                          -> no channel: no symbols, dashes on the display
// Each decided symbol is matched to the transmitted one by its time of arrival and the
// known path delay; decisions next to a change of the held value, and those in the first
// 12 windows after a switch while the filters refill, are not checked. The serial bit
// stream is checked against the decided symbols, the display against literal segment
// patterns, and each setting and mechanism must have happened. A watchdog ends the run.
module tb_digital_receiver;
  import rx_pkg::*;

  localparam int SPS  = 50;
  localparam int RP   = 4;      // P holds each value for RP symbol periods
  localparam int RQ   = 16;     // Q holds each value for RQ symbol periods
  localparam int NSYM = 4096;   // transmitted symbol periods available

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       adc_valid = 1'b0;
  adc_t       adc_data = '0;
  logic [3:0] sw_channel = 4'd6;
  logic       sw_spacing = 1'b0;
  logic       chan_valid, sym_valid, bit_valid, bit_out;
  logic [2:0] sym_bits;
  logic signed [3:0] sym_level;
  logic [6:0] hex_tens, hex_units;

  digital_receiver dut (.*);

  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  logic [2:0] p_bits[NSYM/RP];
  logic [2:0] q_bits[NSYM/RQ];

  // ------------------------------------------------------------------ transmitter
  longint n_sent = 0;
  real    p_freq = 150.0e3;      // channel frequency of P
  function automatic real carrier(longint n, real f_off);
    // cos(2*pi*(74.9 MHz + f_off)*n/300 MHz), with the 749/3000 part reduced exactly
    real ph;
    ph = real'((749 * (n % 3000)) % 3000) / 3000.0 + f_off * real'(n) / 300.0e6;
    ph = ph - $floor(ph);
    return $cos(2.0 * PI * ph);
  endfunction

  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 4; i++) s += real'($urandom_range(0, 65535)) / 65535.0 - 0.5;
    return s * 1.732 * 13.0;   // four uniforms: variance 4/12, scaled to ~13 rms
  endfunction

  always @(posedge clk) begin
    if (!rst) begin
      longint j;
      real v;
      j = n_sent / (SPS * DECIM);
      v = 128.0 * pam8_level(p_bits[(j / RP) % (NSYM / RP)]) * carrier(n_sent, p_freq)
        + 128.0 * pam8_level(q_bits[(j / RQ) % (NSYM / RQ)]) * carrier(n_sent, 100.0e3)
        + gauss();
      adc_data  <= adc_t'($rtoi(v < 0 ? v - 0.5 : v + 0.5));
      adc_valid <= 1'b1;
      n_sent    <= n_sent + 1;
    end
  end

  // ------------------------------------------------------------------ checking
  int phase = 0;                 // 1..5 = settings A, B, C, D, E
  longint settle_until = 0;      // 800 kHz index before which decisions are not checked
  int n_checked[6], n_bad[6], n_syms[6];
  int n_plan_switch = 0, n_chan_change = 0, n_bits_ok = 0;
  logic [2:0] last_bits;
  int bit_idx = 3;

  always @(posedge clk) begin
    if (sym_valid && !rst) begin
      longint m_last, j;
      int     dr, lat;
      logic [2:0] exp_bits;
      bit     interior;
      n_syms[phase]++;
      lat    = (sw_spacing) ? 461 : 334;
      dr     = (delay_q8(spacing_e'(sw_spacing)) + 128) >> 8;
      m_last = (n_sent - lat + DECIM / 2) / DECIM;
      j      = (m_last + 1 - dr) / SPS - 1;
      if (phase == 1 || phase == 5) begin
        exp_bits = p_bits[(j / RP) % (NSYM / RP)];
        interior = (j % RP != 0) && (j % RP != RP - 1);
      end else begin
        exp_bits = q_bits[(j / RQ) % (NSYM / RQ)];
        interior = (j % RQ != 0) && (j % RQ != RQ - 1);
      end
      if (phase != 0 && phase != 4 && interior && j >= 1 && m_last > settle_until) begin
        checks++;
        n_checked[phase]++;
        if (sym_bits !== exp_bits || sym_level != 4'(pam8_level(exp_bits))) begin
          failures++;
          n_bad[phase]++;
          if (n_bad[phase] < 6)
            $display("phase %0d symbol %0d: got %b (%0d), sent %b", phase, j, sym_bits,
                     sym_level, exp_bits);
        end
      end
      if (phase == 4) begin
        failures++;
        $display("symbol decided while no channel is selected");
      end
      last_bits = sym_bits;
      bit_idx   = 0;
    end
    if (bit_valid && !rst) begin
      checks++;
      if (bit_idx > 2 || bit_out !== last_bits[2 - bit_idx]) begin
        failures++;
        $display("serial bit %0d wrong", bit_idx);
      end else n_bits_ok++;
      bit_idx++;
    end
  end

  task automatic expect_display(logic [6:0] t, logic [6:0] u, string what);
    checks++;
    if (hex_tens !== t || hex_units !== u) begin
      failures++;
      $display("display for %s: %b %b", what, hex_tens, hex_units);
    end
  endtask

  task automatic run_windows(int nwin);
    repeat (nwin * SPS * DECIM) @(posedge clk);
  endtask

  task automatic settle();
    settle_until = n_sent / DECIM + 12 * SPS;
  endtask

  initial begin
    for (int i = 0; i < NSYM / RP; i++) p_bits[i] = 3'($urandom_range(0, 7));
    for (int i = 0; i < NSYM / RQ; i++) q_bits[i] = 3'($urandom_range(0, 7));
    for (int i = 0; i < 6; i++) begin n_checked[i] = 0; n_bad[i] = 0; n_syms[i] = 0; end
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    // A: 25 kHz plan, channel 6
    phase = 1; settle();
    repeat (3) @(posedge clk);
    expect_display(7'b1111111, 7'b0000010, "channel 6");
    run_windows(12 + 48);
    // B: 8.33 kHz plan, channel 12
    sw_spacing <= 1'b1; sw_channel <= 4'd12; phase = 2; n_plan_switch++; settle();
    repeat (3) @(posedge clk);
    expect_display(7'b1111001, 7'b0100100, "channel 12");
    run_windows(12 + 64);
    // C: 25 kHz plan, channel 4
    sw_spacing <= 1'b0; sw_channel <= 4'd4; phase = 3; n_plan_switch++; n_chan_change++;
    p_freq = 200.0e3;
    settle();
    repeat (3) @(posedge clk);
    expect_display(7'b1111111, 7'b0011001, "channel 4");
    run_windows(12 + 48);
    // E: 25 kHz plan, channel 8
    sw_channel <= 4'b1000; phase = 5; n_chan_change++; settle();
    repeat (3) @(posedge clk);
    expect_display(7'b1111111, 7'b0000000, "channel 8");
    run_windows(12 + 48);
    // D: no channel
    sw_channel <= 4'd0; phase = 4; n_chan_change++;
    repeat (3) @(posedge clk);
    expect_display(7'b0111111, 7'b0111111, "no channel");
    checks++; if (chan_valid) begin failures++; $display("channel 0 reported valid"); end
    run_windows(8);

    for (int p = 1; p <= 5; p++) begin
      if (p == 4) continue;
      $display("setting %0d: %0d symbols out, %0d checked, %0d wrong", p, n_syms[p],
               n_checked[p], n_bad[p]);
      checks++;
      if (n_checked[p] < 20) begin failures++; $display("setting %0d checked too little", p); end
    end
    $display("plan switches %0d, channel changes %0d, serial bits ok %0d, muted symbols %0d",
             n_plan_switch, n_chan_change, n_bits_ok, n_syms[4]);
    checks++;
    if (n_plan_switch < 1 || n_chan_change < 1 || n_bits_ok < 60) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (7_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
