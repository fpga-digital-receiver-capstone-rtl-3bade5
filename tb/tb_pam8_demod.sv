// tb_pam8_demod: symbols of 10 samples (SPS = 10), one amplitude unit = 100, window start
// offset 3. Each symbol is a constant level (2b-7)*100 plus a ripple at twice a carrier
// (which a whole symbol averages to nearly zero) and small noise. The block must
//   - drop the window that was under way at reset,
//   - give one decision per window, one clock after its last sample, whose bits equal the
//     bits sent and whose level equals 2b-7,
//   - decide correctly right next to the decision thresholds (levels 0.8 units from a
//     neighbour) and clip beyond +-7,
//   - decode a fixed 12-symbol example with its levels written out by hand,
//   - give nothing while enable is low.
module tb_pam8_demod;
  import rx_pkg::*;

  localparam int SPS = 10, U = 100, OFF = 3;
  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic       enable = 1'b1;
  logic [3:0] sym_offset = 4'(OFF);
  logic       in_valid = 1'b0;
  sample_t    x = '0;
  logic       sym_valid;
  logic [2:0] sym_bits;
  logic signed [3:0] sym_level;

  pam8_demod #(.SPS(SPS), .LEVEL_UNIT(U)) dut (.*);

  logic [2:0] sent[$];
  localparam logic [2:0] EX_BITS[12]  = '{3'b101, 3'b111, 3'b000, 3'b001, 3'b010, 3'b000,
                                          3'b111, 3'b110, 3'b101, 3'b011, 3'b011, 3'b100};
  localparam int         EX_LEVEL[12] = '{3, 7, -7, -5, -3, -7, 7, 5, 3, -1, -1, 1};
  int m = 0;          // samples sent since reset
  int n_dec = 0;

  // expected decision for a window = the symbol sent in it
  always @(posedge clk) begin
    if (sym_valid && !rst) begin
      logic [2:0] e;
      n_dec++;
      checks++;
      e = sent.pop_front();
      if (!enable || sym_bits !== e || sym_level != 4'(2 * int'(e) - 7)) begin
        failures++;
        if (failures < 10) $display("decision %b (%0d), expected %b, enable %b", sym_bits, sym_level, e, enable);
      end
    end
  end

  task automatic send_symbol(logic [2:0] b, real extra);
    for (int i = 0; i < SPS; i++) begin
      real v;
      @(negedge clk);
      v = (2.0 * b - 7.0 + extra) * U + 60.0 * $cos(2.0 * 3.141592653589793 * 0.3 * i)
          + real'($urandom_range(0, 20)) - 10.0;
      x = sample_t'($rtoi(v));
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      m++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // partial window: samples 0..2 come before the first window start (offset 3)
    for (int i = 0; i < OFF; i++) begin
      @(negedge clk); x = 18'sd3000; in_valid = 1'b1;
      @(negedge clk); in_valid = 1'b0; m++;
    end
    for (int s = 0; s < 200; s++) begin
      logic [2:0] b;
      real extra;
      b = 3'($urandom);
      extra = (s % 4 == 1) ? ((b == 7) ? 2.5 : 0.8) : (s % 4 == 3) ? ((b == 0) ? -2.5 : -0.8) : 0.0;
      sent.push_back(b);
      send_symbol(b, extra);
    end
    // a fixed example: the bit blocks 101 111 000 001 010 000 111 110 101 011 011 100 are
    // the levels 3 7 -7 -5 -3 -7 7 5 3 -1 -1 1
    foreach (EX_LEVEL[i]) begin
      sent.push_back(EX_BITS[i]);
      for (int k = 0; k < SPS; k++) begin
        @(negedge clk);
        x = sample_t'(EX_LEVEL[i] * U);
        in_valid = 1'b1;
        @(negedge clk);
        in_valid = 1'b0;
        m++;
      end
    end
    repeat (3) @(negedge clk);
    checks++;
    if (n_dec != 212) begin failures++; $display("%0d decisions for 212 symbols", n_dec); end
    // disabled: nothing may come out
    enable = 1'b0;
    for (int s = 0; s < 5; s++) send_symbol(3'd5, 0.0);
    checks++;
    if (n_dec != 212) begin failures++; $display("decisions while disabled"); end
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
