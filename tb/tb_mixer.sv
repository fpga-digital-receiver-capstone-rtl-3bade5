// tb_mixer: random samples and oscillator values through the mixer; each output must equal
// the product scaled by 2**-9 (Q1.11 oscillator times a gain of 4), clipped to 18 bits, one
// clock after its input, and out_valid must follow in_valid.
module tb_mixer;
  import rx_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic    in_valid = 1'b0;
  logic signed [17:0] x = '0;
  lo_t     lo = '0;
  logic    out_valid;
  sample_t y;

  mixer #(.IN_W(18)) dut (.*);

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int i = 0; i < 2000; i++) begin
      longint e;
      logic   v;
      @(negedge clk);
      v        = ($urandom_range(0, 3) != 0);
      in_valid = v;
      x        = (i < 20) ? 18'sh1FFFF - 18'(i) : 18'($urandom);
      lo       = (i < 10) ? 12'sh7FF : 12'($urandom);
      if (i >= 20 && i % 3 == 0) x = 18'($signed(12'($urandom)));
      e = (longint'(x) * longint'(lo)) >>> 9;
      if (e > 131071) e = 131071;
      if (e < -131072) e = -131072;
      @(posedge clk); #0.5;
      checks++;
      if (out_valid !== v || (v && longint'(y) != e)) begin
        failures++;
        if (failures < 10) $display("x=%0d lo=%0d: y=%0d expected %0d valid %b", x, lo, y, e, out_valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
