// tb_decimator: at the full ratio of 375, with random gaps in the input, the block must pass
// exactly input samples 0, 375, 750 ... (each input carries its own index as data) and
// nothing else, one clock after the kept input.
module tb_decimator;
  import rx_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic    in_valid = 1'b0;
  sample_t x = '0;
  logic    out_valid;
  sample_t y;

  decimator dut (.*);

  int n_in = 0, n_out = 0;
  logic kept_last = 1'b0;

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (375 * 12 + 5) begin
      @(negedge clk);
      checks++;
      if (out_valid !== kept_last) begin failures++; $display("out_valid %b expected %b at input %0d", out_valid, kept_last, n_in); end
      if (out_valid) begin
        checks++;
        if (y !== sample_t'(375 * n_out)) begin failures++; $display("kept %0d expected %0d", y, 375 * n_out); end
        n_out++;
      end
      if ($urandom_range(0, 3) != 0) begin
        in_valid = 1'b1; x = sample_t'(n_in);
        kept_last = (n_in % 375 == 0);
        n_in++;
      end else begin
        in_valid = 1'b0; kept_last = 1'b0;
      end
    end
    checks++;
    if (n_out < 8) begin failures++; $display("only %0d samples kept", n_out); end
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
