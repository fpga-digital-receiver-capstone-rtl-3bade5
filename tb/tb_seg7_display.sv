// tb_seg7_display: every channel number 0..15, valid and not valid, against a literal table
// of active-low {g,f,e,d,c,b,a} patterns: blank leading digit, dashes when not valid.
module tb_seg7_display;
  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0] channel = '0;
  logic valid = 1'b0;
  logic [6:0] hex_tens, hex_units;

  seg7_display dut (.*);

  localparam logic [6:0] DIG[10] = '{7'h40, 7'h79, 7'h24, 7'h30, 7'h19,
                                     7'h12, 7'h02, 7'h78, 7'h00, 7'h10};
  localparam logic [6:0] BLANK = 7'h7F, DASH = 7'h3F;

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int v = 0; v < 2; v++)
      for (int c = 0; c < 16; c++) begin
        logic [6:0] et, eu;
        @(negedge clk);
        channel = 4'(c); valid = v[0];
        @(negedge clk);
        et = !v[0] ? DASH : (c >= 10 ? DIG[1] : BLANK);
        eu = !v[0] ? DASH : DIG[c % 10];
        checks++;
        if (hex_tens !== et || hex_units !== eu) begin
          failures++;
          $display("channel %0d valid %0d: %h %h expected %h %h", c, v, hex_tens, hex_units, et, eu);
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
