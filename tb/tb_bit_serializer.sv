// tb_bit_serializer: random 3-bit symbols at random spacing; each must come out as three
// consecutive valid bits, most significant first, starting one clock after sym_valid, with
// bit_valid low in between symbols.
module tb_bit_serializer;
  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic sym_valid = 1'b0;
  logic [2:0] sym_bits = '0;
  logic bit_valid, bit_out;

  bit_serializer dut (.*);

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int i = 0; i < 300; i++) begin
      logic [2:0] b;
      b = 3'($urandom);
      @(negedge clk);
      sym_valid = 1'b1; sym_bits = b;
      @(negedge clk);
      sym_valid = 1'b0; sym_bits = 3'($urandom);
      for (int k = 2; k >= 0; k--) begin
        checks++;
        if (!bit_valid || bit_out !== b[k]) begin
          failures++;
          if (failures < 10) $display("symbol %b bit %0d: valid %b bit %b", b, k, bit_valid, bit_out);
        end
        @(negedge clk);
      end
      repeat ($urandom_range(0, 4)) begin
        checks++;
        if (bit_valid) begin failures++; $display("bit_valid between symbols"); end
        @(negedge clk);
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
