// bit_serializer: turns decided 3-bit symbols back into the information bit stream.
//
// Each decided symbol carries a block of three bits. On `sym_valid` the block is loaded and
// sent out most significant bit first, one bit per clock, with `bit_valid` high for three
// clocks. The stream is the receiver's estimate of the bits that were sent.
//
// Timing: the first bit appears one clock after `sym_valid`. A new symbol must not arrive
// within three clocks of the previous one (symbols are thousands of clocks apart here);
// an assertion checks this. Three bits per symbol, in the order of the mapping table,
// follow the receiver's description; MSB-first order is this design's choice.
module bit_serializer (
  input  logic       clk,
  input  logic       rst,
  input  logic       sym_valid,
  input  logic [2:0] sym_bits,
  output logic       bit_valid,
  output logic       bit_out
);
  logic [2:0] shreg;
  logic [1:0] left;

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg     <= '0;
      left      <= '0;
      bit_valid <= 1'b0;
      bit_out   <= 1'b0;
    end else if (sym_valid) begin
      bit_out   <= sym_bits[2];
      bit_valid <= 1'b1;
      shreg     <= {sym_bits[1:0], 1'b0};
      left      <= 2'd2;
    end else if (left != 2'd0) begin
      bit_out   <= shreg[2];
      bit_valid <= 1'b1;
      shreg     <= {shreg[1:0], 1'b0};
      left      <= left - 1'b1;
    end else begin
      bit_valid <= 1'b0;
    end
  end

  a_symbol_spacing: assert property (@(posedge clk) disable iff (rst) sym_valid |-> left == 2'd0)
    else $error("bit_serializer: symbol arrived before the previous one was sent");

endmodule
