// lo_dds: local-oscillator lookup table for the receiver's mixers.
//
// The table holds one repetition period of a sampled cosine, cos(2*pi*CYCLES*i/LEN) for
// i = 0..LEN-1, in Q1.11. A sample counter n (0..LEN-1) advances on each `advance` pulse; the
// table is read at phase index ((phase_init + step*n*2**FRAC) mod LEN*2**FRAC) >> FRAC, so
// `step` picks the frequency (step*CYCLES/LEN of the sample rate) and `phase_init` an offset
// in 1/2**FRAC table entries. Because the phase is computed from n rather than accumulated,
// a change of step or phase_init takes effect at once with the phase the new frequency
// would have had since reset.
//
// Timing: `lo` is registered and always holds the value for the current sample n; an
// `advance` in cycle t makes `lo` show sample n+1 in cycle t+1. Reset sets n to 0.
//
// Storing one period of the carrier in an on-chip table follows the receiver's description;
// the phase arithmetic and the fractional phase offset are this design's own.
module lo_dds
  import rx_pkg::*;
#(
  parameter int LEN    = LO1_LEN,
  parameter int CYCLES = LO1_CYCLES,
  parameter int FRAC   = 0,
  parameter int STEP_W = 6
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          advance,
  input  logic [STEP_W-1:0]             step,
  input  logic [$clog2(LEN)+FRAC-1:0]   phase_init,
  output lo_t                           lo
);
  localparam int IDX_W = $clog2(LEN);
  localparam longint MODULUS = longint'(LEN) << FRAC;

  lo_t table_q[LEN];

  initial begin
    for (int i = 0; i < LEN; i++)
      table_q[i] = lo_t'($rtoi($floor(2047.0 * $cos(2.0 * PI * real'((longint'(CYCLES) * i) % longint'(LEN)) / LEN) + 0.5)));
  end

  logic [IDX_W-1:0] n_q, n_next;
  logic [IDX_W-1:0] idx_next;

  always_comb begin
    longint p;
    n_next  = rst ? '0 : advance ? ((n_q == IDX_W'(LEN - 1)) ? '0 : n_q + 1'b1) : n_q;
    p       = (longint'(phase_init) + ((longint'(step) * longint'(n_next)) << FRAC)) % MODULUS;
    idx_next = IDX_W'(p >> FRAC);     // whole table entries; the fraction is dropped
  end

  always_ff @(posedge clk) begin
    n_q <= n_next;
    lo <= table_q[idx_next];
  end

endmodule
