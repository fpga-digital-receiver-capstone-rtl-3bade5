// fir_mac: time-shared FIR engine with one multiply-accumulate unit.
//
// The 800 kHz filters have many clocks per sample (375 at a 300 MHz clock), so one
// multiplier computes all taps of an output in turn. Each accepted sample is written into a
// circular sample buffer of N_MAX entries; the engine then walks k = 0 .. ntaps-1, reading
// x(n-k) from the buffer and h(k) from an external coefficient memory through
// `coef_addr`, and accumulates h(k) * x(n-k). The number of taps is an input, so one engine
// serves filters of different lengths (242 or 369 taps for the two channel plans); the
// length is sampled with each input sample, so a change never disturbs a running output.
//
// Interface: `in_valid`/`x` deliver a sample; it is accepted only while `ready` is high (an
// assertion checks that the source never sends while busy). `coef_addr` is the tap index;
// the coefficient memory must return `coef` one clock later. `out_valid` pulses with the
// result y(n) = sat(round(sum h(k) x(n-k) / 2**17)).
//
// Timing: y(n) appears ntaps + 2 clocks after x(n) is accepted, and `ready` returns the
// clock after y(n); with 375 clocks between samples any ntaps up to 373 keeps up.
// The sample buffer starts cleared, as a memory with initial contents; it is not cleared by
// reset. The time-shared structure is this design's choice; the receiver only asks for an
// FIR whose taps come from an on-chip table and are convolved with the data.
module fir_mac
  import rx_pkg::*;
#(
  parameter int N_MAX = BPF8_TAPS
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic [$clog2(N_MAX+1)-1:0] ntaps,
  input  logic                       in_valid,
  input  sample_t                    x,
  output logic                       ready,
  output logic [$clog2(N_MAX)-1:0]   coef_addr,
  input  coef_t                      coef,
  output logic                       out_valid,
  output sample_t                    y
);
  localparam int AW = $clog2(N_MAX);

  sample_t mem[N_MAX];
  initial for (int i = 0; i < N_MAX; i++) mem[i] = '0;

  logic [AW-1:0]           wptr, base, k;
  logic [$clog2(N_MAX+1)-1:0] n_run;   // ntaps, held for the output being computed
  logic                    k_last;
  logic                    running;
  logic                    p_valid, p_last;
  sample_t                 rd;
  logic signed [63:0]      acc, sum;
  logic [AW-1:0]           rd_idx;

  assign ready     = !running && !p_valid;
  assign coef_addr = k;

  always_comb begin
    rd_idx = (base >= k) ? base - k : AW'(int'(base) + N_MAX - int'(k));
    sum    = acc + 64'(coef * rd);
    k_last = (32'(k) + 1 >= 32'(n_run));
  end

  always_ff @(posedge clk) begin
    if (in_valid && ready) mem[wptr] <= x;
    if (running)           rd <= mem[rd_idx];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr      <= '0;
      base      <= '0;
      k         <= '0;
      n_run     <= '0;
      running   <= 1'b0;
      p_valid   <= 1'b0;
      p_last    <= 1'b0;
      acc       <= '0;
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid && ready) begin
        base    <= wptr;
        wptr    <= (wptr == AW'(N_MAX - 1)) ? '0 : wptr + 1'b1;
        k       <= '0;
        n_run   <= ntaps;
        running <= 1'b1;
      end
      p_valid <= running;
      p_last  <= running && k_last;
      if (running) begin
        k <= k + 1'b1;
        if (k_last) running <= 1'b0;
      end
      if (p_valid) begin
        if (p_last) begin
          acc       <= '0;
          out_valid <= 1'b1;
          y         <= saturate((sum + (64'sd1 <<< (COEF_W - 2))) >>> (COEF_W - 1));
        end else begin
          acc <= sum;
        end
      end
    end
  end

  // A sample offered while the engine is busy would be lost.
  a_no_overrun: assert property (@(posedge clk) disable iff (rst) in_valid |-> ready)
    else $error("fir_mac: sample offered while busy");

endmodule
