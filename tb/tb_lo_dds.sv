// tb_lo_dds: checks both oscillator configurations against cosines computed here.
//   - first LO: 3000-entry table of 74.9 MHz at 300 MHz, step 1: for 3100 advances (one full
//     period and a wrap) lo must equal round(2047*cos(2*pi*frac(749*n/3000))).
//   - second LO: 96-entry table, 8 fractional phase bits: for several steps and phase offsets
//     lo must equal the table entry at floor(((phase + step*n*256) mod 24576)/256); a step
//     change must act at once, and lo must hold while `advance` is low.
module tb_lo_dds;
  import rx_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic adv1 = 1'b0;
  lo_t  lo1;
  lo_dds #(.LEN(3000), .CYCLES(749), .FRAC(0), .STEP_W(1)) u1 (
    .clk, .rst, .advance(adv1), .step(1'b1), .phase_init('0), .lo(lo1));

  logic       adv2 = 1'b0;
  logic [5:0] step2 = 6'd3;
  logic [14:0] ph2 = '0;
  lo_t        lo2;
  lo_dds #(.LEN(96), .CYCLES(1), .FRAC(8), .STEP_W(6)) u2 (
    .clk, .rst, .advance(adv2), .step(step2), .phase_init(ph2), .lo(lo2));

  function automatic int ref_cos(real frac_cycle);
    real v;
    v = 2047.0 * $cos(2.0 * 3.141592653589793 * frac_cycle);
    return int'($floor(v + 0.5));
  endfunction

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int n2;
  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    #0.5;
    // first LO
    for (int n = 0; n < 3100; n++) begin
      check(int'(lo1), ref_cos(real'((749 * (n % 3000)) % 3000) / 3000.0), "lo1");
      adv1 = 1'b1;
      @(posedge clk); #0.5;
    end
    adv1 = 1'b0;
    // hold
    begin
      int held;
      held = int'(lo1);
      repeat (5) @(posedge clk);
      #0.5 check(int'(lo1), held, "lo1 hold");
    end
    // second LO: n counts its advances since reset
    n2 = 0;
    foreach (step2_list[i]) begin
      step2 = step2_list[i];
      ph2   = ph_list[i];
      @(posedge clk); #0.5;       // a settings change shows one clock later
      for (int s = 0; s < 200; s++) begin
        int idx;
        idx = ((int'(ph2) + int'(step2) * (n2 % 96) * 256) % 24576) / 256;
        check(int'(lo2), ref_cos(real'(idx) / 96.0), "lo2");
        adv2 = 1'b1;
        @(posedge clk); #0.5;
        n2++;
      end
      adv2 = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [5:0]  step2_list[4] = '{6'd3, 6'd24, 6'd7, 6'd12};
  logic [14:0] ph_list[4]    = '{15'd0, 15'd1000, 15'd24575, 15'd12345};

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
