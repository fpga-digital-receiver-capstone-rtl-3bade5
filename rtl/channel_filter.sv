// channel_filter: channel-selection band-pass filter bank.
//
// Selects one channel out of the 0..200 kHz band at 800 kHz. A coefficient table holds one
// band-pass filter per channel: 8 filters of 242 taps for the 25 kHz plan (centres 25, 50 ..
// 200 kHz; pass +-10 kHz, stop from +-17 kHz) and 12 filters of 369 taps for the 8.33 kHz
// plan (centres 8.33 .. 100 kHz; pass +-2.78 kHz, stop from +-7.37 kHz). `coef_base` and
// `ntaps` (from channel_decoder) pick the filter; a fir_mac engine convolves the data with
// it. Switching channel only changes the table window that is read.
//
// Tap values: every channel has its own equiripple band-pass filter, designed at
// elaboration by the Parks-McClellan (Remez exchange) algorithm in the task remez_bp below:
// a stop band from 0 to fc - stop edge, a pass band fc -+ pass edge and a stop band from
// fc + stop edge to 400 kHz, grid density 20, pass-band weight 1 and stop-band weight dp/ds
// for 1 dB pass-band ripple and 65 dB stop-band attenuation. Each filter is then scaled to
// unity gain at its centre frequency. Filter lengths, band edges, ripple and attenuation
// targets, the equiripple method and the one-stored-filter-per-channel organisation follow
// the receiver's design; the barycentric form of the exchange algorithm and the centre-gain
// scaling are this design's own. At these lengths the design reaches about 61 dB (242 taps)
// and 59.5 dB (369 taps) at the stop edges, with a pass-band ripple of about +-0.09 and
// +-0.11 before scaling.
//
// Timing: y(n) follows x(n) by ntaps + 2 clocks. Group delay is (ntaps-1)/2 samples.
module channel_filter
  import rx_pkg::*;
#(
  parameter int DEPTH = BPF_BANK_DEPTH
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic [$clog2(DEPTH)-1:0]      coef_base,
  input  logic [$clog2(BPF8_TAPS+1)-1:0] ntaps,
  input  logic                          in_valid,
  input  sample_t                       x,
  output logic                          ready,
  output logic                          out_valid,
  output sample_t                       y
);
  localparam int AW = $clog2(DEPTH);

  // Remez exchange sizes: at most L+2 = (N-1)/2 + 2 extremal frequencies and a grid of
  // GRID_DENSITY points per approximating function.
  localparam int GRID_DENSITY = 20;
  localparam int R_MAX        = (BPF8_TAPS - 1) / 2 + 2;
  localparam int GRID_MAX     = GRID_DENSITY * (R_MAX - 1) + 4;
  localparam int MAX_ITER     = 60;

  coef_t rom[DEPTH];

  // Working storage of the exchange algorithm (elaboration only).
  real gx[GRID_MAX], gd[GRID_MAX], gw[GRID_MAX], ge[GRID_MAX];
  int  gband[GRID_MAX];
  int  ext[R_MAX], cand[GRID_MAX];
  real ex_x[R_MAX], ex_c[R_MAX], ex_b[R_MAX];
  real h_bp[BPF8_TAPS];
  real band_lo[3], band_hi[3], band_d[3], band_w[3];
  int  n_bands, n_interp;

  // Barycentric evaluation of the current approximation at x = cos(2*pi*f).
  function automatic real interp(real xv);
    real num, den, t;
    num = 0.0;
    den = 0.0;
    for (int j = 0; j < n_interp; j++) begin
      if (xv == ex_x[j]) return ex_c[j];
      t   = ex_b[j] / (xv - ex_x[j]);
      num = num + t * ex_c[j];
      den = den + t;
    end
    return num / den;
  endfunction

  // Equiripple filter of ntap taps into h_bp[]: n_bands bands [band_lo, band_hi] with
  // target band_d and weight band_w (frequencies as fractions of the sample rate).
  task automatic remez_bp(int ntap);
    bit  odd;
    int  l, r, ng, npt, nc, na, kk;
    real delf, hi, f, q, delta, num, den, emax, lg_max, m;
    real lg[R_MAX], sg[R_MAX];
    odd  = (ntap % 2) == 1;
    l    = odd ? (ntap - 1) / 2 : ntap / 2 - 1;
    r    = l + 2;
    delf = 0.5 / (GRID_DENSITY * (l + 1));

    // dense grid over the bands; an even length has a zero at 0.5, so its grid stops one
    // step short of it and the target is divided by cos(pi f)
    ng = 0;
    for (int b = 0; b < n_bands; b++) begin
      hi  = (!odd && band_hi[b] > 0.5 - delf) ? 0.5 - delf : band_hi[b];
      npt = $rtoi($floor((hi - band_lo[b]) / delf)) + 1;
      if (npt < 2) npt = 2;
      for (int i = 0; i < npt; i++) begin
        f         = band_lo[b] + (hi - band_lo[b]) * i / (npt - 1);
        gd[ng]    = band_d[b];
        gw[ng]    = band_w[b];
        gband[ng] = b;
        gx[ng]    = $cos(2.0 * PI * f);
        if (!odd) begin
          q      = $cos(PI * f);
          gd[ng] = gd[ng] / q;
          gw[ng] = gw[ng] * q;
        end
        ng++;
      end
    end
    for (int j = 0; j < r; j++) ext[j] = j * (ng - 1) / (r - 1);

    for (int it = 0; it < MAX_ITER; it++) begin
      // weights of the r-point interpolation, kept as log magnitude and sign to stay in range
      for (int j = 0; j < r; j++) begin
        lg[j] = 0.0;
        sg[j] = 1.0;
        for (int i = 0; i < r; i++)
          if (i != j) begin
            num   = gx[ext[j]] - gx[ext[i]];
            lg[j] = lg[j] - $ln(num < 0.0 ? -num : num);
            if (num < 0.0) sg[j] = -sg[j];
          end
      end
      lg_max = lg[0];
      for (int j = 1; j < r; j++) if (lg[j] > lg_max) lg_max = lg[j];
      num = 0.0;
      den = 0.0;
      for (int j = 0; j < r; j++) begin
        lg[j] = sg[j] * $exp(lg[j] - lg_max);
        num   = num + lg[j] * gd[ext[j]];
        den   = den + lg[j] * ((j % 2 == 0) ? 1.0 : -1.0) / gw[ext[j]];
      end
      delta = num / den;
      // interpolate through the first r-1 extremal points at the levels D -+ delta/W
      n_interp = r - 1;
      for (int j = 0; j < r - 1; j++) begin
        ex_x[j] = gx[ext[j]];
        ex_c[j] = gd[ext[j]] - ((j % 2 == 0) ? 1.0 : -1.0) * delta / gw[ext[j]];
        ex_b[j] = lg[j] * (gx[ext[j]] - gx[ext[r - 1]]);
      end
      emax = 0.0;
      for (int i = 0; i < ng; i++) begin
        ge[i] = gw[i] * (gd[i] - interp(gx[i]));
        if ((ge[i] < 0.0 ? -ge[i] : ge[i]) > emax) emax = ge[i] < 0.0 ? -ge[i] : ge[i];
      end
      // new extremal set: local extrema of the error within each band, alternating in sign
      nc = 0;
      for (int i = 0; i < ng; i++) begin
        bit lo_ok, hi_ok;
        if (ge[i] > 0.0) begin
          lo_ok = (i == 0)      || gband[i - 1] != gband[i] || ge[i] >= ge[i - 1];
          hi_ok = (i == ng - 1) || gband[i + 1] != gband[i] || ge[i] >= ge[i + 1];
        end else if (ge[i] < 0.0) begin
          lo_ok = (i == 0)      || gband[i - 1] != gband[i] || ge[i] <= ge[i - 1];
          hi_ok = (i == ng - 1) || gband[i + 1] != gband[i] || ge[i] <= ge[i + 1];
        end else begin
          lo_ok = 1'b0;
          hi_ok = 1'b0;
        end
        if (lo_ok && hi_ok) begin
          if (nc > 0 && ((ge[i] > 0.0) == (ge[cand[nc - 1]] > 0.0))) begin
            if ((ge[i] < 0.0 ? -ge[i] : ge[i]) >
                (ge[cand[nc - 1]] < 0.0 ? -ge[cand[nc - 1]] : ge[cand[nc - 1]]))
              cand[nc - 1] = i;
          end else begin
            cand[nc] = i;
            nc++;
          end
        end
      end
      if (nc < r) break;
      // drop surplus extrema from the ends, the smaller one first
      kk = 0;
      na = nc;
      while (na > r) begin
        if ((ge[cand[kk]] < 0.0 ? -ge[cand[kk]] : ge[cand[kk]]) <
            (ge[cand[kk + na - 1]] < 0.0 ? -ge[cand[kk + na - 1]] : ge[cand[kk + na - 1]]))
          kk++;
        na--;
      end
      for (int j = 0; j < r; j++) ext[j] = cand[kk + j];
      if ((emax - (delta < 0.0 ? -delta : delta)) < 1.0e-6 * emax) break;
    end

    // taps from samples of the response at f = k/ntap (inverse DFT of a real, even response)
    m = (ntap - 1) / 2.0;
    for (int n = 0; n < ntap; n++) h_bp[n] = 0.0;
    for (int k = 0; k <= (ntap - 1) / 2; k++) begin
      f = real'(k) / ntap;
      q = interp($cos(2.0 * PI * f));
      if (!odd) q = q * $cos(PI * f);
      for (int n = 0; n < ntap; n++)
        h_bp[n] = h_bp[n] + ((k == 0) ? 1.0 : 2.0) * q * $cos(2.0 * PI * f * (n - m)) / ntap;
    end
  endtask

  // Fill the filters of one plan: design each channel's band-pass and store it scaled to
  // unity gain at the channel centre.
  task automatic fill_plan(int base, int ntap, int nch, real half_pass, real half_stop,
                           real spacing);
    real fc, g, m, ws;
    ws = ((10.0 ** (1.0 / 20.0) - 1.0) / (10.0 ** (1.0 / 20.0) + 1.0)) / (10.0 ** (-65.0 / 20.0));
    m  = (ntap - 1) / 2.0;
    for (int c = 1; c <= nch; c++) begin
      fc      = c * spacing / 800.0e3;
      n_bands = 0;
      if (c * spacing > half_stop) begin
        band_lo[n_bands] = 0.0;
        band_hi[n_bands] = fc - half_stop / 800.0e3;
        band_d[n_bands]  = 0.0;
        band_w[n_bands]  = ws;
        n_bands++;
      end
      band_lo[n_bands] = fc - half_pass / 800.0e3;
      band_hi[n_bands] = fc + half_pass / 800.0e3;
      band_d[n_bands]  = 1.0;
      band_w[n_bands]  = 1.0;
      n_bands++;
      band_lo[n_bands] = fc + half_stop / 800.0e3;
      band_hi[n_bands] = 0.5;
      band_d[n_bands]  = 0.0;
      band_w[n_bands]  = ws;
      n_bands++;
      remez_bp(ntap);
      g = 0.0;
      for (int k = 0; k < ntap; k++) g = g + h_bp[k] * $cos(2.0 * PI * fc * (k - m));
      for (int k = 0; k < ntap; k++)
        if (base + (c - 1) * ntap + k < DEPTH)
          rom[base + (c - 1) * ntap + k] = quantize_coef(h_bp[k] / g);
    end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) rom[i] = '0;
    fill_plan(0, BPF25_TAPS, N_CH25, 10.0e3, 17.0e3, 25.0e3);
    fill_plan(N_CH25 * BPF25_TAPS, BPF8_TAPS, N_CH8, 2.78e3, 7.37e3, 25.0e3 / 3.0);
  end

  logic [$clog2(BPF8_TAPS)-1:0] k;
  logic [AW-1:0]                addr;
  coef_t                        coef;

  always_comb addr = AW'(int'(coef_base) + int'(k));
  always_ff @(posedge clk) coef <= rom[addr];

  fir_mac #(.N_MAX(BPF8_TAPS)) u_mac (
    .clk, .rst, .ntaps,
    .in_valid, .x, .ready,
    .coef_addr (k),
    .coef      (coef),
    .out_valid, .y
  );

endmodule
