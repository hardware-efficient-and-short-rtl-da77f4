// tb_wssr_top_bands: the whole sensor at its default sizes, sensing three
// band-limited signals rather than tones.
//
// The wideband input spans B_max = 833.3 MHz, sampled with P = 8 cosets of
// L = 22 (subband width 37.88 MHz). It carries three bands, each 37.87 MHz
// wide, centred at 181.77, 395.4 and 586.98 MHz. Each band is built from 16
// equal tones spread evenly across its width with random phases, 0.2 rms in
// all, plus complex Gaussian noise of 0.05 rms per component. With subband
// k covering [k, k+1) * B_max / L, the bands occupy subbands 4.30-5.30,
// 9.94-10.94 and 15.00-16.00: subbands 4, 10 and 15 hold most of a band, and
// subband 5 holds 30% of the first. The eigen-solver is the behavioural
// tb_evd_model.
//
// Checks: N-hat >= 3; pu set (psi = 2.0) for subbands 4, 10 and 15; the
// largest P_MU lies in a subband that a band overlaps ({4, 5, 9, 10, 15});
// every subband two or more subbands away from all
// bands stays below the smallest of P_MU(4), P_MU(10), P_MU(15); every
// P_MU(k) within 5% (+3 LSB) of the value recomputed in real arithmetic from
// the solver's eigenvectors and N-hat; exactly one decision.
`timescale 1ns/1ps
module tb_wssr_top_bands;
  import wssr_pkg::*;
  localparam int  P    = P_COSETS;
  localparam int  L    = L_SUB;
  localparam int  NX   = NX_DEF;
  localparam int  NB   = 3;
  localparam int  NT   = 16;
  localparam real BMAX = 833.3;
  localparam real FC [NB] = '{181.77, 395.4, 586.98};
  localparam real BW   = 37.87;
  localparam real PI   = 3.14159265358979;

  logic clk1 = 0, clk_fast = 0, rst_n = 1, en = 0;
  cpx_t x [P];
  logic [PMU_W-1:0] psi = 16'd512;
  logic clk_sense, fn_sgn, evd_start, evd_done, pu_valid;
  logic signed [31:0] evd_mat [2*P][2*P];
  logic [EV_W-1:0] evd_lambda [2*P];
  logic signed [15:0] evd_vec [2*P][2*P];
  logic [3:0] n_hat;
  logic [PMU_W-1:0] pmu [L];
  logic [L-1:0] pu, must, near, far;

  int checks = 0, failures = 0, n_dec = 0;

  wssr_top dut (.*);
  tb_evd_model #(.N(2*P), .LAT(900)) u_evd (
    .clk(clk_sense), .start(evd_start), .mat(evd_mat), .done(evd_done),
    .lambda(evd_lambda), .vec(evd_vec)
  );

  always #5 clk1 = ~clk1;
  always #4 clk_fast = ~clk_fast;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk_sense) if (pu_valid) n_dec++;

  function automatic real gauss();
    real s;
    s = 0;
    for (int i = 0; i < 12; i++) s += real'($urandom_range(0, 1000000)) / 1000000.0;
    return s - 6.0;
  endfunction

  initial begin
    real ph [NB][NT];
    real fr [NB][NT];
    real amp, lo, hi;
    int  top;
    int  pmin;
    amp = 0.2 / $sqrt(real'(NT));
    // subbands a band overlaps, and those it covers for the most part
    must = '0; near = '0; far = '1;
    for (int b = 0; b < NB; b++) begin
      lo = (FC[b] - BW / 2.0) / BMAX * real'(L);
      hi = (FC[b] + BW / 2.0) / BMAX * real'(L);
      for (int k = 0; k < L; k++) begin
        real ov;
        ov = ((hi < real'(k + 1)) ? hi : real'(k + 1)) - ((lo > real'(k)) ? lo : real'(k));
        if (ov > 0.05) near[k] = 1'b1;
        if (ov > 0.5) must[k] = 1'b1;
        if (real'(k) > lo - 2.0 && real'(k) < hi + 1.0) far[k] = 1'b0;
      end
      for (int t = 0; t < NT; t++) begin
        fr[b][t] = (FC[b] - BW / 2.0 + BW * (real'(t) + 0.5) / real'(NT)) / BMAX;
        ph[b][t] = 2.0 * PI * real'($urandom_range(0, 9999)) / 10000.0;
      end
    end
    $display("must %b near %b far %b", must, near, far);
    for (int i = 0; i < P; i++) x[i] = '0;
    #1 rst_n = 0;
    #22 rst_n = 1;
    repeat (3) @(negedge clk1);
    for (int m = 0; m < NX; m++) begin
      en = 1;
      for (int i = 0; i < P; i++) begin
        real re, im, tt;
        tt = real'(m * L + int'(C_OFF[i]));
        re = 0.05 * gauss();
        im = 0.05 * gauss();
        for (int b = 0; b < NB; b++)
          for (int t = 0; t < NT; t++) begin
            re += amp * $cos(2.0 * PI * fr[b][t] * tt + ph[b][t]);
            im += amp * $sin(2.0 * PI * fr[b][t] * tt + ph[b][t]);
          end
        x[i].re = 16'($rtoi(re * 32767.0));
        x[i].im = 16'($rtoi(im * 32767.0));
      end
      @(negedge clk1);
    end
    en = 0;
    wait (pu_valid === 1'b1);
    @(posedge clk_sense);
    #1;
    $display("N-hat = %0d", n_hat);
    for (int k = 0; k < L; k++) $display("P_MU(%0d) = %0d pu=%0d", k, pmu[k], pu[k]);
    checks++;
    if (n_hat < 4'(NB)) begin failures++; $display("N-hat %0d, below %0d", n_hat, NB); end
    checks++;
    if ((pu & must) != must) begin failures++; $display("pu %b misses %b", pu, must); end
    // the largest statistic lies in a subband a band overlaps (P_MU
    // saturates, so neighbours of a band may tie with it)
    top = 0;
    for (int k = 1; k < L; k++) if (pmu[k] > pmu[top]) top = k;
    checks++;
    if (!near[top]) begin failures++; $display("largest P_MU at subband %0d, no band there", top); end
    pmin = 65536;
    for (int k = 0; k < L; k++) if (must[k] && int'(pmu[k]) < pmin) pmin = int'(pmu[k]);
    for (int k = 0; k < L; k++)
      if (far[k]) begin
        checks++;
        if (int'(pmu[k]) >= pmin) begin failures++; $display("far subband %0d P_MU %0d >= %0d", k, pmu[k], pmin); end
      end
    checks++;
    if (n_dec != 1) begin failures++; $display("%0d decisions", n_dec); end
    // P_MU recomputed from the eigenvectors: the P - N-hat vectors of the
    // smallest eigenvalues span the noise subspace
    begin
      int ord [2*P];
      for (int j = 0; j < 2*P; j++) ord[j] = j;
      for (int a = 0; a < 2*P; a++)
        for (int b = a + 1; b < 2*P; b++)
          if (evd_lambda[ord[b]] > evd_lambda[ord[a]]) begin
            int t; t = ord[a]; ord[a] = ord[b]; ord[b] = t;
          end
      for (int k = 0; k < L; k++) begin
        real den, pr;
        den = 0;
        for (int j = int'(n_hat); j < P; j++) begin
          real sr, si;
          sr = 0; si = 0;
          for (int e = 0; e < P; e++) begin
            real wr, wi, cr, ci, ang;
            wr = real'(evd_vec[ord[2*j]][e]) / 32768.0;
            wi = real'(evd_vec[ord[2*j]][e+P]) / 32768.0;
            ang = 2.0 * PI * real'((int'(C_OFF[e]) * k) % L) / real'(L);
            cr = $cos(ang); ci = $sin(ang);
            sr += wr * cr + wi * ci;
            si += wi * cr - wr * ci;
          end
          den += sr * sr + si * si;
        end
        pr = (den > 0) ? 256.0 / den : 65535.0;
        if (pr > 65535.0) pr = 65535.0;
        checks++;
        if ((real'(pmu[k]) - pr) > 0.05 * pr + 3.0 || (pr - real'(pmu[k])) > 0.05 * pr + 3.0) begin
          failures++; $display("P_MU(%0d) = %0d, recomputed %0.1f", k, pmu[k], pr);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
