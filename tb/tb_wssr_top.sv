// tb_wssr_top: one complete sensing run of the whole sensor at its default
// sizes (P = 8, L = 22, NX = 50, M = 1024).
//
// The input is what a multicoset sampler delivers for a wideband signal
// with three occupied subbands: x_i[m] = sum_b g*exp(j*2*pi*f_b*(mL + c_i))
// + complex Gaussian noise, f_b = (k_b + d_b)/L (frequencies normalised to
// B_max), k_b = {4, 11, 16}, d_b = {0.4, 0.5, 0.6}, g = 0.2, noise 0.05 rms
// per component, quantised to Q1.15. The eigen-solver is the behavioural
// tb_evd_model (900-cycle latency).
//
// Checks: FnSgn after exactly NX CLK1 samples; the sensor clock switching
// from CLK1 (10 ns) to CLK2 (16 ns, clk_fast / 2); NX NxtSgn pulses; enb
// skipping the first DL interpolated samples and covering M; exactly one
// covariance result; N-hat >= 3; pu set for subbands 4, 11 and 16 with
// psi = 2.0, and these three carrying the largest P_MU values (neighbouring
// subbands may also pass the threshold through filter leakage); the sensing
// latency at CLK2 (FnSgn to decision) within 5% of 2112 cycles; every P_MU(k)
// within 5% (+3 LSB) of the value recomputed in real arithmetic from the
// solver's eigenvectors and N-hat. Each of these mechanisms must have
// happened.
`timescale 1ns/1ps
module tb_wssr_top;
  import wssr_pkg::*;
  localparam int P  = P_COSETS;
  localparam int L  = L_SUB;
  localparam int NX = NX_DEF;
  localparam int NB = 3;
  localparam int KB [NB] = '{4, 11, 16};
  localparam real DB [NB] = '{0.4, 0.5, 0.6};
  localparam real PI = 3.14159265358979;

  logic clk1 = 0, clk_fast = 0, rst_n = 1, en = 0;
  cpx_t x [P];
  logic [PMU_W-1:0] psi = 16'd512;
  logic clk_sense, fn_sgn, evd_start, evd_done, pu_valid;
  logic signed [31:0] evd_mat [2*P][2*P];
  logic [EV_W-1:0] evd_lambda [2*P];
  logic signed [15:0] evd_vec [2*P][2*P];
  logic [3:0] n_hat;
  logic [PMU_W-1:0] pmu [L];
  logic [L-1:0] pu, pu_exp;

  int checks = 0, failures = 0;
  int n_nxt = 0, n_enb = 0, n_evd = 0, n_loaded = 0, n_sw = 0, n_dec = 0, n_mdl = 0;
  int sense_cyc = 0, lat = -1, first_enb = -1;
  realtime t_prev = 0;

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

  function automatic real gauss();
    real s;
    s = 0;
    for (int i = 0; i < 12; i++) s += real'($urandom_range(0, 1000000)) / 1000000.0;
    return s - 6.0;
  endfunction

  // event counters on the sensor clock
  always @(posedge clk_sense) begin
    if (fn_sgn) sense_cyc++;
    if (dut.nxt_sgn) n_nxt++;
    if (dut.enb) begin
      n_enb++;
      if (first_enb < 0) first_enb = sense_cyc;
    end
    if (evd_start) n_evd++;
    if (dut.mdl_done) n_mdl++;
    if (pu_valid) begin
      n_dec++;
      lat = sense_cyc;
    end
    if (fn_sgn && ($realtime - t_prev) > 15.9 && ($realtime - t_prev) < 16.1) n_sw++;
    t_prev = $realtime;
  end

  initial begin
    real ph [NB];
    pu_exp = '0;
    for (int b = 0; b < NB; b++) begin
      pu_exp[KB[b]] = 1'b1;
      ph[b] = 2.0 * PI * real'($urandom_range(0, 999)) / 1000.0;
    end
    for (int i = 0; i < P; i++) x[i] = '0;
    #1 rst_n = 0;
    #22 rst_n = 1;
    repeat (3) @(negedge clk1);
    for (int m = 0; m < NX; m++) begin
      checks++;
      if (fn_sgn) begin failures++; $display("FnSgn before sample %0d", m); end
      en = 1;
      for (int i = 0; i < P; i++) begin
        real re, im, t;
        t = real'(m * L + int'(C_OFF[i]));
        re = 0.05 * gauss();
        im = 0.05 * gauss();
        for (int b = 0; b < NB; b++) begin
          real f;
          f = (real'(KB[b]) + DB[b]) / real'(L);
          re += 0.2 * $cos(2.0 * PI * f * t + ph[b]);
          im += 0.2 * $sin(2.0 * PI * f * t + ph[b]);
        end
        x[i].re = 16'($rtoi(re * 32767.0));
        x[i].im = 16'($rtoi(im * 32767.0));
      end
      @(negedge clk1);
      n_loaded++;
    end
    en = 0;
    #1;
    checks++;
    if (!fn_sgn) begin failures++; $display("FnSgn missing after %0d samples", n_loaded); end
    wait (pu_valid === 1'b1);
    @(posedge clk_sense);
    #1;
    for (int j = 0; j < 2*P; j++) $display("lambda[%0d] = %0d  mdl %0d", j, evd_lambda[dut.idx[j]], (j < P-1) ? dut.mdl_val[j] / 4096 : 0);
    $display("N-hat = %0d, latency %0d CLK2 cycles, first enb at %0d", n_hat, lat, first_enb);
    for (int k = 0; k < L; k++) $display("P_MU(%0d) = %0d pu=%0d", k, pmu[k], pu[k]);
    checks++;
    if (n_hat < 4'(NB)) begin failures++; $display("N-hat %0d, below %0d", n_hat, NB); end
    checks++;
    if ((pu & pu_exp) != pu_exp) begin failures++; $display("pu %b misses %b", pu, pu_exp); end
    // the occupied subbands must carry the NB largest statistics
    for (int b = 0; b < NB; b++)
      for (int k = 0; k < L; k++)
        if (!pu_exp[k]) begin
          checks++;
          if (pmu[k] >= pmu[KB[b]]) begin
            failures++; $display("P_MU(%0d) = %0d not below occupied P_MU(%0d) = %0d", k, pmu[k], KB[b], pmu[KB[b]]);
          end
        end
    checks++;
    if (n_nxt != NX) begin failures++; $display("%0d NxtSgn pulses", n_nxt); end
    checks++;
    if (n_enb != NX * L - int'(DL)) begin failures++; $display("%0d enb cycles", n_enb); end
    checks++;
    if (n_enb < M_DEF) begin failures++; $display("fewer interpolated samples than M"); end
    checks++;
    if (n_evd != 1 || n_mdl != 1 || n_dec != 1) begin failures++; $display("evd %0d mdl %0d decisions %0d", n_evd, n_mdl, n_dec); end
    checks++;
    if (n_sw == 0) begin failures++; $display("sensor clock never ran at CLK2"); end
    checks++;
    if (lat < 2006 || lat > 2218) begin failures++; $display("latency %0d outside 2112 +- 5%%", lat); end
    // P_MU recomputed here from the solver's eigenvectors and the N-hat
    // found: the P - N-hat vectors of the smallest eigenvalues span E_n.
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
            real wr, wi, ar, ai, ang;
            wr = real'(evd_vec[ord[2*j]][e]) / 32768.0;
            wi = real'(evd_vec[ord[2*j]][e+P]) / 32768.0;
            ang = 2.0 * PI * real'((int'(C_OFF[e]) * k) % L) / real'(L);
            ar = $cos(ang); ai = $sin(ang);
            sr += wr * ar + wi * ai;       // conj(a) * w
            si += wi * ar - wr * ai;
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
    $display("events: loaded=%0d nxt=%0d enb=%0d evd=%0d mdl=%0d clk2_cycles=%0d decisions=%0d",
             n_loaded, n_nxt, n_enb, n_evd, n_mdl, n_sw, n_dec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
