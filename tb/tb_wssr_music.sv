// tb_wssr_music: random sets of P unit-norm complex eigenvectors (Q1.15)
// and every N-hat from 0 to P-1. Expected P_MU(k) is worked out here: for
// each noise eigenvector (index >= N-hat) the inner product a_k^H w is
// summed with the MU block's scaling (product >>> 15 per term), squared
// into Q.12 (>> 18, saturating at 16 bits), summed over eigenvectors and
// inverted as 2^20 / sum (Q8.8, saturating). a_k(i) = exp(j2*pi*c_i*k/L)
// is taken from the twiddle table. Also checks done comes P*P+4 cycles
// after start.
module tb_wssr_music;
  import wssr_pkg::*;
  localparam int P = P_COSETS;
  localparam int L = L_SUB;
  logic clk = 0, rst_n = 0, start = 0, done;
  logic [3:0] n_hat;
  cpx_t w [P][P];
  logic [PMU_W-1:0] pmu [L];
  int checks = 0, failures = 0;

  wssr_music #(.P(P), .L(L)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned pmu_ref(int k, int nh);
    longint reg4 = 0;
    for (int j = nh; j < P; j++) begin
      longint sr = 0, si = 0, m2;
      for (int e = 0; e < P; e++) begin
        cpx_t a;
        longint pr, pi;
        a = cpx_t'(TWIDDLE[(C_OFF[e] * k) % L]);
        pr = longint'(w[j][e].re) * a.re + longint'(w[j][e].im) * a.im;
        pi = longint'(w[j][e].im) * a.re - longint'(w[j][e].re) * a.im;
        sr += pr >>> 15;
        si += pi >>> 15;
      end
      m2 = (sr * sr + si * si) >> 18;
      reg4 += (m2 > 65535) ? 65535 : m2;
    end
    if (reg4 == 0) return 65535;
    return ((1 << 20) / reg4 > 65535) ? 65535 : int'((1 << 20) / reg4);
  endfunction

  initial begin
    n_hat = 0;
    for (int j = 0; j < P; j++) for (int e = 0; e < P; e++) w[j][e] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 24; trial++) begin
      int cyc;
      for (int j = 0; j < P; j++) begin
        real vr [P], vi [P], nrm;
        nrm = 0;
        for (int e = 0; e < P; e++) begin
          vr[e] = real'($urandom_range(0, 2000)) - 1000.0;
          vi[e] = real'($urandom_range(0, 2000)) - 1000.0;
          nrm += vr[e] * vr[e] + vi[e] * vi[e];
        end
        nrm = $sqrt(nrm);
        for (int e = 0; e < P; e++) begin
          w[j][e].re = 16'($rtoi(vr[e] / nrm * 32000.0));
          w[j][e].im = 16'($rtoi(vi[e] / nrm * 32000.0));
        end
      end
      n_hat = 4'(trial % P);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done && cyc < 200) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != P * P + 4) begin failures++; $display("latency %0d", cyc); end
      for (int k = 0; k < L; k++) begin
        int unsigned e;
        e = pmu_ref(k, trial % P);
        checks++;
        if (pmu[k] != 16'(e)) begin
          failures++;
          if (failures < 10) $display("trial %0d P_MU(%0d) = %0d expected %0d", trial, k, pmu[k], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
