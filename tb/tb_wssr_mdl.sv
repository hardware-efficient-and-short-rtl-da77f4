// tb_wssr_mdl: random eigenvalue sets with N = 1..7 large (signal) values
// and P-N small, slightly spread (noise) values, each present twice and
// shuffled over the 2P inputs, as from the real symmetric covariance form.
// The MDL criterion mdl_r = -M*sum log10(l_i) + M(P-r)*log10(sum l_i) + C_r
// (sums over i > r) is evaluated here in real arithmetic from the sorted
// values. Checks: every mdl_r within 30 (0.4% of M*P) of the real value,
// N-hat equal to the real argmin of |mdl_r| (and to the planted N), the
// sort index map, and that done comes no later than 64 cycles after start.
module tb_wssr_mdl;
  import wssr_pkg::*;
  localparam int P = P_COSETS;
  localparam int M = M_DEF;
  logic clk = 0, rst_n = 0, start = 0, done;
  logic [EV_W-1:0] lambda [2*P];
  logic [3:0] n_hat;
  logic [3:0] idx [2*P];
  logic signed [39:0] mdl [P-1];
  int checks = 0, failures = 0;

  wssr_mdl #(.P(P), .M(M)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2*P; i++) lambda[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 70; trial++) begin
      int nsig, cyc, nref;
      int unsigned ev [P];
      int unsigned tmp;
      real best, mref [P-1];
      nsig = 1 + trial % (P - 1);
      for (int i = 0; i < P; i++)
        ev[i] = (i < nsig) ? $urandom_range(3000, 60000) : $urandom_range(116, 124);
      ev.rsort();
      for (int i = 0; i < 2*P; i++) lambda[i] = 16'(ev[i/2]);
      for (int i = 2*P - 1; i > 0; i--) begin
        int j;
        j = $urandom_range(0, i);
        tmp = lambda[i]; lambda[i] = lambda[j]; lambda[j] = 16'(tmp);
      end
      // reference
      nref = 0; best = 0;
      for (int r = 1; r < P; r++) begin
        real sl, ss;
        sl = 0; ss = 0;
        for (int i = r; i < P; i++) begin sl += $log10(real'(ev[i])); ss += real'(ev[i]); end
        mref[r-1] = -M * sl + M * (P - r) * $log10(ss)
                    + 0.5 * r * (2 * P - r) * $log10(real'(M)) + M * (P - r) * $log10(1.0 / (P - r));
        if (nref == 0 || (mref[r-1] < 0 ? -mref[r-1] : mref[r-1]) < best) begin
          best = (mref[r-1] < 0 ? -mref[r-1] : mref[r-1]);
          nref = r;
        end
      end
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done && cyc < 200) begin @(negedge clk); cyc++; end
      checks += 3;
      if (cyc > 64) begin failures++; $display("latency %0d", cyc); end
      if (trial == 0) $display("MDL latency %0d cycles", cyc);
      if (n_hat != 4'(nref)) begin failures++; $display("trial %0d: N-hat %0d, reference %0d", trial, n_hat, nref); end
      if (nref != nsig) begin failures++; $display("trial %0d: reference %0d, planted %0d", trial, nref, nsig); end
      for (int r = 0; r < P - 1; r++) begin
        real hw;
        hw = real'(mdl[r]) / 4096.0;
        checks++;
        if (hw - mref[r] > 30.0 || mref[r] - hw > 30.0) begin
          failures++; $display("trial %0d: mdl_%0d = %f, reference %f", trial, r + 1, hw, mref[r]);
        end
      end
      for (int i = 0; i < P; i++) begin
        checks++;
        if (lambda[idx[2*i]] != 16'(ev[i])) begin failures++; $display("index map at %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
