// tb_wssr_cs: the testbench plays the SD block (NX stored samples per coset,
// advanced by NxtSgn). It checks that NxtSgn pulses once every L cycles and
// NX times in all, that every x_c,i[n] equals the interpolated sample
// x_h,i[n - c_i] worked out here from the coefficient table (zero before the
// delay line fills), that x_c[n] appears in cycle n + L + 1 after FnSgn
// rises, and that enb covers exactly n = DL .. NX*L-1 (first at cycle H+1).
module tb_wssr_cs;
  import wssr_pkg::*;
  localparam int P  = P_COSETS;
  localparam int L  = L_SUB;
  localparam int NX = 4;
  logic clk = 0, rst_n = 0, fn_sgn = 0, nxt_sgn, enb;
  cpx_t d [P];
  cpx_t xc [P];
  cpx_t xs [P][NX];
  int ptr = 0, checks = 0, failures = 0, n_nxt = 0, n_enb = 0, first_enb = -1;

  wssr_cs #(.P(P), .L(L), .NX(NX)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // SD model
  always_ff @(posedge clk) if (fn_sgn && nxt_sgn) ptr <= (ptr + 1) % NX;
  always_comb for (int i = 0; i < P; i++) d[i] = xs[i][ptr];

  function automatic cpx_t xh_ref(int i, int n);
    int q, j;
    longint sr, si;
    cpx_t hr, hl, r;
    r = '0;
    if (n < 0 || n >= NX * L) return r;
    q = n / L; j = n % L;
    hr = cpx_t'(H_COEF[j]); hl = cpx_t'(H_COEF[L+j]);
    sr = longint'(xs[i][q].re) * hr.re - longint'(xs[i][q].im) * hr.im;
    si = longint'(xs[i][q].re) * hr.im + longint'(xs[i][q].im) * hr.re;
    if (q >= 1) begin
      sr += longint'(xs[i][q-1].re) * hl.re - longint'(xs[i][q-1].im) * hl.im;
      si += longint'(xs[i][q-1].re) * hl.im + longint'(xs[i][q-1].im) * hl.re;
    end
    r.re = 16'(sr >>> 15);
    r.im = 16'(si >>> 15);
    return r;
  endfunction

  initial begin
    for (int i = 0; i < P; i++)
      for (int m = 0; m < NX; m++) xs[i][m] = cpx_t'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    fn_sgn = 1;
    for (int t = 0; t < NX * L + L + 30; t++) begin
      // t = cycles since the first FnSgn cycle
      if (nxt_sgn) begin
        n_nxt++;
        checks++;
        if (t % L != L - 1) begin failures++; $display("NxtSgn at cycle %0d", t); end
      end
      if (enb) begin
        if (first_enb < 0) first_enb = t;
        n_enb++;
      end
      if (t >= L + 1 && t < NX * L + L + 1) begin
        int n;
        n = t - L - 1;
        for (int i = 0; i < P; i++) begin
          cpx_t e;
          e = xh_ref(i, n - int'(C_OFF[i]));
          checks++;
          if (xc[i] != e) begin
            failures++;
            if (failures < 10) $display("x_c%0d[%0d] = %h expected %h", i, n, xc[i], e);
          end
        end
      end
      @(negedge clk);
    end
    checks += 3;
    if (n_nxt != NX) begin failures++; $display("%0d NxtSgn pulses", n_nxt); end
    if (first_enb != 2 * L + 1) begin failures++; $display("enb first at %0d", first_enb); end
    if (n_enb != NX * L - int'(DL)) begin failures++; $display("%0d enb cycles", n_enb); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
