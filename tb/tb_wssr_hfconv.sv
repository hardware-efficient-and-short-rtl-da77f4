// tb_wssr_hfconv: feeds NS random samples, each held for L cycles with the
// coefficient pair (h[j], h[L+j]) as the CS block supplies it, followed by
// zeros. The expected x_h[n] = x[i]h[j] + x[i-1]h[L+j] (n = iL+j) is
// formed here from the coefficient table with the same truncation to
// bits [30:15]; output n must appear in cycle n + L + 1.
module tb_wssr_hfconv;
  import wssr_pkg::*;
  localparam int L  = L_SUB;
  localparam int NS = 12;
  logic clk = 0, rst_n = 0;
  cpx_t data, h_l, h_r, xh;
  cpx_t xs [NS+2];
  int checks = 0, failures = 0;

  wssr_hfconv #(.L(L)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cpx_t expect_xh(int n);
    int i, j;
    longint sr, si;
    cpx_t hr, hl, r;
    i = n / L;
    j = n % L;
    sr = 0;
    si = 0;
    hr = cpx_t'(H_COEF[j]);
    hl = cpx_t'(H_COEF[L+j]);
    if (i < NS + 2) begin
      sr += longint'(xs[i].re) * hr.re - longint'(xs[i].im) * hr.im;
      si += longint'(xs[i].re) * hr.im + longint'(xs[i].im) * hr.re;
    end
    if (i >= 1) begin
      sr += longint'(xs[i-1].re) * hl.re - longint'(xs[i-1].im) * hl.im;
      si += longint'(xs[i-1].re) * hl.im + longint'(xs[i-1].im) * hl.re;
    end
    r.re = 16'(sr >>> 15);
    r.im = 16'(si >>> 15);
    return r;
  endfunction

  initial begin
    for (int i = 0; i < NS + 2; i++) begin
      xs[i].re = (i < NS) ? 16'($urandom) : '0;
      xs[i].im = (i < NS) ? 16'($urandom) : '0;
    end
    xs[0] = {16'sh7fff, 16'sh8000};
    data = '0; h_l = '0; h_r = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    fork
      begin
        for (int n = 0; n < (NS + 2) * L; n++) begin
          data = xs[n / L];
          h_r  = cpx_t'(H_COEF[n % L]);
          h_l  = cpx_t'(H_COEF[L + n % L]);
          @(negedge clk);
        end
      end
      begin
        repeat (L + 1) @(negedge clk);
        for (int n = 0; n < (NS + 1) * L; n++) begin
          cpx_t e;
          e = expect_xh(n);
          checks++;
          if (xh != e) begin
            failures++;
            if (failures < 10) $display("x_h[%0d] = %h expected %h", n, xh, e);
          end
          @(negedge clk);
        end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
