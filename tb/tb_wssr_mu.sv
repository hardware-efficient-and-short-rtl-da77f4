// tb_wssr_mu: drives one MU sub-block directly with runs of NV random
// vectors of P elements (random v and steering entry a per element), with
// clr at the start of each run, then fin. Expected P_MU is worked out here:
// sum over vectors of saturate16(((sum (v*conj a).re>>>15)^2 +
// (sum (v*conj a).im>>>15)^2) >> 18), then min(65535, 2^20 / sum).
module tb_wssr_mu;
  import wssr_pkg::*;
  localparam int P = P_COSETS;
  logic clk = 0, rst_n = 0, clr = 0, vld = 0, first = 0, last = 0, fin = 0;
  cpx_t v, a;
  logic [PMU_W-1:0] pmu;
  int checks = 0, failures = 0;

  wssr_mu dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    v = '0; a = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 200; run++) begin
      longint reg4;
      int nv, amp;
      longint expct;
      reg4 = 0;
      nv  = $urandom_range(0, P);
      amp = (run % 4 == 0) ? 32767 : $urandom_range(100, 12000);
      clr = 1;
      @(negedge clk);
      clr = 0;
      for (int j = 0; j < nv; j++) begin
        longint sr, si, m2;
        sr = 0;
        si = 0;
        for (int e = 0; e < P; e++) begin
          v.re = 16'($urandom_range(0, 2 * amp) - amp);
          v.im = 16'($urandom_range(0, 2 * amp) - amp);
          a = cpx_t'(TWIDDLE[$urandom_range(0, L_SUB - 1)]);
          sr += (longint'(v.re) * a.re + longint'(v.im) * a.im) >>> 15;
          si += (longint'(v.im) * a.re - longint'(v.re) * a.im) >>> 15;
          vld = 1; first = (e == 0); last = (e == P - 1);
          @(negedge clk);
        end
        m2 = (sr * sr + si * si) >> 18;
        reg4 += (m2 > 65535) ? 65535 : m2;
        vld = 0; first = 0; last = 0;
        if (j % 2 == 1) @(negedge clk);
      end
      vld = 0;
      repeat (3) @(negedge clk);
      fin = 1;
      @(negedge clk);
      fin = 0;
      expct = (reg4 == 0) ? 65535 : ((((1 << 20) / reg4) > 65535) ? 65535 : (1 << 20) / reg4);
      checks++;
      if (longint'(pmu) != expct) begin
        failures++;
        if (failures < 10) $display("run %0d: P_MU = %0d expected %0d (sum %0d)", run, pmu, expct, reg4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
