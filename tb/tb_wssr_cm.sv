// tb_wssr_cm: streams random x_c vectors with enb toggling (and extra
// vectors after the M-th, which must be ignored) and compares all 2P x 2P
// entries of the real symmetric output with the covariance worked out here
// in 64-bit integers: R_ij = (sum x_i conj(x_j)) >>> log2(M), S = [Re -Im;
// Im Re]. Also checks that done rises after exactly M accepted vectors.
module tb_wssr_cm;
  import wssr_pkg::*;
  localparam int P = P_COSETS;
  localparam int M = 32;
  logic clk = 0, rst_n = 0, enb = 0, done, done_pulse;
  cpx_t xc [P];
  logic signed [31:0] s [2*P][2*P];
  longint are [P][P], aim [P][P];
  int checks = 0, failures = 0, taken = 0, pulses = 0;

  wssr_cm #(.P(P), .M(M)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (done_pulse) pulses++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < P; i++) begin
      xc[i] = '0;
      for (int j = 0; j < P; j++) begin are[i][j] = 0; aim[i][j] = 0; end
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (taken < M + 5) begin
      enb = ($urandom_range(0, 3) != 0);
      for (int i = 0; i < P; i++) xc[i] = cpx_t'($urandom);
      if (taken == 0) xc[0] = {16'sh8000, 16'sh8000};
      if (enb) begin
        if (taken < M)
          for (int i = 0; i < P; i++)
            for (int j = 0; j < P; j++) begin
              are[i][j] += longint'(xc[i].re) * xc[j].re + longint'(xc[i].im) * xc[j].im;
              aim[i][j] += longint'(xc[i].im) * xc[j].re - longint'(xc[i].re) * xc[j].im;
            end
        taken++;
        checks++;
        if (done != (taken > M)) begin failures++; $display("done=%0d after %0d vectors", done, taken - 1); end
      end
      @(negedge clk);
    end
    enb = 0;
    @(negedge clk);
    for (int a = 0; a < 2*P; a++)
      for (int b = 0; b < 2*P; b++) begin
        longint e;
        int i, j;
        i = a % P; j = b % P;
        if ((a < P) == (b < P)) e = are[i][j] >>> $clog2(M);
        else if (a < P)         e = -(aim[i][j] >>> $clog2(M));
        else                    e = aim[i][j] >>> $clog2(M);
        checks++;
        if (longint'(s[a][b]) != longint'(32'(e))) begin
          failures++;
          if (failures < 10) $display("S[%0d][%0d] = %0d expected %0d", a, b, s[a][b], e);
        end
      end
    checks++;
    if (pulses != 1) begin failures++; $display("%0d done pulses", pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
