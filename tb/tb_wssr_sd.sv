// tb_wssr_sd: loads NX random samples per coset (after some cycles of
// junk with en low), checks that FnSgn rises after exactly NX enabled
// cycles, that the rows hold their data without NxtSgn, that each NxtSgn
// pulse presents the next stored sample in order, and that the row
// recirculates (sample 0 returns after NX pulses) while x is ignored.
module tb_wssr_sd;
  import wssr_pkg::*;
  localparam int P  = P_COSETS;
  localparam int NX = 10;
  logic clk = 0, rst_n = 0, en = 0, nxt_sgn = 0, fn_sgn;
  cpx_t x [P];
  cpx_t d [P];
  cpx_t mem [P][NX];
  int checks = 0, failures = 0;

  wssr_sd #(.P(P), .NX(NX)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_out(int m, string what);
    for (int i = 0; i < P; i++) begin
      checks++;
      if (d[i] != mem[i][m % NX]) begin
        failures++;
        $display("%s: coset %0d shows %h, expected sample %0d = %h", what, i, d[i], m % NX, mem[i][m % NX]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < P; i++) x[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) begin
      for (int i = 0; i < P; i++) x[i] = cpx_t'($urandom);
      @(negedge clk);
    end
    for (int m = 0; m < NX; m++) begin
      en = 1;
      for (int i = 0; i < P; i++) begin
        mem[i][m] = cpx_t'($urandom);
        x[i] = mem[i][m];
      end
      checks++;
      if (fn_sgn) begin failures++; $display("FnSgn early at %0d", m); end
      @(negedge clk);
    end
    checks++;
    if (!fn_sgn) begin failures++; $display("FnSgn not raised after NX samples"); end
    for (int i = 0; i < P; i++) x[i] = cpx_t'($urandom);
    check_out(0, "first");
    repeat (5) @(negedge clk);
    check_out(0, "hold");
    for (int m = 1; m <= 2 * NX; m++) begin
      nxt_sgn = 1;
      @(negedge clk);
      nxt_sgn = 0;
      for (int i = 0; i < P; i++) x[i] = cpx_t'($urandom);
      check_out(m, "step");
      if (m % 3 == 0) begin
        @(negedge clk);
        check_out(m, "hold2");
      end
    end
    checks++;
    if (!fn_sgn) begin failures++; $display("FnSgn dropped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
