// tb_wssr_detect: random P_MU vectors and thresholds (including equality);
// checks pu[k] = (pmu[k] > psi) one cycle after valid_in and that pu holds
// while valid_in is low.
module tb_wssr_detect;
  import wssr_pkg::*;
  localparam int L = L_SUB;
  logic clk = 0, rst_n = 0, valid_in = 0, valid_out;
  logic [PMU_W-1:0] pmu [L];
  logic [PMU_W-1:0] psi;
  logic [L-1:0] pu, expct;
  int checks = 0, failures = 0;

  wssr_detect #(.L(L)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    psi = 0;
    for (int k = 0; k < L; k++) pmu[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      psi = 16'($urandom_range(0, 2000));
      for (int k = 0; k < L; k++) begin
        case ($urandom_range(0, 3))
          0: pmu[k] = psi;
          1: pmu[k] = psi + 1;
          default: pmu[k] = 16'($urandom_range(0, 4000));
        endcase
        expct[k] = (pmu[k] > psi);
      end
      valid_in = 1;
      @(negedge clk);
      valid_in = 0;
      checks += 2;
      if (!valid_out) begin failures++; $display("valid_out missing"); end
      if (pu !== expct) begin failures++; $display("pu %h expected %h", pu, expct); end
      for (int k = 0; k < L; k++) pmu[k] = ~pmu[k];
      @(negedge clk);
      checks++;
      if (pu !== expct || valid_out) begin failures++; $display("pu not held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
