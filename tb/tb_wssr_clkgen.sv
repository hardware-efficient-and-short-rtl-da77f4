// tb_wssr_clkgen: clk1 has a 10 ns period and clk_fast 6 ns (so clk2 has
// 12 ns). Checks that clk2 toggles on every clk_fast rising edge, that
// clk_out follows clk1 while sel is low and clk2 once the hand-over after
// sel rises is over, that the hand-over finishes within 4 periods, and that
// clk_out never produces a pulse (high or low) shorter than 5 ns.
`timescale 1ns/1ps
module tb_wssr_clkgen;
  logic clk1 = 0, clk_fast = 0, rst_n = 0, sel = 0, clk2, clk_out;
  int checks = 0, failures = 0, n_out = 0, n_1 = 0, n_2 = 0;
  realtime t_last = 0;
  logic c2_prev;

  wssr_clkgen dut (.*);
  always #5 clk1 = ~clk1;
  always #3 clk_fast = ~clk_fast;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // glitch monitor on clk_out
  always @(clk_out) begin
    if (rst_n && $realtime > 30.0) begin
      checks++;
      if ($realtime - t_last < 4.999) begin
        failures++;
        $display("clk_out pulse of %0.3f ns at %0.3f", $realtime - t_last, $realtime);
      end
    end
    t_last = $realtime;
  end

  // clk2 must toggle on every clk_fast rising edge
  always @(posedge clk_fast) begin
    c2_prev = clk2;
    #0.1;
    if (rst_n) begin
      checks++;
      if (clk2 == c2_prev) begin failures++; $display("clk2 did not toggle at %0t", $realtime); end
    end
  end

  always @(posedge clk_out) n_out++;
  always @(posedge clk1) n_1++;
  always @(posedge clk2) n_2++;

  initial begin
    #23 rst_n = 1;
    #200;
    n_out = 0; n_1 = 0;
    #400;
    checks++;
    if (n_out != n_1) begin failures++; $display("before switch: %0d clk_out vs %0d clk1 edges", n_out, n_1); end
    @(negedge clk1);
    sel = 1;
    #48;                         // 4 clk2 periods
    n_out = 0; n_2 = 0;
    #600;
    checks++;
    if (n_out != n_2 || n_2 < 40) begin failures++; $display("after switch: %0d clk_out vs %0d clk2 edges", n_out, n_2); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
