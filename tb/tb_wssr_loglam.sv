// tb_wssr_loglam: random 19-bit inputs over the whole range (and 0, 1,
// powers of two); compares y with round(log10(v) * 4096) computed in real
// arithmetic, allowing 3 LSB, and checks done comes 17 cycles after start.
module tb_wssr_loglam;
  import wssr_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done;
  logic [SUM_W-1:0] v;
  logic signed [LOG_W-1:0] y;
  int checks = 0, failures = 0;

  wssr_loglam #(.W(SUM_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int unsigned val);
    int cyc = 0;
    real ref_y;
    @(negedge clk);
    v = SUM_W'(val); start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin @(negedge clk); cyc++; end
    ref_y = (val == 0) ? 0.0 : $log10(real'(val)) * 4096.0;
    checks += 2;
    if (cyc != 16) begin failures++; $display("latency %0d", cyc + 1); end
    if ((real'(y) - ref_y) > 3.0 || (ref_y - real'(y)) > 3.0) begin
      failures++; $display("log10(%0d): %0d expected %f", val, y, ref_y);
    end
  endtask

  initial begin
    v = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(0); run(1); run(2); run(10); run(1000); run(524287);
    for (int b = 0; b < SUM_W; b++) run(1 << b);
    for (int n = 0; n < 300; n++) run($urandom_range(1, 524287) >> $urandom_range(0, 18));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
