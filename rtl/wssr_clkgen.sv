// wssr_clkgen: clock generation and switching for the sensor.
//
// The sensor loads its sample store at the sampler's clock CLK1 and runs the
// rest of the computation at the faster-logic clock CLK2. This block
//   * makes CLK2 by dividing clk_fast by two (a toggle flip-flop), and
//   * switches the sensor clock clk_out from clk1 to clk2 when sel (FnSgn)
//     rises, without glitches: each clock's enable is set only after the
//     other enable has been seen low, and changes on that clock's falling
//     edge, so neither clock is cut short.
// After reset clk1 is selected. After sel rises clk_out stays low for up to
// two clk1 and two clk2 periods during the hand-over. The divide-by-two
// and the 2:1 clock multiplexer are from the published design; the
// glitch-free enable scheme is this design's choice.
module wssr_clkgen (
  input  logic clk1,
  input  logic clk_fast,
  input  logic rst_n,
  input  logic sel,
  output logic clk2,
  output logic clk_out
);
  logic en1_p, en1_n, en2_p, en2_n;

  always_ff @(posedge clk_fast or negedge rst_n) begin
    if (!rst_n) clk2 <= 1'b0;
    else        clk2 <= ~clk2;
  end

  always_ff @(posedge clk1 or negedge rst_n) begin
    if (!rst_n) en1_p <= 1'b1;
    else        en1_p <= ~sel & ~en2_n;
  end
  always_ff @(negedge clk1 or negedge rst_n) begin
    if (!rst_n) en1_n <= 1'b1;
    else        en1_n <= en1_p;
  end

  always_ff @(posedge clk2 or negedge rst_n) begin
    if (!rst_n) en2_p <= 1'b0;
    else        en2_p <= sel & ~en1_n;
  end
  always_ff @(negedge clk2 or negedge rst_n) begin
    if (!rst_n) en2_n <= 1'b0;
    else        en2_n <= en2_p;
  end

  assign clk_out = (clk1 & en1_n) | (clk2 & en2_n);
endmodule
