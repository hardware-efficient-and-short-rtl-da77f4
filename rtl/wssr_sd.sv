// wssr_sd: storing-data (SD) block.
//
// Holds the last NX samples of each of the P coset streams in P rows of NX
// one-data-store (ODS) cells. Each ODS cell is a 32-bit register with a 2:1
// multiplexer: select 0 loads the previous cell, select 1 holds, and the
// select is FnSgn XOR NxtSgn. At the head of every row a second multiplexer
// (MUX1) chooses the coset input x (FnSgn = 0) or the row's own last cell
// (FnSgn = 1), so after loading, every NxtSgn pulse rotates the row by one
// and the next stored sample appears at the row output d.
//
// A modulo-NX counter counts the cycles with en = 1 while loading; when it
// has counted NX samples FnSgn rises and stays high until reset. While
// FnSgn = 0 the rows shift every cycle, so the samples kept are the last NX
// presented; present valid data on every cycle with en = 1.
// Timing: sample x[0] (first with en = 1) is at d on the first cycle with
// FnSgn = 1; x[m] follows after m NxtSgn pulses. The counter width, the
// sticky FnSgn and the reset are this design's choices; the cell structure
// follows the published SD micro-architecture.
module wssr_sd
  import wssr_pkg::*;
#(
  parameter int unsigned P  = P_COSETS,
  parameter int unsigned NX = NX_DEF
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  cpx_t x   [P],
  input  logic nxt_sgn,
  output logic fn_sgn,
  output cpx_t d   [P]
);
  localparam int unsigned CW = $clog2(NX + 1);

  cpx_t            ods [P][NX];
  logic [CW-1:0]   cnt;
  logic            ods_sel;

  assign ods_sel = fn_sgn ^ nxt_sgn;

  // MOD-NX counter and FnSgn
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      fn_sgn <= 1'b0;
    end else if (en && !fn_sgn) begin
      if (cnt == CW'(NX - 1)) begin
        cnt    <= '0;
        fn_sgn <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  // ODS rows
  always_ff @(posedge clk) begin
    for (int i = 0; i < int'(P); i++) begin
      if (!ods_sel) begin
        ods[i][0] <= fn_sgn ? ods[i][NX-1] : x[i];
        for (int k = 1; k < int'(NX); k++) ods[i][k] <= ods[i][k-1];
      end
    end
  end

  always_comb begin
    for (int i = 0; i < int'(P); i++) d[i] = ods[i][NX-1];
  end
endmodule
