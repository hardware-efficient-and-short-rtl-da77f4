// wssr_detect: primary-user decision for every subband.
//
// pu[k] = 1 (subband k occupied) when P_MU(k) > psi, else 0, for all L
// subbands in parallel. Results are registered when valid_in is high and
// valid_out follows one cycle later; pu holds until the next valid_in.
// The comparison is the published DETECT function; registering it is this
// design's choice.
module wssr_detect
  import wssr_pkg::*;
#(
  parameter int unsigned L = L_SUB
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             valid_in,
  input  logic [PMU_W-1:0] pmu [L],
  input  logic [PMU_W-1:0] psi,
  output logic             valid_out,
  output logic [L-1:0]     pu
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pu        <= '0;
      valid_out <= 1'b0;
    end else begin
      valid_out <= valid_in;
      if (valid_in)
        for (int k = 0; k < int'(L); k++) pu[k] <= (pmu[k] > psi);
    end
  end
endmodule
