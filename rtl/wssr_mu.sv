// wssr_mu: one MU sub-block of the MUSIC stage (one subband k).
//
// Accumulates ||a_k^H E_n||^2 over the noise eigenvectors and inverts it:
//   * M_cm multiplies the incoming eigenvector element v by conj(a) (a is
//     the steering-matrix entry A(count1, k)); Adder1/Adder2 accumulate real
//     and imaginary parts into REG1/REG2 over the P elements of one
//     eigenvector (first = 1 restarts the sums). Sums are kept in Q.15.
//   * One cycle after the last element, M1/M2 square REG1 and REG2 and
//     Adder3 forms |a^H w|^2 into REG3 (16-bit unsigned, Q4.12, saturating).
//   * The cycle after, Adder4 adds REG3 into REG4 (20 bits, Q.12).
//   * fin loads P_MU = 1 / REG4 into pmu, unsigned Q8.8 saturating at
//     0xFFFF (also for REG4 = 0).
// clr clears REG4 for a new run. Eigenvectors of the signal subspace are
// presented as zeros by the caller, so they add nothing.
// The chain M_cm -> Adder1/2 -> REG1/2 -> M1/M2 -> Adder3 -> REG3 ->
// Adder4 -> REG4 -> divider follows the published MU sub-block; the number
// formats are this design's.
module wssr_mu
  import wssr_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             vld,
  input  logic             first,
  input  logic             last,
  input  logic             fin,
  input  cpx_t             v,
  input  cpx_t             a,
  output logic [PMU_W-1:0] pmu
);
  cpx_wide_t          prod;
  logic signed [31:0] reg1, reg2;
  logic [15:0]        reg3;
  logic [19:0]        reg4;
  logic               last_d, sq_d;
  logic [63:0]        mag2;
  logic [43:0]        quo;

  wssr_cmul #(.CONJ_B(1'b1)) u_mcm (.a(v), .b(a), .p(prod));

  always_comb begin
    mag2 = 64'(reg1 * reg1) + 64'(reg2 * reg2);           // Q.30
    quo  = (reg4 == '0) ? '1 : (44'(1) << (PMU_FB + NRM_FB)) / 44'(reg4);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg1 <= '0; reg2 <= '0; reg3 <= '0; reg4 <= '0;
      last_d <= 1'b0; sq_d <= 1'b0; pmu <= '0;
    end else begin
      if (vld) begin
        reg1 <= (first ? 32'sd0 : reg1) + (prod.re >>> 15);
        reg2 <= (first ? 32'sd0 : reg2) + (prod.im >>> 15);
      end
      last_d <= vld && last;
      sq_d   <= last_d;
      if (last_d)
        reg3 <= ((mag2 >> (30 - NRM_FB)) > 64'hFFFF) ? 16'hFFFF : 16'(mag2 >> (30 - NRM_FB));
      if (clr)       reg4 <= '0;
      else if (sq_d) reg4 <= reg4 + 20'(reg3);
      if (fin)
        pmu <= (quo > 44'hFFFF) ? '1 : PMU_W'(quo);
    end
  end
endmodule
