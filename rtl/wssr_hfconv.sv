// wssr_hfconv: zero-skipping interpolation of one coset by L.
//
// Computes x_h[n] = sum_m x[m] h[n - mL] without ever multiplying the L-1
// zeros that up-sampling would insert. Each input sample x[i] is presented
// for L consecutive cycles (j = 0..L-1) together with the coefficient pair
// h_r = h[j] and h_l = h[L+j]. Two complex multipliers run every cycle:
//   m_right = x[i]*h[j]   goes through a chain of L 64-bit registers,
//   m_left  = x[i]*h[L+j] goes through a chain of 2L 64-bit registers,
// so that at the chain outputs v_right = x[i]*h[j] meets
// v_left = x[i-1]*h[L+j]; their sum is x_h[iL+j] for a filter of 2L taps.
// The real and imaginary sums are truncated to 16 bits (bits [30:15] of the
// Q.30 sums, i.e. back to Q1.15, without saturation) and registered.
//
// Timing: the product formed in cycle t reaches the output register so that
// x_h[n] is on xh in cycle n + L + 1, counting the first cycle of x[0] as 0.
// The structure (two multipliers, chains of L and 2L registers, two adders,
// truncation, output register) follows the published micro-architecture;
// the choice of bits kept by the truncation is this design's.
module wssr_hfconv
  import wssr_pkg::*;
#(
  parameter int unsigned L = L_SUB
) (
  input  logic clk,
  input  logic rst_n,
  input  cpx_t data,
  input  cpx_t h_l,
  input  cpx_t h_r,
  output cpx_t xh
);
  cpx_wide_t m_right, m_left;
  cpx_wide_t siso_r [L];
  cpx_wide_t siso_l [2*L];
  logic signed [32:0] sum_re, sum_im;

  wssr_cmul #(.CONJ_B(1'b0)) u_mr (.a(data), .b(h_r), .p(m_right));
  wssr_cmul #(.CONJ_B(1'b0)) u_ml (.a(data), .b(h_l), .p(m_left));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(L); k++)   siso_r[k] <= '0;
      for (int k = 0; k < int'(2*L); k++) siso_l[k] <= '0;
      xh <= '0;
    end else begin
      siso_r[0] <= m_right;
      for (int k = 1; k < int'(L); k++) siso_r[k] <= siso_r[k-1];
      siso_l[0] <= m_left;
      for (int k = 1; k < int'(2*L); k++) siso_l[k] <= siso_l[k-1];
      xh.re <= sum_re[30:15];
      xh.im <= sum_im[30:15];
    end
  end

  always_comb begin
    sum_re = 33'(siso_r[L-1].re) + 33'(siso_l[2*L-1].re);
    sum_im = 33'(siso_r[L-1].im) + 33'(siso_l[2*L-1].im);
  end
endmodule
