// wssr_top: multicoset-sampling wideband spectrum sensor.
//
// Decides, for each of L subbands of a wideband spectrum, whether a primary
// user occupies it, from P sub-Nyquist coset streams x_i[m] (sample times
// (mL + c_i)/B_max). Data flow:
//   SD    stores NX samples per coset at the sampler clock CLK1, then raises
//         FnSgn, which switches the whole sensor to CLK2 (wssr_clkgen);
//   CS    interpolates every coset by L (zero-skipping polyphase filter) and
//         delays coset i by c_i, giving aligned streams x_c[n];
//   CM    accumulates the P x P covariance of M vectors of x_c and outputs
//         its 2P x 2P real symmetric form;
//   EVD   (outside this RTL, see below) returns 2P eigenvalues and
//         eigenvectors of that matrix;
//   MDL   sorts the eigenvalues and estimates the number N-hat of occupied
//         subbands by the minimum-description-length criterion;
//   MUSIC forms P_MU(k) = 1/||a_k^H E_n||^2 from the P - N-hat noise
//         eigenvectors; DETECT compares each P_MU(k) with psi.
//
// EVD interface: evd_start pulses (sensor clock) when evd_mat is ready and
// evd_mat stays constant afterwards. The eigen-solver answers with an
// evd_done pulse, having placed on evd_lambda the 2P eigenvalues (unsigned
// integers, any common scale) and on evd_vec[j] the unit-norm real
// eigenvector of evd_lambda[j] (2P elements, Q1.15), held until the result.
// The complex eigenvector of R is elements 0..P-1 (real part) and P..2P-1
// (imaginary part); for each distinct eigenvalue the first of its two
// copies in the sorted order is used.
// clk_sense is the switched sensor clock, for a solver on the same clock.
//
// A run is: reset, en high with a valid x every CLK1 cycle for NX cycles,
// then pu_valid pulses once with pu, pmu and n_hat, which hold until reset.
module wssr_top
  import wssr_pkg::*;
#(
  parameter int unsigned NX = NX_DEF,
  parameter int unsigned M  = M_DEF
) (
  input  logic                   clk1,
  input  logic                   clk_fast,
  input  logic                   rst_n,
  input  logic                   en,
  input  cpx_t                   x          [P_COSETS],
  input  logic [PMU_W-1:0]       psi,
  output logic                   clk_sense,
  output logic                   fn_sgn,
  output logic                   evd_start,
  output logic signed [31:0]     evd_mat    [2*P_COSETS][2*P_COSETS],
  input  logic                   evd_done,
  input  logic [EV_W-1:0]        evd_lambda [2*P_COSETS],
  input  logic signed [15:0]     evd_vec    [2*P_COSETS][2*P_COSETS],
  output logic [3:0]             n_hat,
  output logic [PMU_W-1:0]       pmu        [L_SUB],
  output logic [L_SUB-1:0]       pu,
  output logic                   pu_valid
);
  localparam int unsigned P = P_COSETS;
  localparam int unsigned L = L_SUB;

  logic       clk2, wclk;
  logic       nxt_sgn, enb, cm_done, mdl_done, music_done;
  cpx_t       d  [P];
  cpx_t       xc [P];
  cpx_t       w  [P][P];
  logic [3:0] idx [2*P];
  logic signed [39:0] mdl_val [P-1];

  assign clk_sense = wclk;

  wssr_clkgen u_clk (
    .clk1(clk1), .clk_fast(clk_fast), .rst_n(rst_n), .sel(fn_sgn),
    .clk2(clk2), .clk_out(wclk)
  );

  wssr_sd #(.P(P), .NX(NX)) u_sd (
    .clk(wclk), .rst_n(rst_n), .en(en), .x(x), .nxt_sgn(nxt_sgn),
    .fn_sgn(fn_sgn), .d(d)
  );

  wssr_cs #(.P(P), .L(L), .NX(NX)) u_cs (
    .clk(wclk), .rst_n(rst_n), .fn_sgn(fn_sgn), .d(d), .nxt_sgn(nxt_sgn),
    .enb(enb), .xc(xc)
  );

  wssr_cm #(.P(P), .M(M)) u_cm (
    .clk(wclk), .rst_n(rst_n), .enb(enb), .xc(xc), .done(cm_done),
    .done_pulse(evd_start), .s(evd_mat)
  );

  wssr_mdl #(.P(P), .M(M)) u_mdl (
    .clk(wclk), .rst_n(rst_n), .start(evd_done), .lambda(evd_lambda),
    .done(mdl_done), .n_hat(n_hat), .idx(idx), .mdl(mdl_val)
  );

  // eigenvectors in decreasing eigenvalue order, one per distinct eigenvalue
  always_comb begin
    for (int k = 0; k < int'(P); k++)
      for (int e = 0; e < int'(P); e++) begin
        w[k][e].re = evd_vec[idx[2*k]][e];
        w[k][e].im = evd_vec[idx[2*k]][e+P];
      end
  end

  wssr_music #(.P(P), .L(L)) u_music (
    .clk(wclk), .rst_n(rst_n), .start(mdl_done), .n_hat(n_hat), .w(w),
    .done(music_done), .pmu(pmu)
  );

  wssr_detect #(.L(L)) u_det (
    .clk(wclk), .rst_n(rst_n), .valid_in(music_done), .pmu(pmu), .psi(psi),
    .valid_out(pu_valid), .pu(pu)
  );
endmodule
