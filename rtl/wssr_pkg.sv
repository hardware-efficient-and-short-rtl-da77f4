// wssr_pkg: sizes, number formats and constant tables shared by the
// multicoset wideband spectrum sensor.
//
// Configuration (the published design point): p = 8 cosets, L = 22 subbands,
// coset offsets c_i = {2,3,7,10,12,14,19,21}, Nx = 50 stored samples per
// coset, M = 1024 samples in the covariance estimate, interpolation filter of
// H = 2L taps.
//
// Number formats. Every complex word is 32 bits: the 16 most significant bits
// hold the real part and the 16 least significant bits the imaginary part,
// both signed Q1.15. This layout follows the published design for samples and
// filter coefficients; it is reused here for eigenvector elements and for the
// steering-matrix entries.
//
// H_COEF holds the complex interpolation filter h[n] = hr[n]*exp(j*pi*n/L),
// n = 0..H-1, where hr is a Hamming-windowed sinc low-pass of H taps with
// cut-off 1/(2L) cycles/sample, normalised to unity DC gain; hr[n] =
// w[n]*sin(pi*(n-(H-1)/2)/L)/(pi*(n-(H-1)/2)), scaled so that sum(hr) = 1.
// Each value is rounded to Q1.15. (The published design used a constrained
// least-squares FIR with the same length and cut-off; the window design is
// an equivalent substitute with the same pass band.)
//
// TWIDDLE[t] = exp(j*2*pi*t/L), t = 0..L-1, rounded to Q1.15 (1.0 saturates
// to 32767). The steering matrix entry A(i,k) = exp(j*2*pi*c_i*k/L) is
// TWIDDLE[(c_i*k) mod L].
package wssr_pkg;

  localparam int unsigned P_COSETS = 8;     // p
  localparam int unsigned L_SUB    = 22;    // L
  localparam int unsigned H_TAPS   = 2 * L_SUB;
  localparam int unsigned NX_DEF   = 50;    // Nx
  localparam int unsigned M_DEF    = 1024;  // M
  localparam int unsigned DL       = (H_TAPS + 1) / 2;  // skipped samples

  // coset offsets c_i (also the coset delay lengths)
  localparam int unsigned C_OFF [P_COSETS] = '{2, 3, 7, 10, 12, 14, 19, 21};

  typedef struct packed {
    logic signed [15:0] re;
    logic signed [15:0] im;
  } cpx_t;

  // full-precision complex product (Q2.30 parts), 64 bits, real part on top
  typedef struct packed {
    logic signed [31:0] re;
    logic signed [31:0] im;
  } cpx_wide_t;

  // MDL fixed-point formats
  localparam int unsigned EV_W   = 16;  // eigenvalue width (unsigned integer)
  localparam int unsigned SUM_W  = 19;  // REG-A width (sum of 7 eigenvalues)
  localparam int unsigned LOG_FB = 12;  // fraction bits of base-10 logarithms
  localparam int unsigned LOG_W  = 19;  // signed width of logarithms and their sums

  // MUSIC formats
  localparam int unsigned PMU_W  = 16;  // P_MU output, unsigned Q8.8
  localparam int unsigned PMU_FB = 8;
  localparam int unsigned NRM_FB = 12;  // fraction bits of |a^H w|^2 sums

  localparam logic [31:0] H_COEF [H_TAPS] = '{
    32'h00030000,
    32'h000b0002,
    32'h00150006,
    32'h00240011,
    32'h00380024,
    32'h00500045,
    32'h00680078,
    32'h007b00bf,
    32'h0082011c,
    32'h0075018e,
    32'h004c020e,
    32'h00000296,
    32'hff8e031a,
    32'hfef4038f,
    32'hfe3803e7,
    32'hfd5f0417,
    32'hfc770415,
    32'hfb8e03da,
    32'hfab40368,
    32'hf9f902c0,
    32'hf96e01ee,
    32'hf91b00fe,
    32'hf9090000,
    32'hf938ff06,
    32'hf9a5fe22,
    32'hfa45fd62,
    32'hfb0dfcd2,
    32'hfbebfc77,
    32'hfcd1fc53,
    32'hfdaefc64,
    32'hfe76fca0,
    32'hff1efcfe,
    32'hffa2fd71,
    32'h0000fded,
    32'h003bfe66,
    32'h0058fed4,
    32'h005eff31,
    32'h0056ff7a,
    32'h0045ffb0,
    32'h0033ffd4,
    32'h0022ffea,
    32'h0014fff7,
    32'h000bfffd,
    32'h00030000
  };
  localparam logic [31:0] TWIDDLE [L_SUB] = '{

    32'h7fff0000,
    32'h7ad12410,
    32'h6bae4534,
    32'h53d260bc,
    32'h352c746f,
    32'h12377eb2,
    32'hedc97eb2,
    32'hcad4746f,
    32'hac2e60bc,
    32'h94524534,
    32'h852f2410,
    32'h80000000,
    32'h852fdbf0,
    32'h9452bacc,
    32'hac2e9f44,
    32'hcad48b91,
    32'hedc9814e,
    32'h1237814e,
    32'h352c8b91,
    32'h53d29f44,
    32'h6baebacc,
    32'h7ad1dbf0
  };

  // MDL constant C_r = r(2p-r)/2*log10(M) + M(p-r)*log10(1/(p-r)), r = 1..p-1,
  // for p = 8 and M = 1024, in Q.12 (index 0 holds r = 1).
  localparam logic signed [39:0] C_R [P_COSETS-1] = '{
    -40'sd24719710, -40'sd19410195, -40'sd14418025, -40'sd9804966,
    -40'sd5664495,  -40'sd2155317,  40'sd388401
  };

  // hyperbolic CORDIC constants, Q.20: atanh(2^-i), i = 1..14; ln 2;
  // log10(e) in Q.16
  localparam logic [23:0] ATANH_TAB [14] = '{
    24'd575989, 24'd267820, 24'd131761, 24'd65622, 24'd32779, 24'd16385,
    24'd8192, 24'd4096, 24'd2048, 24'd1024, 24'd512, 24'd256, 24'd128, 24'd64
  };
  localparam logic [23:0] LN2_Q20    = 24'd726817;
  localparam logic [16:0] LOG10E_Q16 = 17'd28462;

  function automatic cpx_t steer(input int unsigned i, input int unsigned k);
    return cpx_t'(TWIDDLE[(C_OFF[i] * k) % L_SUB]);
  endfunction

endpackage
