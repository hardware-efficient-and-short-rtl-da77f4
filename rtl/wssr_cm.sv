// wssr_cm: covariance-matrix (CM) block.
//
// Estimates R = (1/M) * sum_n x_c[n] x_c[n]^H over the first M vectors
// delivered with enb = 1, then presents it in the real symmetric form
//   S = [ Re(R)  -Im(R) ]
//       [ Im(R)   Re(R) ]      (2P x 2P)
// that the eigenvalue decomposition works on; every eigenvalue of R appears
// twice among those of S.
//
// Implementation: one complex multiply-accumulate per upper-triangular entry
// (i <= j) runs every enb cycle, so M vectors take M cycles. Accumulators are
// 32 + log2(M) bits wide; the division by M is an arithmetic right shift
// (M must be a power of two). S entries are signed 32-bit in Q.30, the
// format of the product of two Q1.15 samples. done rises one cycle after the
// M-th vector and stays high (S then constant) until reset; done_pulse marks
// that cycle. The parallel structure and formats are this design's choice:
// only the block's function is given for it.
module wssr_cm
  import wssr_pkg::*;
#(
  parameter int unsigned P = P_COSETS,
  parameter int unsigned M = M_DEF
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               enb,
  input  cpx_t               xc  [P],
  output logic               done,
  output logic               done_pulse,
  output logic signed [31:0] s   [2*P][2*P]
);
  localparam int unsigned MB = $clog2(M);
  localparam int unsigned AW = 32 + MB;
  localparam int unsigned CW = $clog2(M + 1);

  logic signed [AW-1:0] acc_re [P][P];
  logic signed [AW-1:0] acc_im [P][P];
  logic [CW-1:0]        cnt;
  logic                 take;

  initial assert (M == (1 << MB)) else $error("M must be a power of two");

  assign take = enb && !done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt        <= '0;
      done       <= 1'b0;
      done_pulse <= 1'b0;
      for (int i = 0; i < int'(P); i++)
        for (int j = 0; j < int'(P); j++) begin
          acc_re[i][j] <= '0;
          acc_im[i][j] <= '0;
        end
    end else begin
      done_pulse <= 1'b0;
      if (take) begin
        cnt <= cnt + 1'b1;
        if (cnt == CW'(M - 1)) begin
          done       <= 1'b1;
          done_pulse <= 1'b1;
        end
        for (int i = 0; i < int'(P); i++)
          for (int j = i; j < int'(P); j++) begin
            // x_i * conj(x_j)
            acc_re[i][j] <= acc_re[i][j] + AW'(xc[i].re * xc[j].re)
                                         + AW'(xc[i].im * xc[j].im);
            acc_im[i][j] <= acc_im[i][j] + AW'(xc[i].im * xc[j].re)
                                         - AW'(xc[i].re * xc[j].im);
          end
      end
    end
  end

  // real symmetric form
  always_comb begin
    for (int a = 0; a < int'(2*P); a++)
      for (int b = 0; b < int'(2*P); b++) begin
        automatic int i = a % int'(P);
        automatic int j = b % int'(P);
        automatic logic signed [AW-1:0] rre, rim;
        if (i <= j) begin
          rre = acc_re[i][j];
          rim = acc_im[i][j];
        end else begin
          rre = acc_re[j][i];
          rim = -acc_im[j][i];
        end
        if ((a < int'(P)) == (b < int'(P))) s[a][b] = 32'(rre >>> MB);
        else if (a < int'(P))               s[a][b] = 32'(-(rim >>> MB));
        else                                s[a][b] = 32'(rim >>> MB);
      end
  end
endmodule
