// wssr_music: MUSIC-like subband detector statistic.
//
// Computes P_MU(k) = 1 / ||a_k^H E_n||^2 for all L subbands in parallel,
// where E_n holds the P - N-hat eigenvectors of the smallest eigenvalues and
// a_k(i) = exp(j*2*pi*c_i*k/L) is column k of the steering matrix.
//
// Eigenvectors w[0..P-1] arrive sorted by decreasing eigenvalue, each with
// P complex elements. After start, Counter1 (count1) steps the element index
// 0..P-1 and Counter2 (count2) the eigenvector index 0..P-1, P*P cycles in
// all. MUX-E/MUX-U pick w[count2][count1]; MUX-V passes it when
// count2 >= N-hat (a noise eigenvector, 0-based) and a zero otherwise. The
// steering entries A(count1, k) come from L multiplexers over constant
// columns (TWIDDLE table, see wssr_pkg). L MU sub-blocks (wssr_mu) do the
// accumulation and division.
//
// Timing: done pulses P*P + 4 cycles after start (68 for P = 8); pmu holds
// until the next run. Structure follows the published MUSIC block; the
// 0-based noise-subspace test and the cycle schedule are this design's.
module wssr_music
  import wssr_pkg::*;
#(
  parameter int unsigned P = P_COSETS,
  parameter int unsigned L = L_SUB
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [$clog2(P+1)-1:0] n_hat,
  input  cpx_t                   w    [P][P],
  output logic                   done,
  output logic [PMU_W-1:0]       pmu  [L]
);
  localparam int unsigned CW = $clog2(P);

  logic [CW-1:0] count1, count2;
  logic          run, sel_v, vld, first, last, fin;
  logic [2:0]    tail;
  cpx_t          mux_u, mux_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count1 <= '0; count2 <= '0; run <= 1'b0; tail <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      tail <= {tail[1:0], 1'b0};
      if (start) begin
        count1 <= '0; count2 <= '0; run <= 1'b1;
      end else if (run) begin
        count1 <= count1 + 1'b1;
        if (count1 == CW'(P - 1)) begin
          count1 <= '0;
          count2 <= count2 + 1'b1;
          if (count2 == CW'(P - 1)) begin
            run     <= 1'b0;
            tail[0] <= 1'b1;
          end
        end
      end
      if (tail[2]) done <= 1'b1;
    end
  end

  always_comb begin
    mux_u = w[count2][count1];
    sel_v = ({1'b0, count2} >= ($clog2(P+1))'(n_hat));
    mux_v = sel_v ? mux_u : '0;
    vld   = run;
    first = (count1 == '0);
    last  = (count1 == CW'(P - 1));
    fin   = tail[2];
  end

  for (genvar k = 0; k < int'(L); k++) begin : g_mu
    cpx_t a_k;
    always_comb a_k = steer(int'(count1), k);
    wssr_mu u_mu (
      .clk(clk), .rst_n(rst_n), .clr(start), .vld(vld), .first(first),
      .last(last), .fin(fin), .v(mux_v), .a(a_k), .pmu(pmu[k])
    );
  end
endmodule
