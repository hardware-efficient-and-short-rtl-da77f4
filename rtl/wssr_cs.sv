// wssr_cs: convolution-sample (CS) block.
//
// Interpolates the P stored coset sequences by L and re-aligns them in time.
// Once FnSgn is high:
//  * Counter-1 steps j = 0..L-1 and selects the coefficient pair
//    h_r = h[j], h_l = h[L+j] for all P interpolators (HFCONV). The
//    registered NxtSgn is high in the cycle with j = L-1, which makes the SD
//    block present the next stored sample for the following L cycles.
//  * After NX samples (NX*L cycles) the convolution ends and the interpolator
//    inputs are forced to zero.
//  * Counter-2 counts cycles from the first FnSgn cycle. From count L+1 the
//    interpolator outputs x_h (valid from then on) enter per-coset delay
//    lines of C_OFF[i] registers, giving x_c,i[n] = x_h,i[n - c_i]; before
//    that zeros enter.
//  * enb is high from count H+1 = L+1+DL, i.e. after skipping the first
//    DL = (H+1)/2 samples of x_c, until the last interpolated sample has
//    left (count NX*L+L). One x_c vector is delivered per enb cycle.
// The coset-delay lengths follow the coset offsets c_i (see wssr_pkg); the
// exact start and end counts are this design's.
module wssr_cs
  import wssr_pkg::*;
#(
  parameter int unsigned P  = P_COSETS,
  parameter int unsigned L  = L_SUB,
  parameter int unsigned NX = NX_DEF
) (
  input  logic clk,
  input  logic rst_n,
  input  logic fn_sgn,
  input  cpx_t d   [P],
  output logic nxt_sgn,
  output logic enb,
  output cpx_t xc  [P]
);
  localparam int unsigned DLY   = (2 * L + 1) / 2;
  localparam int unsigned C2MAX = NX * L + L + 2;
  localparam int unsigned C1W   = $clog2(L);
  localparam int unsigned C2W   = $clog2(C2MAX + 1);
  localparam int unsigned SW    = $clog2(NX + 1);

  logic [C1W-1:0] cnt1;
  logic [C2W-1:0] cnt2;
  logic [SW-1:0]  smp;
  logic           conv_done, active, sel_out;
  cpx_t           h_l, h_r;
  cpx_t           din [P];
  cpx_t           xh  [P];

  assign active  = fn_sgn && !conv_done;
  assign sel_out = (cnt2 >= C2W'(L + 1));

  // Counter-1, NxtSgn register, sample counter
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt1      <= '0;
      nxt_sgn   <= 1'b0;
      smp       <= '0;
      conv_done <= 1'b0;
    end else if (active) begin
      cnt1    <= (cnt1 == C1W'(L - 1)) ? '0 : cnt1 + 1'b1;
      nxt_sgn <= (cnt1 == C1W'(L - 2));
      if (nxt_sgn) begin
        if (smp == SW'(NX - 1)) conv_done <= 1'b1;
        smp <= smp + 1'b1;
      end
    end else begin
      nxt_sgn <= 1'b0;
    end
  end

  // Counter-2 and enb
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt2 <= '0;
      enb  <= 1'b0;
    end else if (fn_sgn) begin
      if (cnt2 != C2W'(C2MAX)) cnt2 <= cnt2 + 1'b1;
      enb <= (cnt2 >= C2W'(L + DLY)) && (cnt2 < C2W'(NX * L + L));
    end
  end

  // coefficient multiplexers (MUX-h_right, MUX-h_left)
  always_comb begin
    h_r = cpx_t'(H_COEF[int'(cnt1)]);
    h_l = cpx_t'(H_COEF[int'(L) + int'(cnt1)]);
  end

  for (genvar i = 0; i < int'(P); i++) begin : g_ch
    cpx_t siso_in;
    assign din[i]  = active ? d[i] : '0;            // MUX-1i
    assign siso_in = sel_out ? xh[i] : '0;          // MUX-2i

    wssr_hfconv #(.L(L)) u_hf (
      .clk(clk), .rst_n(rst_n), .data(din[i]), .h_l(h_l), .h_r(h_r), .xh(xh[i])
    );

    if (C_OFF[i] == 0) begin : g_nodly
      assign xc[i] = siso_in;
    end else begin : g_dly
      cpx_t dly [C_OFF[i]];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int k = 0; k < int'(C_OFF[i]); k++) dly[k] <= '0;
        end else begin
          dly[0] <= siso_in;
          for (int k = 1; k < int'(C_OFF[i]); k++) dly[k] <= dly[k-1];
        end
      end
      assign xc[i] = dly[C_OFF[i]-1];
    end
  end
endmodule
