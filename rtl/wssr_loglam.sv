// wssr_loglam: base-10 logarithm by hyperbolic CORDIC (one LOGLAM unit).
//
// y = log10(v) for an unsigned integer v of W bits, as a signed fixed-point
// value with LOG_FB fraction bits. v is normalised to v = 2^e * m with
// m in [1,2) (leading-one detection and a shift), then ln(m) =
// 2*atanh((m-1)/(m+1)) is found by a hyperbolic CORDIC in vectoring mode
// started from x = m+1, y = m-1: 16 iterations with shifts 1..14, shifts 4
// and 13 repeated for convergence, one iteration per clock. Finally
// log10(v) = (e*ln2 + ln m) * log10(e). v = 0 is treated as v = 1 (result 0).
//
// Interface: a start pulse samples v; done is a one-cycle pulse 17 cycles
// later (one load cycle and 16 iteration cycles), and y holds its value
// until the next start. The use of CORDIC follows the published design;
// the normalisation, iteration schedule and internal Q.20 precision are
// this design's.
module wssr_loglam
  import wssr_pkg::*;
#(
  parameter int unsigned W = SUM_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [W-1:0]            v,
  output logic                    done,
  output logic signed [LOG_W-1:0] y
);
  localparam int unsigned NIT = 16;
  localparam int unsigned EW  = $clog2(W);
  // shift amount of each iteration
  localparam int unsigned SHIFT [NIT] = '{1, 2, 3, 4, 4, 5, 6, 7, 8, 9, 10, 11, 12, 13, 13, 14};

  logic signed [25:0] cx, cy, cz;
  logic [EW-1:0]      e;
  logic [3:0]         it;
  logic               busy;

  // leading-one position and normalised mantissa (Q1.20)
  logic [EW-1:0]      e_n;
  logic [20:0]        m_n;
  always_comb begin
    e_n = '0;
    for (int b = 0; b < int'(W); b++) if (v[b]) e_n = EW'(b);
    m_n = (v == '0) ? 21'(1 << 20) : 21'((42'(v) << 20) >> e_n);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cx <= '0; cy <= '0; cz <= '0; e <= '0; it <= '0;
      busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        cx   <= 26'(m_n) + 26'(1 << 20);
        cy   <= 26'(m_n) - 26'(1 << 20);
        cz   <= '0;
        e    <= e_n;
        it   <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        if (cy >= 0) begin
          cx <= cx - (cy >>> SHIFT[it]);
          cy <= cy - (cx >>> SHIFT[it]);
          cz <= cz + 26'(ATANH_TAB[SHIFT[it]-1]);
        end else begin
          cx <= cx + (cy >>> SHIFT[it]);
          cy <= cy + (cx >>> SHIFT[it]);
          cz <= cz - 26'(ATANH_TAB[SHIFT[it]-1]);
        end
        if (it == 4'(NIT - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        it <= it + 1'b1;
      end
    end
  end

  // ln v in Q.20, scaled by log10(e) (Q.16) and cut to LOG_FB fraction bits
  logic signed [27:0] ln_v;
  logic signed [45:0] lg;
  always_comb begin
    ln_v = 28'($signed({1'b0, e}) * $signed({1'b0, LN2_Q20})) + 28'(cz <<< 1);
    lg   = 46'(ln_v) * 46'($signed({1'b0, LOG10E_Q16}));
    y    = LOG_W'(lg >>> (20 + 16 - LOG_FB));
  end
endmodule
