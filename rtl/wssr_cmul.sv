// wssr_cmul: full-precision complex multiplier.
//
// Multiplies two complex words in the 16-bit-real / 16-bit-imaginary layout
// and returns the exact product as two 32-bit parts (real part in the upper
// half of the 64-bit result), as the m_left / m_right multipliers of the
// interpolator and the M_cm multiplier of the MUSIC sub-block do. With
// CONJ_B = 1 the second operand is conjugated first (used for a^H w).
// Purely combinational; the caller registers the result.
module wssr_cmul
  import wssr_pkg::*;
#(
  parameter bit CONJ_B = 1'b0
) (
  input  cpx_t      a,
  input  cpx_t      b,
  output cpx_wide_t p
);
  logic signed [31:0] rr, ii, ri, ir;

  always_comb begin
    rr = 32'(a.re * b.re);
    ii = 32'(a.im * b.im);
    ri = 32'(a.re * b.im);
    ir = 32'(a.im * b.re);
    if (CONJ_B) begin
      p.re = rr + ii;
      p.im = ir - ri;
    end else begin
      p.re = rr - ii;
      p.im = ir + ri;
    end
  end
endmodule
