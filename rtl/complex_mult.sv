// complex_mult: complex multiplier, data times twiddle factor.
//
// Four real multipliers and two real adders, as in the usual direct form:
//   re = ar*wr - ai*wi,  im = ar*wi + ai*wr.
// The twiddle has TW_FRAC fraction bits; each product sum is rounded to
// nearest and shifted back to DATA_W bits. Because |W| = 1 the magnitude
// cannot grow, but one component can grow by up to sqrt(2), so the result
// saturates at the word limits. Rounding and saturation are this design's
// choice. One register stage: the product appears one clock after the
// inputs.
module complex_mult
  import fft_pkg::*;
(
  input  logic     clk,
  input  cplx_t    a,
  input  twiddle_t w,
  output cplx_t    p
);
  localparam int PW = DATA_W + TW_W + 1;
  typedef logic signed [PW-1:0] prod_t;

  localparam prod_t HALF = prod_t'(1) <<< (TW_FRAC - 1);
  localparam prod_t MAXV = prod_t'((1 << (DATA_W - 1)) - 1);
  localparam prod_t MINV = -prod_t'(1 << (DATA_W - 1));

  function automatic sample_t sat(input prod_t v);
    if (v > MAXV) return sample_t'(MAXV);
    if (v < MINV) return sample_t'(MINV);
    return sample_t'(v);
  endfunction

  prod_t rr, ii, ri, ir, pre, pim;

  always_comb begin
    rr  = prod_t'(a.re) * prod_t'(w.re);
    ii  = prod_t'(a.im) * prod_t'(w.im);
    ri  = prod_t'(a.re) * prod_t'(w.im);
    ir  = prod_t'(a.im) * prod_t'(w.re);
    pre = (rr - ii + HALF) >>> TW_FRAC;
    pim = (ri + ir + HALF) >>> TW_FRAC;
  end

  always_ff @(posedge clk) p <= '{re: sat(pre), im: sat(pim)};
endmodule
