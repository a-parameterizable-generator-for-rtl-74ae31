// bfi: radix-2 butterfly (BFI).
//
// Computes the radix-2 DIF butterfly of the pair (a, b) = (x[n], x[n+D]):
// sum = a + b on out0 and difference = a - b on out1. Both results are
// halved (arithmetic shift, rounding toward minus infinity) so the word
// width stays DATA_W through every stage and nothing can overflow; a full
// FFT therefore returns X(k)/N. The halving is this design's choice.
// One register stage: results appear one clock after the inputs.
module bfi
  import fft_pkg::*;
(
  input  logic  clk,
  input  cplx_t a,
  input  cplx_t b,
  output cplx_t out0,
  output cplx_t out1
);
  typedef logic signed [DATA_W:0] wide_t;

  wide_t sr, si, dr, di;

  always_comb begin
    sr = wide_t'(a.re) + wide_t'(b.re);
    si = wide_t'(a.im) + wide_t'(b.im);
    dr = wide_t'(a.re) - wide_t'(b.re);
    di = wide_t'(a.im) - wide_t'(b.im);
  end

  always_ff @(posedge clk) begin
    out0 <= '{re: sample_t'(sr >>> 1), im: sample_t'(si >>> 1)};
    out1 <= '{re: sample_t'(dr >>> 1), im: sample_t'(di >>> 1)};
  end
endmodule
