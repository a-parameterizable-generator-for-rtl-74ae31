// bfii: radix-2^2 butterfly (BFII) with the trivial -j multiplication.
//
// When neg_j is set, input b is first multiplied by -j, which only swaps
// the real and imaginary parts and negates the new imaginary part:
// -j*(br + j*bi) = bi - j*br. Then the radix-2 butterfly follows as in
// bfi: out0 = (a + b')/2, out1 = (a - b')/2. The -j step is the part of the
// radix-2^2 twiddle factor that needs no multiplier. The arithmetic runs
// one bit wider so that negating the most negative value is exact.
// One register stage: results appear one clock after the inputs.
module bfii
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  neg_j,
  input  cplx_t a,
  input  cplx_t b,
  output cplx_t out0,
  output cplx_t out1
);
  typedef logic signed [DATA_W+1:0] wide_t;

  wide_t br, bi, sr, si, dr, di;

  always_comb begin
    if (neg_j) begin
      br = wide_t'(b.im);
      bi = -wide_t'(b.re);
    end else begin
      br = wide_t'(b.re);
      bi = wide_t'(b.im);
    end
    sr = wide_t'(a.re) + br;
    si = wide_t'(a.im) + bi;
    dr = wide_t'(a.re) - br;
    di = wide_t'(a.im) - bi;
  end

  always_ff @(posedge clk) begin
    out0 <= '{re: sample_t'(sr >>> 1), im: sample_t'(si >>> 1)};
    out1 <= '{re: sample_t'(dr >>> 1), im: sample_t'(di >>> 1)};
  end
endmodule
