// tb_complex_mult: random data times random unit-range coefficients.
// Expected: (ar*wr - ai*wi, ar*wi + ai*wr) / 2**TW_FRAC rounded to nearest
// (ties up) and clipped to the word range, one clock later. Part of the
// vectors drive the product into saturation.
module tb_complex_mult;
  import fft_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  cplx_t    a, p;
  twiddle_t w;
  int checks = 0, failures = 0, sats = 0;

  complex_mult dut (.clk(clk), .a(a), .w(w), .p(p));

  function automatic int ref_round(input longint v);
    real r;
    r = $floor(real'(v) / real'(1 << TW_FRAC) + 0.5);
    if (r > 32767.0) r = 32767.0;
    if (r < -32768.0) r = -32768.0;
    return int'(r);
  endfunction

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    longint ar, ai, wr, wi;
    int er, ei;
    for (int i = 0; i < 500; i++) begin
      ar = longint'($urandom_range(65535)) - 32768;
      ai = longint'($urandom_range(65535)) - 32768;
      wr = longint'($urandom_range(2 << TW_FRAC)) - (1 << TW_FRAC);
      wi = longint'($urandom_range(2 << TW_FRAC)) - (1 << TW_FRAC);
      a = '{re: sample_t'(ar), im: sample_t'(ai)};
      w = '{re: coef_t'(wr), im: coef_t'(wi)};
      er = ref_round(ar * wr - ai * wi);
      ei = ref_round(ar * wi + ai * wr);
      if (er == 32767 || er == -32768 || ei == 32767 || ei == -32768) sats++;
      @(posedge clk);
      #1;
      check("re", int'(p.re), er);
      check("im", int'(p.im), ei);
    end
    checks++;
    if (sats == 0) begin
      failures++;
      $display("FAIL: saturation never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
