// tb_bfii: random pairs through the BFII butterfly with and without the
// -j factor. With neg_j the lower input is first turned into -j*b
// (re = b.im, im = -b.re); outputs are floor((a +- b')/2), one clock later.
module tb_bfii;
  import fft_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  cplx_t a, b, o0, o1;
  logic  nj;
  int checks = 0, failures = 0;

  bfii dut (.clk(clk), .neg_j(nj), .a(a), .b(b), .out0(o0), .out1(o1));

  function automatic int fl2(input int v);
    return int'($floor(real'(v) / 2.0));
  endfunction

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int ar, ai, br, bi, pr, pi;
    for (int i = 0; i < 400; i++) begin
      ar = int'($urandom_range(65535)) - 32768; ai = int'($urandom_range(65535)) - 32768;
      br = int'($urandom_range(65535)) - 32768; bi = int'($urandom_range(65535)) - 32768;
      if (i == 0) begin br = -32768; bi = -32768; end
      nj = i[0];
      a = '{re: sample_t'(ar), im: sample_t'(ai)};
      b = '{re: sample_t'(br), im: sample_t'(bi)};
      // (-j)(br + j bi) = bi - j br
      pr = nj ? bi : br;
      pi = nj ? -br : bi;
      @(posedge clk);
      #1;
      check("sum.re", int'(o0.re), fl2(ar + pr));
      check("sum.im", int'(o0.im), fl2(ai + pi));
      check("dif.re", int'(o1.re), fl2(ar - pr));
      check("dif.im", int'(o1.im), fl2(ai - pi));
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
