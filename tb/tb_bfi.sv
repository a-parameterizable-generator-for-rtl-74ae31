// tb_bfi: random pairs through the radix-2 butterfly; out0 must be
// floor((a+b)/2) and out1 floor((a-b)/2) per component, one clock later.
// Includes the extreme values of the word.
module tb_bfi;
  import fft_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  cplx_t a, b, o0, o1;
  int checks = 0, failures = 0;

  bfi dut (.clk(clk), .a(a), .b(b), .out0(o0), .out1(o1));

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
    int ar, ai, br, bi;
    for (int i = 0; i < 300; i++) begin
      if (i == 0) begin ar = 32767; ai = -32768; br = 32767; bi = -32768; end
      else if (i == 1) begin ar = -32768; ai = 32767; br = 32767; bi = -32768; end
      else begin
        ar = int'($urandom_range(65535)) - 32768; ai = int'($urandom_range(65535)) - 32768;
        br = int'($urandom_range(65535)) - 32768; bi = int'($urandom_range(65535)) - 32768;
      end
      a = '{re: sample_t'(ar), im: sample_t'(ai)};
      b = '{re: sample_t'(br), im: sample_t'(bi)};
      @(posedge clk);
      #1;
      check("sum.re", int'(o0.re), fl2(ar + br));
      check("sum.im", int'(o0.im), fl2(ai + bi));
      check("dif.re", int'(o1.re), fl2(ar - br));
      check("dif.im", int'(o1.im), fl2(ai - bi));
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
