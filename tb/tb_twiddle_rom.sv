// tb_twiddle_rom: reads every entry of several twiddle ROMs and compares
// with cos/sin of the exponent the stage needs, written out here for
// N = 16 with one pipeline:
//   radix-2 stage l, difference lane: e = (c mod 2**(3-l)) * 2**l
//   radix-2^2 after BFII stage 1: e = (k1 + 2*lane) * (c mod 4), k1 = c/4
//   folded core, stage s on pass p of S = 2 stages: l = 2p + s.
// Each value must be within one LSB of round(2**TW_FRAC * W), one clock
// after the address.
module tb_twiddle_rom;
  import fft_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [2:0] a8;
  logic [3:0] a16;
  twiddle_t w_r2_0, w_r2_2, w_r22_0, w_r22_1, w_f1;

  twiddle_rom #(.N(16), .MODE(TW_R2), .STAGE0(0), .LANE(1)) r0 (.clk(clk), .addr(a8), .w(w_r2_0));
  twiddle_rom #(.N(16), .MODE(TW_R2), .STAGE0(2), .LANE(1)) r1 (.clk(clk), .addr(a8), .w(w_r2_2));
  twiddle_rom #(.N(16), .MODE(TW_R22), .STAGE0(1), .LANE(0)) r2 (.clk(clk), .addr(a8), .w(w_r22_0));
  twiddle_rom #(.N(16), .MODE(TW_R22), .STAGE0(1), .LANE(1)) r3 (.clk(clk), .addr(a8), .w(w_r22_1));
  twiddle_rom #(.N(16), .MODE(TW_R2), .STAGE0(1), .STAGE_STEP(2), .PASSES(2), .LANE(1))
    r4 (.clk(clk), .addr(a16), .w(w_f1));

  task automatic check(input string what, input twiddle_t got, input int e);
    real ang, er, ei;
    ang = 2.0 * 3.14159265358979 * real'(e) / 16.0;
    er = $cos(ang) * 16384.0;
    ei = -$sin(ang) * 16384.0;
    checks++;
    if ((real'(got.re) - er) > 1.0 || (er - real'(got.re)) > 1.0 ||
        (real'(got.im) - ei) > 1.0 || (ei - real'(got.im)) > 1.0) begin
      failures++;
      $display("FAIL %s e=%0d: got (%0d,%0d) expected (%f,%f)", what, e,
               int'(got.re), int'(got.im), er, ei);
    end
  endtask

  initial begin
    for (int c = 0; c < 8; c++) begin
      a8 = 3'(c);
      a16 = 4'(c);
      @(posedge clk);
      #1;
      check("r2 stage0", w_r2_0, c % 8);
      check("r2 stage2", w_r2_2, (c % 2) * 4);
      check("r22 lane0", w_r22_0, (c / 4) * (c % 4));
      check("r22 lane1", w_r22_1, (2 + c / 4) * (c % 4));
      check("folded pass0 (stage 1)", w_f1, (c % 4) * 2);
    end
    for (int c = 0; c < 8; c++) begin
      a16 = 4'(8 + c);
      @(posedge clk);
      #1;
      check("folded pass1 (stage 3)", w_f1, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
