// tb_perm_in: the interconnection permutations I_4 and I_8 must wire
// input i to output dest(i) with
//   I_4: 0->0, 1->2, 2->1, 3->3
//   I_8: 0->0, 1->4, 2->2, 3->6, 4->1, 5->5, 6->3, 7->7
// and I_16 must pair elements 4 apart: it takes butterfly outputs holding
// elements (u, u+8) and delivers pairs (e, e+4) within each half.
module tb_perm_in;
  import fft_pkg::*;
  cplx_t i4 [4], o4 [4], i8 [8], o8 [8], i16 [16], o16 [16];
  int checks = 0, failures = 0;

  perm_in #(.NW(4))  p4  (.in(i4),  .out(o4));
  perm_in #(.NW(8))  p8  (.in(i8),  .out(o8));
  perm_in #(.NW(16)) p16 (.in(i16), .out(o16));

  localparam int D4 [4] = '{0, 2, 1, 3};
  localparam int D8 [8] = '{0, 4, 2, 6, 1, 5, 3, 7};

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int e;
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < 4; i++) i4[i] = '{re: sample_t'(i + 10 * r), im: '0};
      for (int i = 0; i < 8; i++) i8[i] = '{re: sample_t'(i + 10 * r), im: '0};
      // Wire 2u+k of a stage of distance 8 holds element u + 8k.
      for (int i = 0; i < 16; i++) i16[i] = '{re: sample_t'(i / 2 + 8 * (i % 2)), im: sample_t'(r)};
      #1;
      for (int i = 0; i < 4; i++) check("I4", int'(o4[D4[i]].re), i + 10 * r);
      for (int i = 0; i < 8; i++) check("I8", int'(o8[D8[i]].re), i + 10 * r);
      // Input 2u+k of the next stage (distance 4) needs element
      // (u/4)*8 + u%4 + 4k.
      for (int i = 0; i < 16; i++) begin
        e = ((i / 2) / 4) * 8 + (i / 2) % 4 + 4 * (i % 2);
        check("I16", int'(o16[i].re), e);
        check("I16 im", int'(o16[i].im), r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
