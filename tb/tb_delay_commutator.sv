// tb_delay_commutator: a stream of blocks of 2*DELAY pairs, lane 0
// carrying elements 0..2D-1 of a block of 4D and lane 1 elements 2D..4D-1.
// After DELAY clocks the outputs must pair elements D apart: first
// (0, D), (1, D+1), ... from lane 0, then the same from lane 1. The swap
// input is the upper-half bit of the position, as the cores drive it.
module tb_delay_commutator;
  import fft_pkg::*;
  localparam int D = 4;
  localparam int NB = 6;            // blocks of 2D clocks
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  cplx_t i0, i1, o0, o1;
  logic  swap;
  int checks = 0, failures = 0;

  delay_commutator #(.DELAY(D)) dut (
    .clk(clk), .rst_n(rst_n), .swap(swap),
    .in0(i0), .in1(i1), .out0(o0), .out1(o1));

  // Element e of block b is coded as b*1000 + e.
  function automatic cplx_t code(input int b, input int e);
    return '{re: sample_t'(b * 1000 + e), im: sample_t'(-(b * 1000 + e))};
  endfunction

  initial begin
    int t, b, j, ob, oj, e0;
    rst_n = 1'b1;
    swap = 1'b0;
    for (t = 0; t < NB * 2 * D + D; t++) begin
      b = t / (2 * D);
      j = t % (2 * D);
      swap = (t < NB * 2 * D) && (j >= D);
      i0 = code(b, j);
      i1 = code(b, 2 * D + j);
      #1;
      // Output at clock t belongs to input clock t - D.
      if (t >= 2 * D) begin
        ob = (t - D) / (2 * D);
        oj = (t - D) % (2 * D);
        // oj < D: pair (oj, oj+D) of lane 0 of block ob; else of lane 1.
        e0 = (oj < D) ? oj : 2 * D + (oj - D);
        checks += 2;
        if (o0 != code(ob, e0)) begin
          failures++;
          $display("FAIL t=%0d out0=%0d expected %0d", t, int'(o0.re), ob * 1000 + e0);
        end
        if (o1 != code(ob, e0 + D)) begin
          failures++;
          $display("FAIL t=%0d out1=%0d expected %0d", t, int'(o1.re), ob * 1000 + e0 + D);
        end
      end
      @(posedge clk);
      #1;
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
