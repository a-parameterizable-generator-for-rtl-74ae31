// tb_fft_core: end-to-end test of the FFT core generator over the range of
// throughputs it covers for N = 64: t = 1/6, 1/3, 1/2 (folded radix-2
// MDC) and t = 1, 2, 8, 32 (radix-2^2 MDC with vertical expansion, 32 being
// fully parallel), plus N = 256 at t = 1/2 and t = 4. Every output word is
// checked against a direct DFT. Each mechanism of the two architectures
// must have been exercised: the -j butterfly, commutator swaps, the I_n
// interconnection between parallel pipelines, passes through the frame
// buffer of the folded core and input stalls while it is busy.
module tb_fft_core;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NR = 9;
  logic done [NR];
  int chk [NR], fl [NR], nj [NR], sw [NR], pm [NR], ps [NR], st [NR];

  tb_core_run #(.N(64),  .T_NUM(1),  .T_DEN(6)) r0 (.clk(clk), .rst_n(rst_n), .done(done[0]), .checks(chk[0]), .failures(fl[0]), .n_negj(nj[0]), .n_swap(sw[0]), .n_perm(pm[0]), .n_pass(ps[0]), .n_stall(st[0]));
  tb_core_run #(.N(64),  .T_NUM(1),  .T_DEN(3)) r1 (.clk(clk), .rst_n(rst_n), .done(done[1]), .checks(chk[1]), .failures(fl[1]), .n_negj(nj[1]), .n_swap(sw[1]), .n_perm(pm[1]), .n_pass(ps[1]), .n_stall(st[1]));
  tb_core_run #(.N(64),  .T_NUM(1),  .T_DEN(2)) r2 (.clk(clk), .rst_n(rst_n), .done(done[2]), .checks(chk[2]), .failures(fl[2]), .n_negj(nj[2]), .n_swap(sw[2]), .n_perm(pm[2]), .n_pass(ps[2]), .n_stall(st[2]));
  tb_core_run #(.N(64),  .T_NUM(1),  .T_DEN(1)) r3 (.clk(clk), .rst_n(rst_n), .done(done[3]), .checks(chk[3]), .failures(fl[3]), .n_negj(nj[3]), .n_swap(sw[3]), .n_perm(pm[3]), .n_pass(ps[3]), .n_stall(st[3]));
  tb_core_run #(.N(64),  .T_NUM(2),  .T_DEN(1)) r4 (.clk(clk), .rst_n(rst_n), .done(done[4]), .checks(chk[4]), .failures(fl[4]), .n_negj(nj[4]), .n_swap(sw[4]), .n_perm(pm[4]), .n_pass(ps[4]), .n_stall(st[4]));
  tb_core_run #(.N(64),  .T_NUM(8),  .T_DEN(1)) r5 (.clk(clk), .rst_n(rst_n), .done(done[5]), .checks(chk[5]), .failures(fl[5]), .n_negj(nj[5]), .n_swap(sw[5]), .n_perm(pm[5]), .n_pass(ps[5]), .n_stall(st[5]));
  tb_core_run #(.N(64),  .T_NUM(32), .T_DEN(1)) r6 (.clk(clk), .rst_n(rst_n), .done(done[6]), .checks(chk[6]), .failures(fl[6]), .n_negj(nj[6]), .n_swap(sw[6]), .n_perm(pm[6]), .n_pass(ps[6]), .n_stall(st[6]));
  tb_core_run #(.N(256), .T_NUM(1),  .T_DEN(2)) r7 (.clk(clk), .rst_n(rst_n), .done(done[7]), .checks(chk[7]), .failures(fl[7]), .n_negj(nj[7]), .n_swap(sw[7]), .n_perm(pm[7]), .n_pass(ps[7]), .n_stall(st[7]));
  tb_core_run #(.N(256), .T_NUM(4),  .T_DEN(1)) r8 (.clk(clk), .rst_n(rst_n), .done(done[8]), .checks(chk[8]), .failures(fl[8]), .n_negj(nj[8]), .n_swap(sw[8]), .n_perm(pm[8]), .n_pass(ps[8]), .n_stall(st[8]));

  int checks, failures;

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
  end

  function automatic bit all_done();
    foreach (done[i]) if (!done[i]) return 1'b0;
    return 1'b1;
  endfunction

  task automatic need(input string what, input int count);
    checks++;
    $display("mechanism %-28s used %0d times", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL: %s never happened", what);
    end
  endtask

  initial begin
    int s_nj, s_sw, s_pm, s_ps, s_st;
    wait (rst_n);
    while (!all_done()) @(posedge clk);
    checks = 0; failures = 0;
    s_nj = 0; s_sw = 0; s_pm = 0; s_ps = 0; s_st = 0;
    foreach (chk[i]) begin
      checks += chk[i];
      failures += fl[i];
      s_nj += nj[i]; s_sw += sw[i]; s_pm += pm[i]; s_ps += ps[i]; s_st += st[i];
    end
    need("-j butterfly (BFII)", s_nj);
    need("commutator swap", s_sw);
    need("I_n interconnection", s_pm);
    need("frame-buffer pass", s_ps);
    need("input stall (folded core)", s_st);
    // Every pass after the first of every folded frame: 3 frames each.
    checks++;
    if (ps[0] != 3 * 5 || ps[1] != 3 * 2 || ps[2] != 3 * 1 || ps[7] != 3 * 1) begin
      failures++;
      $display("FAIL: pass counts %0d %0d %0d %0d", ps[0], ps[1], ps[2], ps[7]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (40000) @(posedge clk);
    checks = 0; failures = 1;
    foreach (chk[i]) begin
      checks += chk[i];
      failures += fl[i];
    end
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
