// tb_fft_workloads: the core configurations whose area and throughput
// are compared in the evaluation of the generator, each run end to end
// with two random frames and checked word by word against a direct DFT:
//   N = 256 : folded radix-2 MDC t = 1/8, 1/4, 1/2 and radix-2^2 MDC
//             t = 1, 2, 4, 8, 16, 32
//   N = 1024: folded radix-2 MDC t = 1/10, 1/5, 1/2 and radix-2^2 MDC
//             t = 1, 2, 4, 8, 16
// Every butterfly stage and multiplier rounds, so the error bound grows with
// the stage count: 3 LSB per component is used for N = 256 (8 stages) and
// 6 LSB for N = 1024 (10 stages, up to half an LSB each plus multipliers).
module tb_fft_workloads;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NR = 17;
  logic done [NR];
  int chk [NR], fl [NR];

  tb_core_run #(.N(256), .T_NUM(1), .T_DEN(8), .NF(2), .GAP(3), .TOL(3.0)) r0 (.clk(clk), .rst_n(rst_n), .done(done[0]), .checks(chk[0]), .failures(fl[0]), .n_negj(), .n_swap(), .n_perm(), .n_pass(), .n_stall());
  tb_core_run #(.N(256), .T_NUM(1), .T_DEN(4), .NF(2), .GAP(3), .TOL(3.0)) r1 (.clk(clk), .rst_n(rst_n), .done(done[1]), .checks(chk[1]), .failures(fl[1]), .n_negj(), .n_swap(), .n_perm(), .n_pass(), .n_stall());
  tb_core_run #(.N(256), .T_NUM(1), .T_DEN(2), .NF(2), .GAP(3), .TOL(3.0)) r2 (.clk(clk), .rst_n(rst_n), .done(done[2]), .checks(chk[2]), .failures(fl[2]), .n_negj(), .n_swap(), .n_perm(), .n_pass(), .n_stall());
  tb_core_run #(.N(256), .T_NUM(1), .T_DEN(1), .NF(2), .GAP(3), .TOL(3.0)) r3 (.clk(clk), .rst_n(rst_n), .done(done[3]), .checks(chk[3]), .failures(fl[3]), .n_negj(), .n_swap(), .n_perm(), .n_pass(), .n_stall());
  tb_core_run #(.N(256), .T_NUM(2), .T_DEN(1), .NF(2), .GAP(3), .TOL(3.0)) r4 (.clk(clk), .rst_n(rst_n), .done(done[4]), .checks(chk[4]), .failures(fl[4]), .n_negj(), .n_swap(), .n_perm(), .n_pass(), .n_stall());
  tb_core_run #(.N(256), .T_NUM(4), .T_DEN(1), .NF(2), .GAP(3), .TOL(3.0)) r5 (.clk(clk), .rst_n(rst_n), .done(done[5]), .checks(chk[5]), .failures(fl[5]), .n_negj(), .n_swap(), .n_perm(), .n_pass(), .n_stall());
  tb_core_run #(.N(256), .T_NUM(8), .T_DEN(1), .NF(2), .GAP(3), .TOL(3.0)) r6 (.clk(clk), .rst_n(rst_n), .done(done[6]), .checks(chk[6]), .failures(fl[6]), .n_negj(), .n_swap(), .n_perm(), .n_pass(), .n_stall());
  tb_core_run #(.N(256), .T_NUM(16), .T_DEN(1), .NF(2), .GAP(3), .TOL(3.0)) r7 (.clk(clk), .rst_n(rst_n), .done(done[7]), .checks(chk[7]), .failures(fl[7]), .n_negj(), .n_swap(), .n_perm(), .n_pass(), .n_stall());
  tb_core_run #(.N(256), .T_NUM(32), .T_DEN(1), .NF(2), .GAP(3), .TOL(3.0)) r8 (.clk(clk), .rst_n(rst_n), .done(done[8]), .checks(chk[8]), .failures(fl[8]), .n_negj(), .n_swap(), .n_perm(), .n_pass(), .n_stall());
  tb_core_run #(.N(1024), .T_NUM(1), .T_DEN(10), .NF(2), .GAP(3), .TOL(6.0)) r9 (.clk(clk), .rst_n(rst_n), .done(done[9]), .checks(chk[9]), .failures(fl[9]), .n_negj(), .n_swap(), .n_perm(), .n_pass(), .n_stall());
  tb_core_run #(.N(1024), .T_NUM(1), .T_DEN(5), .NF(2), .GAP(3), .TOL(6.0)) r10 (.clk(clk), .rst_n(rst_n), .done(done[10]), .checks(chk[10]), .failures(fl[10]), .n_negj(), .n_swap(), .n_perm(), .n_pass(), .n_stall());
  tb_core_run #(.N(1024), .T_NUM(1), .T_DEN(2), .NF(2), .GAP(3), .TOL(6.0)) r11 (.clk(clk), .rst_n(rst_n), .done(done[11]), .checks(chk[11]), .failures(fl[11]), .n_negj(), .n_swap(), .n_perm(), .n_pass(), .n_stall());
  tb_core_run #(.N(1024), .T_NUM(1), .T_DEN(1), .NF(2), .GAP(3), .TOL(6.0)) r12 (.clk(clk), .rst_n(rst_n), .done(done[12]), .checks(chk[12]), .failures(fl[12]), .n_negj(), .n_swap(), .n_perm(), .n_pass(), .n_stall());
  tb_core_run #(.N(1024), .T_NUM(2), .T_DEN(1), .NF(2), .GAP(3), .TOL(6.0)) r13 (.clk(clk), .rst_n(rst_n), .done(done[13]), .checks(chk[13]), .failures(fl[13]), .n_negj(), .n_swap(), .n_perm(), .n_pass(), .n_stall());
  tb_core_run #(.N(1024), .T_NUM(4), .T_DEN(1), .NF(2), .GAP(3), .TOL(6.0)) r14 (.clk(clk), .rst_n(rst_n), .done(done[14]), .checks(chk[14]), .failures(fl[14]), .n_negj(), .n_swap(), .n_perm(), .n_pass(), .n_stall());
  tb_core_run #(.N(1024), .T_NUM(8), .T_DEN(1), .NF(2), .GAP(3), .TOL(6.0)) r15 (.clk(clk), .rst_n(rst_n), .done(done[15]), .checks(chk[15]), .failures(fl[15]), .n_negj(), .n_swap(), .n_perm(), .n_pass(), .n_stall());
  tb_core_run #(.N(1024), .T_NUM(16), .T_DEN(1), .NF(2), .GAP(3), .TOL(6.0)) r16 (.clk(clk), .rst_n(rst_n), .done(done[16]), .checks(chk[16]), .failures(fl[16]), .n_negj(), .n_swap(), .n_perm(), .n_pass(), .n_stall());

  int checks, failures;

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
  end

  function automatic bit all_done();
    foreach (done[i]) if (!done[i]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    wait (rst_n);
    while (!all_done()) @(posedge clk);
    checks = 0; failures = 0;
    foreach (chk[i]) begin
      checks += chk[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog: the slowest run, N = 1024 folded 10 times, needs about
  // 2 frames x 10 passes x (512 + latency) clocks.
  initial begin
    repeat (60000) @(posedge clk);
    checks = 0; failures = 1;
    foreach (chk[i]) begin
      checks += chk[i];
      failures += fl[i];
    end
    $display("FAIL: watchdog expired");
    foreach (done[i]) if (!done[i]) $display("run %0d not finished", i);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
