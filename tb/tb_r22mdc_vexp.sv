// tb_r22mdc_vexp: self-checking test of the radix-2^2 MDC core with
// vertical expansion, over every degree of parallelism for N = 16
// (T = 1, 2, 4, 8), an odd number of stages (N = 32, T = 1 and 4) and
// N = 64 with T = 2. Each configuration runs several frames, back to back
// and after a gap, and is checked word by word against a direct DFT,
// plus latency and frame rate.
module tb_r22mdc_vexp;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NR = 7;
  logic done [NR];
  int   chk [NR];
  int   fl  [NR];

  tb_vexp_run #(.N(16), .T(1)) r0 (.clk(clk), .rst_n(rst_n), .done(done[0]), .checks(chk[0]), .failures(fl[0]));
  tb_vexp_run #(.N(16), .T(2)) r1 (.clk(clk), .rst_n(rst_n), .done(done[1]), .checks(chk[1]), .failures(fl[1]));
  tb_vexp_run #(.N(16), .T(4)) r2 (.clk(clk), .rst_n(rst_n), .done(done[2]), .checks(chk[2]), .failures(fl[2]));
  tb_vexp_run #(.N(16), .T(8)) r3 (.clk(clk), .rst_n(rst_n), .done(done[3]), .checks(chk[3]), .failures(fl[3]));
  tb_vexp_run #(.N(32), .T(1)) r4 (.clk(clk), .rst_n(rst_n), .done(done[4]), .checks(chk[4]), .failures(fl[4]));
  tb_vexp_run #(.N(32), .T(4)) r5 (.clk(clk), .rst_n(rst_n), .done(done[5]), .checks(chk[5]), .failures(fl[5]));
  tb_vexp_run #(.N(64), .T(2)) r6 (.clk(clk), .rst_n(rst_n), .done(done[6]), .checks(chk[6]), .failures(fl[6]));

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

  // Watchdog.
  initial begin
    repeat (20000) @(posedge clk);
    checks = 0; failures = 1;
    foreach (chk[i]) checks += chk[i];
    foreach (fl[i]) failures += fl[i];
    $display("FAIL: watchdog expired");
    foreach (done[i]) if (!done[i]) $display("run %0d not finished", i);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
