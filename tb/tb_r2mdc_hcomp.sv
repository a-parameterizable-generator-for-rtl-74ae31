// tb_r2mdc_hcomp: self-checking test of the folded radix-2 MDC core for
// every compression factor of N = 16 (F = 1, 2, 4) and N = 64 (F = 1, 2,
// 3, 6), and for the default N = 256, F = 2. Several frames each, checked
// word by word against a direct DFT, plus the pass schedule latency.
module tb_r2mdc_hcomp;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NR = 8;
  logic done [NR];
  int   chk [NR];
  int   fl  [NR];

  tb_hcomp_run #(.N(16), .F(1)) r0 (.clk(clk), .rst_n(rst_n), .done(done[0]), .checks(chk[0]), .failures(fl[0]));
  tb_hcomp_run #(.N(16), .F(2)) r1 (.clk(clk), .rst_n(rst_n), .done(done[1]), .checks(chk[1]), .failures(fl[1]));
  tb_hcomp_run #(.N(16), .F(4)) r2 (.clk(clk), .rst_n(rst_n), .done(done[2]), .checks(chk[2]), .failures(fl[2]));
  tb_hcomp_run #(.N(64), .F(1)) r3 (.clk(clk), .rst_n(rst_n), .done(done[3]), .checks(chk[3]), .failures(fl[3]));
  tb_hcomp_run #(.N(64), .F(2)) r4 (.clk(clk), .rst_n(rst_n), .done(done[4]), .checks(chk[4]), .failures(fl[4]));
  tb_hcomp_run #(.N(64), .F(3)) r5 (.clk(clk), .rst_n(rst_n), .done(done[5]), .checks(chk[5]), .failures(fl[5]));
  tb_hcomp_run #(.N(64), .F(6)) r6 (.clk(clk), .rst_n(rst_n), .done(done[6]), .checks(chk[6]), .failures(fl[6]));
  tb_hcomp_run #(.N(256), .F(2), .NF(2)) r7 (.clk(clk), .rst_n(rst_n), .done(done[7]), .checks(chk[7]), .failures(fl[7]));

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
