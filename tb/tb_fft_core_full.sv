// tb_fft_core_full: the core at its default size, N = 256 and t = 1 (one
// radix-2^2 MDC pipeline), four random frames, the first three back to
// back and the last after a gap. Every output word is compared with a
// direct DFT; the latency of the first frame (138 clocks: 8 butterflies, 3
// multiplier columns, commutator delays 64+32+16+8+4+2+1) and the output
// frame spacing of 128 clocks for back-to-back input are checked too.
// The signal-to-quantization-noise ratio over all frames is printed and
// must reach 55 dB (about 61 dB is typical for inputs of +-23000 with
// 16-bit words and halving in every stage).
module tb_fft_core_full;
  import fft_pkg::*;
  import tb_fft_pkg::*;

  localparam int N   = 256;
  localparam int M   = 8;
  localparam int FL  = 128;
  localparam int NF  = 4;
  localparam int GAP = 9;
  localparam int LAT = 138;
  localparam real SQNR_MIN = 55.0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  in_valid, in_ready, out_valid, out_sof;
  cplx_t in_data [2];
  cplx_t out_data [2];

  fft_core dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .in_data(in_data), .out_valid(out_valid), .out_sof(out_sof),
    .out_data(out_data));

  real xr [NF][N];
  real xi [NF][N];
  int  cyc, checks, failures, out_frame, out_cnt, first_sof, last_sof, n_negj;

  function automatic int start(input int f);
    return 3 + f * FL + ((f == NF - 1) ? GAP : 0);
  endfunction

  initial begin
    for (int f = 0; f < NF; f++)
      for (int i = 0; i < N; i++) begin
        xr[f][i] = real'(rand_sample(23000));
        xi[f][i] = real'(rand_sample(23000));
      end
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
  end

  always_ff @(posedge clk) cyc <= rst_n ? cyc + 1 : 0;

  always_ff @(posedge clk) begin
    int c;
    in_valid <= 1'b0;
    for (int f = 0; f < NF; f++) begin
      if (rst_n && cyc >= start(f) && cyc < start(f) + FL) begin
        c = cyc - start(f);
        in_valid <= 1'b1;
        in_data[0] <= '{re: sample_t'($rtoi(xr[f][c])), im: sample_t'($rtoi(xi[f][c]))};
        in_data[1] <= '{re: sample_t'($rtoi(xr[f][c+N/2])), im: sample_t'($rtoi(xi[f][c+N/2]))};
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) n_negj <= 0;
    else if (dut.g_vexp.u_core.s_ctrl[1].valid &&
             dut.g_vexp.u_core.g_stage[1].g_unit[0].g_bfii.neg_j) n_negj <= n_negj + 1;
  end

  real ps = 0.0, pe = 0.0;   // signal and error power over all frames
  real sqnr;

  initial begin
    real er, ei;
    int k;
    checks = 0; failures = 0; out_frame = 0; out_cnt = 0;
    first_sof = -1; last_sof = -1;
    @(posedge rst_n);
    while (out_frame < NF) begin
      @(posedge clk);
      if (!in_ready) begin
        failures++;
        $display("FAIL: in_ready low");
      end
      if (out_valid) begin
        if (out_sof) begin
          checks++;
          if (out_cnt != 0) failures++;
          if (first_sof < 0) begin
            first_sof = cyc;
            checks++;
            // The first word is on the bus during clock start(0)+1.
            if (first_sof - (start(0) + 1) != LAT) begin
              failures++;
              $display("FAIL: latency %0d expected %0d", first_sof - start(0) - 1, LAT);
            end
          end else if (out_frame < NF - 1) begin
            checks++;
            if (cyc - last_sof != FL) begin
              failures++;
              $display("FAIL: frame spacing %0d", cyc - last_sof);
            end
          end
          last_sof = cyc;
        end
        for (int w = 0; w < 2; w++) begin
          k = brev(2 * out_cnt + w, M);
          dft_scaled(N, xr[out_frame], xi[out_frame], k, er, ei);
          ps += er * er + ei * ei;
          pe += (real'(out_data[w].re) - er) ** 2 + (real'(out_data[w].im) - ei) ** 2;
          checks++;
          if (absr(real'(out_data[w].re) - er) > 3.0 || absr(real'(out_data[w].im) - ei) > 3.0) begin
            failures++;
            if (failures < 10)
              $display("FAIL frame %0d X[%0d]: got (%0d,%0d) expected (%f,%f)", out_frame, k,
                       int'(out_data[w].re), int'(out_data[w].im), er, ei);
          end
        end
        out_cnt++;
        if (out_cnt == FL) begin
          out_cnt = 0;
          out_frame++;
        end
      end
    end
    checks++;
    if (n_negj != NF * FL / 2) begin
      failures++;
      $display("FAIL: -j used %0d times, expected %0d", n_negj, NF * FL / 2);
    end
    sqnr = 10.0 * $log10(ps / pe);
    $display("SQNR %0.1f dB (16-bit words, 1/2 per stage)", sqnr);
    checks++;
    if (sqnr < SQNR_MIN) begin
      failures++;
      $display("FAIL: SQNR %0.1f dB below %0.1f dB", sqnr, SQNR_MIN);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
