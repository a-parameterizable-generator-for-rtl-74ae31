// tb_hcomp_run: drives one r2mdc_hcomp instance with NF random frames and
// checks every output word against a double-precision DFT.
//
// A frame is started as soon as in_ready allows. Each output word is
// compared with X(k)/N at the bit-reversed index of its lane and clock,
// within TOL LSB per component. For every frame the clocks from its first
// input word to its first output word are checked against the schedule
// of F passes: pass p takes its pipeline latency L(p), the next pass starts
// N/2 clocks after the first word of pass p has left the last stage.
module tb_hcomp_run
  import fft_pkg::*;
  import tb_fft_pkg::*;
#(
  parameter int  N   = 16,
  parameter int  F   = 2,
  parameter int  NF  = 3,
  parameter int  AMP = 23000,
  parameter real TOL = 3.0
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int M  = log2i(N);
  localparam int S  = M / F;
  localparam int FL = N / 2;

  function automatic int pass_latency(input int p);
    int lat = 0;
    for (int s = 0; s < S; s++) begin
      lat += 1;                                  // butterfly
      if (F > 1 || s < S - 1) lat += 1;          // multiplier
      if (s < S - 1) lat += N >> (p * S + s + 2); // commutator
    end
    return lat;
  endfunction

  function automatic int exp_latency();
    int t = 0;
    for (int p = 0; p < F; p++) begin
      t += pass_latency(p);
      if (p < F - 1) t += FL;
    end
    return t;
  endfunction

  logic  in_valid, in_ready, out_valid, out_sof;
  cplx_t in_data [2];
  cplx_t out_data [2];

  r2mdc_hcomp #(.N(N), .F(F)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .in_data(in_data), .out_valid(out_valid), .out_sof(out_sof),
    .out_data(out_data));

  real xr [NF][N];
  real xi [NF][N];
  int  cyc;
  int  in_start [NF];
  int  sf, sc;          // frame and word being sent
  int  out_frame, out_cnt;

  initial begin
    for (int f = 0; f < NF; f++)
      for (int i = 0; i < N; i++) begin
        xr[f][i] = real'(rand_sample(AMP));
        xi[f][i] = real'(rand_sample(AMP));
      end
  end

  always_ff @(posedge clk) cyc <= rst_n ? cyc + 1 : 0;

  // Stimulus: valid/ready handshake. (sf, sc) is the word on the bus; it
  // advances when the core accepts it. A frame is offered word after word
  // without gaps.
  always_ff @(posedge clk or negedge rst_n) begin
    int nf, nc;
    if (!rst_n) begin
      in_valid <= 1'b0;
      sf <= 0;
      sc <= 0;
      for (int w = 0; w < 2; w++) in_data[w] <= '0;
    end else begin
      nf = sf;
      nc = sc;
      if (in_valid && in_ready) begin
        if (sc == 0) in_start[sf] <= cyc;
        if (sc == FL - 1) begin
          nc = 0;
          nf = sf + 1;
        end else begin
          nc = sc + 1;
        end
      end
      sf <= nf;
      sc <= nc;
      in_valid <= (nf < NF);
      if (nf < NF) begin
        in_data[0] <= '{re: sample_t'($rtoi(xr[nf][nc])), im: sample_t'($rtoi(xi[nf][nc]))};
        in_data[1] <= '{re: sample_t'($rtoi(xr[nf][nc+N/2])), im: sample_t'($rtoi(xi[nf][nc+N/2]))};
      end
    end
  end

  // Checker.
  initial begin
    real er, ei;
    int e, k;
    checks = 0; failures = 0; done = 1'b0;
    out_frame = 0; out_cnt = 0;
    @(posedge rst_n);
    while (out_frame < NF) begin
      @(posedge clk);
      if (out_valid) begin
        if (out_sof) begin
          checks++;
          if (out_cnt != 0 || cyc - in_start[out_frame] != exp_latency()) begin
            failures++;
            $display("FAIL N=%0d F=%0d frame %0d: latency %0d, expected %0d", N, F,
                     out_frame, cyc - in_start[out_frame], exp_latency());
          end
        end
        for (int w = 0; w < 2; w++) begin
          e = 2 * out_cnt + w;
          k = brev(e, M);
          dft_scaled(N, xr[out_frame], xi[out_frame], k, er, ei);
          checks++;
          if (absr(real'(out_data[w].re) - er) > TOL ||
              absr(real'(out_data[w].im) - ei) > TOL) begin
            failures++;
            if (failures < 10)
              $display("FAIL N=%0d F=%0d frame %0d X[%0d]: got (%0d,%0d) expected (%f,%f)",
                       N, F, out_frame, k, int'(out_data[w].re), int'(out_data[w].im), er, ei);
          end
        end
        out_cnt++;
        if (out_cnt == FL) begin
          out_cnt = 0;
          out_frame++;
        end
      end
    end
    done = 1'b1;
  end
endmodule
