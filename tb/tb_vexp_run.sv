// tb_vexp_run: drives one r22mdc_vexp instance with NF random frames and
// checks every output word against a double-precision DFT.
//
// Frames 0..NF-2 are sent back to back, the last after a gap of GAP idle
// clocks. Each output word is compared with X(k)/N at the bit-reversed
// index its lane and cycle stand for, within TOL LSB per component.
// It also checks the latency of the first frame against LAT and the
// spacing of back-to-back output frames (one per N/(2T) clocks).
module tb_vexp_run
  import fft_pkg::*;
  import tb_fft_pkg::*;
#(
  parameter int  N   = 16,
  parameter int  T   = 1,
  parameter int  NF  = 3,
  parameter int  GAP = 5,
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
  localparam int FL = N / (2 * T);

  // Latency worked out from the architecture: one clock per butterfly,
  // one per multiplier column, plus each commutator delay.
  function automatic int exp_latency();
    int lat = 0;
    for (int l = 0; l < M; l++) begin
      lat += 1;
      if ((l % 2 == 1) && (l < M - 1)) lat += 1;
      if ((l < M - 1) && ((N >> (l + 2)) >= T)) lat += (N >> (l + 2)) / T;
    end
    return lat;
  endfunction

  logic  in_valid, out_valid, out_sof;
  cplx_t in_data [2*T];
  cplx_t out_data [2*T];

  r22mdc_vexp #(.N(N), .T(T)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(in_data),
    .out_valid(out_valid), .out_sof(out_sof), .out_data(out_data));

  int  first_in;
  real xr [NF][N];
  real xi [NF][N];
  int  cyc, first_out, last_sof, out_frame, out_cnt;

  initial begin
    for (int f = 0; f < NF; f++)
      for (int i = 0; i < N; i++) begin
        xr[f][i] = real'(rand_sample(AMP));
        xi[f][i] = real'(rand_sample(AMP));
      end
  end

  always_ff @(posedge clk) cyc <= rst_n ? cyc + 1 : 0;

  // Stimulus: frame f occupies input clocks start(f) .. start(f)+FL-1.
  function automatic int start(input int f);
    return 3 + f * FL + ((f == NF - 1) ? GAP : 0);
  endfunction

  always_ff @(posedge clk) begin
    int f, c;
    in_valid <= 1'b0;
    for (f = 0; f < NF; f++) begin
      if (rst_n && cyc >= start(f) && cyc < start(f) + FL) begin
        c = cyc - start(f);
        in_valid <= 1'b1;
        for (int u = 0; u < T; u++) begin
          in_data[2*u]   <= '{re: sample_t'($rtoi(xr[f][c*T+u])),
                              im: sample_t'($rtoi(xi[f][c*T+u]))};
          in_data[2*u+1] <= '{re: sample_t'($rtoi(xr[f][c*T+u+N/2])),
                              im: sample_t'($rtoi(xi[f][c*T+u+N/2]))};
        end
      end
    end
  end

  // The first input word is on the bus during input clock start(0)+1.
  assign first_in = start(0) + 1;

  // Checker.
  initial begin
    real er, ei;
    int e, k;
    checks = 0; failures = 0; done = 1'b0;
    out_frame = 0; out_cnt = 0; first_out = -1; last_sof = -1;
    @(posedge rst_n);
    while (out_frame < NF) begin
      @(posedge clk);
      if (out_valid) begin
        if (out_sof) begin
          checks++;
          if (out_cnt != 0) begin
            failures++;
            $display("FAIL N=%0d T=%0d: sof inside a frame", N, T);
          end
          if (first_out < 0) begin
            first_out = cyc;
            checks++;
            if (first_out - first_in != exp_latency()) begin
              failures++;
              $display("FAIL N=%0d T=%0d: latency %0d, expected %0d", N, T,
                       first_out - first_in, exp_latency());
            end
          end else if (out_frame < NF - 1) begin
            checks++;
            if (cyc - last_sof != FL) begin
              failures++;
              $display("FAIL N=%0d T=%0d: frame spacing %0d, expected %0d", N, T,
                       cyc - last_sof, FL);
            end
          end
          last_sof = cyc;
        end
        for (int w = 0; w < 2 * T; w++) begin
          e = 2 * out_cnt * T + w;
          k = brev(e, M);
          dft_scaled(N, xr[out_frame], xi[out_frame], k, er, ei);
          checks++;
          if (absr(real'(out_data[w].re) - er) > TOL ||
              absr(real'(out_data[w].im) - ei) > TOL) begin
            failures++;
            if (failures < 10)
              $display("FAIL N=%0d T=%0d frame %0d X[%0d]: got (%0d,%0d) expected (%f,%f)",
                       N, T, out_frame, k, int'(out_data[w].re), int'(out_data[w].im), er, ei);
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
