// tb_core_run: drives one fft_core configuration (N, t = T_NUM/T_DEN) with
// NF random frames through its valid/ready input and checks every output
// word against a double-precision DFT (X(k)/N at the bit-reversed index of
// the lane and clock, within TOL LSB). Frames after the first are offered
// back to back; frame NF-1 follows a gap of GAP idle clocks. It also counts
// how often the mechanisms of the chosen architecture were used: -j
// butterflies, commutator swaps and I_n stages for the expanded core,
// buffer passes and input stalls for the folded core.
module tb_core_run
  import fft_pkg::*;
  import tb_fft_pkg::*;
#(
  parameter int  N     = 16,
  parameter int  T_NUM = 1,
  parameter int  T_DEN = 1,
  parameter int  NF    = 3,
  parameter int  GAP   = 7,
  parameter int  AMP   = 23000,
  parameter real TOL   = 3.0
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_negj,      // BFII cycles with the -j factor applied
  output int   n_swap,      // commutator cycles in the crossed position
  output int   n_perm,      // valid words through an I_n stage
  output int   n_pass,      // passes read back from the frame buffer
  output int   n_stall      // clocks a waiting frame was held off
);
  localparam int LANES = (T_DEN == 1) ? 2 * T_NUM : 2;
  localparam int U     = LANES / 2;
  localparam int M     = log2i(N);
  localparam int FL    = N / LANES;

  logic  in_valid, in_ready, out_valid, out_sof;
  cplx_t in_data [LANES];
  cplx_t out_data [LANES];

  fft_core #(.N(N), .T_NUM(T_NUM), .T_DEN(T_DEN)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .in_data(in_data), .out_valid(out_valid), .out_sof(out_sof),
    .out_data(out_data));

  real xr [NF][N];
  real xi [NF][N];
  int  cyc, sf, sc, gap_left, out_frame, out_cnt;

  initial begin
    for (int f = 0; f < NF; f++)
      for (int i = 0; i < N; i++) begin
        xr[f][i] = real'(rand_sample(AMP));
        xi[f][i] = real'(rand_sample(AMP));
      end
  end

  always_ff @(posedge clk) cyc <= rst_n ? cyc + 1 : 0;

  // Stimulus: valid/ready, one frame after the other without gaps inside.
  always_ff @(posedge clk or negedge rst_n) begin
    int nf, nc;
    if (!rst_n) begin
      in_valid <= 1'b0;
      sf <= 0;
      sc <= 0;
      gap_left <= GAP;
      n_stall <= 0;
      for (int w = 0; w < LANES; w++) in_data[w] <= '0;
    end else begin
      nf = sf;
      nc = sc;
      if (in_valid && !in_ready) n_stall <= n_stall + 1;
      if (in_valid && in_ready) begin
        if (sc == FL - 1) begin
          nc = 0;
          nf = sf + 1;
        end else begin
          nc = sc + 1;
        end
      end
      if (nf == NF - 1 && nc == 0 && gap_left > 0) begin
        gap_left <= gap_left - 1;
        in_valid <= 1'b0;
      end else begin
        in_valid <= (nf < NF);
      end
      sf <= nf;
      sc <= nc;
      if (nf < NF) begin
        for (int u = 0; u < U; u++) begin
          in_data[2*u]   <= '{re: sample_t'($rtoi(xr[nf][nc*U+u])),
                              im: sample_t'($rtoi(xi[nf][nc*U+u]))};
          in_data[2*u+1] <= '{re: sample_t'($rtoi(xr[nf][nc*U+u+N/2])),
                              im: sample_t'($rtoi(xi[nf][nc*U+u+N/2]))};
        end
      end
    end
  end

  // Mechanism counters, read from inside the chosen architecture.
  if (T_DEN == 1) begin : g_cnt_vexp
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        n_negj <= 0;
        n_perm <= 0;
      end else begin
        if (dut.g_vexp.u_core.s_ctrl[1].valid &&
            dut.g_vexp.u_core.g_stage[1].g_unit[0].g_bfii.neg_j)
          n_negj <= n_negj + 1;
        if (T_NUM > 1 && dut.g_vexp.u_core.s_ctrl[M].valid) n_perm <= n_perm + 1;
      end
    end
    if (N / 4 >= T_NUM) begin : g_sw
      always_ff @(posedge clk) begin
        if (!rst_n) n_swap <= 0;
        else if (dut.g_vexp.u_core.g_stage[0].g_comm.swap) n_swap <= n_swap + 1;
      end
    end else begin : g_nosw
      assign n_swap = 0;
    end
    assign n_pass = 0;
  end else begin : g_cnt_hcomp
    always_ff @(posedge clk) begin
      if (!rst_n) n_pass <= 0;
      else if (dut.g_hcomp.u_core.feed_ctrl.sof) n_pass <= n_pass + 1;
    end
    assign n_negj = 0;
    assign n_swap = 0;
    assign n_perm = 0;
  end

  // Checker.
  initial begin
    real er, ei;
    int k;
    checks = 0; failures = 0; done = 1'b0;
    out_frame = 0; out_cnt = 0;
    @(posedge rst_n);
    while (out_frame < NF) begin
      @(posedge clk);
      if (out_valid) begin
        checks++;
        if (out_sof != (out_cnt == 0)) begin
          failures++;
          $display("FAIL N=%0d t=%0d/%0d: out_sof wrong at word %0d", N, T_NUM, T_DEN, out_cnt);
        end
        for (int w = 0; w < LANES; w++) begin
          k = brev(out_cnt * LANES + w, M);
          dft_scaled(N, xr[out_frame], xi[out_frame], k, er, ei);
          checks++;
          if (absr(real'(out_data[w].re) - er) > TOL ||
              absr(real'(out_data[w].im) - ei) > TOL) begin
            failures++;
            if (failures < 10)
              $display("FAIL N=%0d t=%0d/%0d frame %0d X[%0d]: got (%0d,%0d) expected (%f,%f)",
                       N, T_NUM, T_DEN, out_frame, k, int'(out_data[w].re),
                       int'(out_data[w].im), er, ei);
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
