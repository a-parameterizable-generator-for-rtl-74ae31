// r22mdc_vexp: radix-2^2 multi-path delay commutator FFT, expanded to T
// parallel pipelines ("vertical expansion").
//
// An N-point DIF FFT (N = 2**M) is computed as M butterfly stages. Even
// stages are BFI butterflies; odd stages are BFII butterflies, which fold
// the trivial -j factor of the radix-2^2 decomposition into their input
// and are followed, unless they are the last stage, by two complex
// multipliers (one per output) with the merged radix-2^2 twiddles.
//
// T copies of the pipeline run side by side; copy u takes the pairs
// (x[cT+u], x[cT+u+N/2]) at cycle c, so a frame enters in N/(2T) cycles,
// 2T samples per clock. While the butterfly distance D of the next stage is
// at least T, each copy reorders its own two paths with a delay commutator
// of D/T registers, so the copies run independently. Once D drops below T
// the copies exchange data through the fixed wiring of interconnection
// permutations I_n (n = 4D), with no registers. T = 1 is the classic
// single R2^2MDC; T = N/2 is fully parallel and holds no delay registers.
// Datapath delay registers in total: N - 2T complex words.
//
// Interface: in_valid qualifies in_data; a frame is N/(2T) consecutive
// valid cycles (gaps are allowed only between frames). in_data[2u] and
// in_data[2u+1] are the lower and upper half samples of copy u. Output
// lanes 2u and 2u+1 at output cycle c carry X[bitrev(2cT+2u)] and
// X[bitrev(2cT+2u+1)] scaled by 1/N (bit-reversed order, M bits);
// out_sof marks the first cycle of an output frame. Frames can follow
// each other back to back: throughput is one frame every N/(2T) clocks.
// Latency from a frame's first input to its first output is
// M + (number of BFII stages followed by multipliers) + sum of the
// commutator delays. The stage structure, the I_n wiring and the -j
// handling follow the radix-2^2 MDC construction; the lane order,
// scaling, register placement and handshake are this design's choices.
//
// Lint notes: every stage builds the same two position counters, but a
// stage without multipliers and with a wiring-controlled -j does not read
// the input one, and the last stage does not read the output one; these
// are reported as unused and are removed by synthesis. rst_n is also read
// synchronously, but only by the disable condition of the framing
// assertion, so the report of it as both synchronous and asynchronous
// concerns no logic.
module r22mdc_vexp
  import fft_pkg::*;
#(
  parameter int N = 256,
  parameter int T = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t in_data  [2*T],
  output logic  out_valid,
  output logic  out_sof,
  output cplx_t out_data [2*T]
);
  localparam int M  = ilog2(N);
  localparam int FL = N / (2 * T);     // clocks per frame
  localparam int CW = cntw(FL);

  // ---------------------------------------------------------------------
  // Frame framing at the input.
  logic [CW-1:0] in_cnt;
  strm_ctrl_t    in_ctrl;

  assign in_ctrl = '{valid: in_valid, sof: in_valid && (in_cnt == '0)};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) in_cnt <= '0;
    else if (in_valid) in_cnt <= (in_cnt == CW'(FL - 1)) ? '0 : in_cnt + 1'b1;
  end

  // A frame, once started, must arrive without gaps.
  a_frame_contiguous: assert property (@(posedge clk) disable iff (!rst_n)
    (in_cnt != '0) |-> in_valid);

  // ---------------------------------------------------------------------
  // Stage array: s_data[l] / s_ctrl[l] is the input of stage l; index M is
  // the core output.
  cplx_t      s_data [M+1][2*T];
  strm_ctrl_t s_ctrl [M+1];

  assign s_data[0] = in_data;
  assign s_ctrl[0] = in_ctrl;

  for (genvar l = 0; l < M; l++) begin : g_stage
    localparam int  D        = N >> (l + 1);        // butterfly distance
    localparam bit  IS_BFII  = (l % 2) == 1;
    localparam bit  HAS_MULT = IS_BFII && (l < M - 1);
    localparam bit  TEMPORAL = D >= T;
    localparam int  DL       = TEMPORAL ? D / T : 1; // distance in clocks

    logic [CW-1:0] pos_in, pos_out;
    cplx_t         bf_out [2*T];
    cplx_t         st_out [2*T];
    strm_ctrl_t    c_bf, c_st;

    frame_pos #(.LEN(FL)) u_pos_in (
      .clk(clk), .rst_n(rst_n), .ctrl(s_ctrl[l]), .pos(pos_in));

    delay_line #(.T(strm_ctrl_t), .DEPTH(1), .RESET(1'b1)) u_c_bf (
      .clk(clk), .rst_n(rst_n), .d(s_ctrl[l]), .q(c_bf));

    for (genvar u = 0; u < T; u++) begin : g_unit
      if (IS_BFII) begin : g_bfii
        logic neg_j;
        // -j applies to pairs from the difference half of the previous
        // (BFI) stage: bit log2(2D) of the pair's in-place index.
        if (TEMPORAL) begin : g_t
          assign neg_j = pos_in[ilog2(DL)];
        end else begin : g_s
          assign neg_j = ((u / D) % 2) == 1;
        end
        bfii u_bf (
          .clk(clk), .neg_j(neg_j),
          .a(s_data[l][2*u]), .b(s_data[l][2*u+1]),
          .out0(bf_out[2*u]), .out1(bf_out[2*u+1]));
      end else begin : g_bfi
        bfi u_bf (
          .clk(clk),
          .a(s_data[l][2*u]), .b(s_data[l][2*u+1]),
          .out0(bf_out[2*u]), .out1(bf_out[2*u+1]));
      end

      if (HAS_MULT) begin : g_mult
        for (genvar k = 0; k < 2; k++) begin : g_lane
          twiddle_t w;
          twiddle_rom #(
            .N(N), .T(T), .MODE(TW_R22), .STAGE0(l), .UNIT(u), .LANE(k)
          ) u_rom (
            .clk(clk), .addr(pos_in), .w(w));
          complex_mult u_mul (
            .clk(clk), .a(bf_out[2*u+k]), .w(w), .p(st_out[2*u+k]));
        end
      end else begin : g_nomult
        assign st_out[2*u]   = bf_out[2*u];
        assign st_out[2*u+1] = bf_out[2*u+1];
      end
    end

    if (HAS_MULT) begin : g_c_mult
      delay_line #(.T(strm_ctrl_t), .DEPTH(1), .RESET(1'b1)) u_c_mul (
        .clk(clk), .rst_n(rst_n), .d(c_bf), .q(c_st));
    end else begin : g_c_nomult
      assign c_st = c_bf;
    end

    frame_pos #(.LEN(FL)) u_pos_out (
      .clk(clk), .rst_n(rst_n), .ctrl(c_st), .pos(pos_out));

    // Reorder for stage l+1.
    if (l == M - 1) begin : g_last
      assign s_data[M] = st_out;
      assign s_ctrl[M] = c_st;
    end else if ((D / 2) >= T) begin : g_comm
      localparam int CD = (D / 2) / T;    // commutator delay in clocks
      logic swap;
      assign swap = c_st.valid && pos_out[ilog2(CD)];
      for (genvar u = 0; u < T; u++) begin : g_unit
        delay_commutator #(.DELAY(CD)) u_comm (
          .clk(clk), .rst_n(rst_n), .swap(swap),
          .in0(st_out[2*u]), .in1(st_out[2*u+1]),
          .out0(s_data[l+1][2*u]), .out1(s_data[l+1][2*u+1]));
      end
      delay_line #(.T(strm_ctrl_t), .DEPTH(CD), .RESET(1'b1)) u_c_comm (
        .clk(clk), .rst_n(rst_n), .d(c_st), .q(s_ctrl[l+1]));
    end else begin : g_perm
      localparam int NW = 2 * D;          // I_n with n = 4 * (D/2)
      for (genvar g = 0; g < (2 * T) / NW; g++) begin : g_grp
        cplx_t pin [NW];
        cplx_t pout [NW];
        for (genvar i = 0; i < NW; i++) begin : g_w
          assign pin[i] = st_out[g*NW + i];
          assign s_data[l+1][g*NW + i] = pout[i];
        end
        perm_in #(.NW(NW)) u_perm (.in(pin), .out(pout));
      end
      assign s_ctrl[l+1] = c_st;
    end
  end

  assign out_data  = s_data[M];
  assign out_valid = s_ctrl[M].valid;
  assign out_sof   = s_ctrl[M].sof;
endmodule
