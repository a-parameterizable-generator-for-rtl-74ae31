// r2mdc_hcomp: radix-2 multi-path delay commutator FFT, folded to fewer
// stages ("horizontal compression").
//
// A radix-2 MDC FFT of N = 2**M points has M butterfly stages. Folded by a
// factor F (a divisor of M), only S = M/F physical stages are built and a
// frame passes through them F times: on pass p, physical stage s computes
// FFT stage l = p*S + s. Every physical stage is a radix-2 butterfly
// followed by a complex multiplier on its difference output (the F = 1
// core omits the multiplier of the last stage, whose factors are all 1).
// The twiddle ROM of each multiplier holds the factors of all F stages it
// serves, addressed by pass and position. The commutators between physical
// stages are variable: their delay follows the stage being computed.
//
// Between passes the data of a frame waits in a frame buffer of two banks
// of N words: pass p writes bank p mod 2 while pass p reads bank
// (p-1) mod 2, so a pass never overwrites words it has still to read.
// The last physical stage writes each pair to the in-place index it
// stands for; the next pass reads the buffer in the order its first stage
// consumes pairs, so the buffer also does the reordering of the commutator
// that would sit there. The controller starts the next pass when the last
// word of the current pass has been written.
//
// Interface: in_ready is high when a new frame may start; a frame is N/2
// consecutive valid clocks of pairs (x[c], x[c+N/2]) on in_data[0/1],
// accepted while in_ready is high. Outputs are as in r22mdc_vexp with one
// unit: at output clock c, out_data[0/1] = X[bitrev(2c)], X[bitrev(2c+1)]
// scaled by 1/N; out_sof marks the first word. With F = 1 frames stream back
// to back, one every N/2 clocks. With F > 1 one frame is in the core at a
// time and takes F passes of N/2 clocks plus the pipeline latency of each
// pass, i.e. roughly F*N/2 clocks per frame.
// The folding of stages and its factor follow the R2MDC horizontal
// compression scheme; the frame buffer, pass controller and handshake are
// this design's own construction of it.
//
// Lint note: rst_n is read synchronously only by the disable condition of
// the handshake assertion, so its report as both synchronous and
// asynchronous concerns no logic.
module r2mdc_hcomp
  import fft_pkg::*;
#(
  parameter int N = 256,
  parameter int F = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  cplx_t in_data  [2],
  output logic  out_valid,
  output logic  out_sof,
  output cplx_t out_data [2]
);
  localparam int M  = ilog2(N);
  localparam int S  = M / F;            // physical stages
  localparam int FL = N / 2;            // clocks per pass
  localparam int CW = cntw(FL);
  localparam int PW = cntw(F);
  localparam int AW = ilog2(N);

  if (S * F != M) begin : g_bad_f
    $error("r2mdc_hcomp: F must divide log2(N)");
  end

  typedef enum logic [1:0] {IDLE, LOAD, WAIT, FEED} state_e;

  state_e          state;
  logic [PW-1:0]   pass_q;
  logic [CW-1:0]   in_cnt, rd_cnt, wr_cnt;
  logic            last_pass;
  strm_ctrl_t      in_ctrl, feed_ctrl;

  assign last_pass = (pass_q == PW'(F - 1));
  assign in_ready  = (state == IDLE) || (state == LOAD);
  assign in_ctrl   = '{valid: in_valid && in_ready,
                       sof: in_valid && in_ready && (in_cnt == '0)};
  assign feed_ctrl = '{valid: state == FEED, sof: (state == FEED) && (rd_cnt == '0)};

  // ---------------------------------------------------------------------
  // Physical stages. p_data[s] / p_ctrl[s] is the input of stage s.
  cplx_t      p_data [S+1][2];
  strm_ctrl_t p_ctrl [S+1];
  cplx_t      fb_rd [2];

  // ---------------------------------------------------------------------
  // Frame buffer: two banks of N words, written by the last physical stage,
  // read by the first. Addresses are in-place indices of the FFT stage at
  // either end; the bank is the parity of the pass.
  cplx_t          fbuf [2][N];
  logic           wbank;
  logic [CW-1:0]  wr_pos;
  logic [AW-1:0]  wa0, wa1, ra0, ra1;

  // Lower index of the pair at position c of FFT stage l: with distance
  // D = 2**ld, block c/D starts at 2D*(c/D) and the offset is c mod D.
  function automatic logic [AW-1:0] pair_addr(input logic [CW-1:0] c, input int ld);
    logic [AW-1:0] cc, lo, hi;
    cc = AW'(c);
    lo = cc & ((AW'(1) << ld) - 1'b1);
    hi = (cc >> ld) << (ld + 1);
    return hi | lo;
  endfunction

  always_comb begin
    int lw, lr;
    lw = int'(pass_q) * S + S - 1;      // stage written by this pass
    lr = int'(pass_q) * S;              // stage read by this pass
    wa0 = pair_addr(wr_pos, M - 1 - lw);
    wa1 = wa0 | (AW'(1) << (M - 1 - lw));
    ra0 = pair_addr(rd_cnt, M - 1 - lr);
    ra1 = ra0 | (AW'(1) << (M - 1 - lr));
  end

  always_ff @(posedge clk) begin
    if (p_ctrl[S].valid && !last_pass) begin
      fbuf[wbank][wa0] <= p_data[S][0];
      fbuf[wbank][wa1] <= p_data[S][1];
    end
  end

  assign wbank = pass_q[0];
  assign fb_rd[0] = fbuf[!wbank][ra0];
  assign fb_rd[1] = fbuf[!wbank][ra1];

  // ---------------------------------------------------------------------
  // Pass controller.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= IDLE;
      pass_q <= '0;
      in_cnt <= '0;
      rd_cnt <= '0;
      wr_cnt <= '0;
    end else begin
      if (in_ctrl.valid) in_cnt <= in_cnt + 1'b1;
      if (p_ctrl[S].valid) wr_cnt <= wr_cnt + 1'b1;
      case (state)
        IDLE, LOAD: begin
          if (in_ctrl.valid) state <= LOAD;
          if (in_ctrl.valid && in_cnt == CW'(FL - 1)) state <= (F == 1) ? IDLE : WAIT;
        end
        WAIT: begin
          if (p_ctrl[S].valid && wr_cnt == CW'(FL - 1)) begin
            if (last_pass) begin
              state  <= IDLE;
              pass_q <= '0;
            end else begin
              state  <= FEED;
              pass_q <= pass_q + 1'b1;
              rd_cnt <= '0;
            end
          end
        end
        FEED: begin
          rd_cnt <= rd_cnt + 1'b1;
          if (rd_cnt == CW'(FL - 1)) state <= WAIT;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // A frame, once started, must arrive without gaps.
  a_frame_contiguous: assert property (@(posedge clk) disable iff (!rst_n)
    (state == LOAD) |-> in_valid);

  assign p_data[0] = (pass_q == '0) ? in_data : fb_rd;
  assign p_ctrl[0] = (pass_q == '0) ? in_ctrl : feed_ctrl;

  for (genvar s = 0; s < S; s++) begin : g_stage
    localparam bit HAS_MULT = (F > 1) || (s < S - 1);
    localparam int MAXD = N >> (s + 2);   // commutator delay on pass 0

    logic [CW-1:0] pos_in, pos_out;
    cplx_t         bf_out [2];
    cplx_t         st_out [2];
    strm_ctrl_t    c_bf, c_st;

    frame_pos #(.LEN(FL)) u_pos_in (
      .clk(clk), .rst_n(rst_n), .ctrl(p_ctrl[s]), .pos(pos_in));

    delay_line #(.T(strm_ctrl_t), .DEPTH(1), .RESET(1'b1)) u_c_bf (
      .clk(clk), .rst_n(rst_n), .d(p_ctrl[s]), .q(c_bf));

    bfi u_bf (
      .clk(clk), .a(p_data[s][0]), .b(p_data[s][1]),
      .out0(bf_out[0]), .out1(bf_out[1]));

    if (HAS_MULT) begin : g_mult
      twiddle_t w;
      logic [cntw(F * FL)-1:0] rom_addr;
      assign rom_addr = ($bits(rom_addr))'(int'(pass_q) * FL + int'(pos_in));
      twiddle_rom #(
        .N(N), .T(1), .MODE(TW_R2), .STAGE0(s), .STAGE_STEP(S),
        .PASSES(F), .UNIT(0), .LANE(1)
      ) u_rom (
        .clk(clk), .addr(rom_addr), .w(w));
      complex_mult u_mul (.clk(clk), .a(bf_out[1]), .w(w), .p(st_out[1]));
      delay_line #(.T(cplx_t), .DEPTH(1)) u_d0 (
        .clk(clk), .rst_n(rst_n), .d(bf_out[0]), .q(st_out[0]));
      delay_line #(.T(strm_ctrl_t), .DEPTH(1), .RESET(1'b1)) u_c_mul (
        .clk(clk), .rst_n(rst_n), .d(c_bf), .q(c_st));
    end else begin : g_nomult
      assign st_out = bf_out;
      assign c_st = c_bf;
    end

    frame_pos #(.LEN(FL)) u_pos_out (
      .clk(clk), .rst_n(rst_n), .ctrl(c_st), .pos(pos_out));

    if (s == S - 1) begin : g_last
      assign p_data[S] = st_out;
      assign p_ctrl[S] = c_st;
      assign wr_pos = pos_out;
    end else begin : g_comm
      // The next FFT stage has distance N >> (l+2); the commutator delays
      // by that much and swaps in the upper half of each block of twice it.
      logic [cntw(MAXD)-1:0] tap;
      logic [CW-1:0]         half;
      logic                  swap;
      always_comb begin
        int l;
        l = int'(pass_q) * S + s;
        half = CW'(N >> (l + 2));
        tap  = ($bits(tap))'((N >> (l + 2)) - 1);
      end
      assign swap = c_st.valid && ((pos_out & half) != '0);
      var_commutator #(.MAX_DELAY(MAXD)) u_comm (
        .clk(clk), .rst_n(rst_n), .swap(swap), .tap(tap),
        .in0(st_out[0]), .in1(st_out[1]),
        .out0(p_data[s+1][0]), .out1(p_data[s+1][1]),
        .ctrl_in(c_st), .ctrl_out(p_ctrl[s+1]));
    end
  end

  assign out_data  = p_data[S];
  assign out_valid = p_ctrl[S].valid && last_pass;
  assign out_sof   = p_ctrl[S].sof && last_pass;
endmodule
