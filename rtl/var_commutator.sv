// var_commutator: delay commutator whose delay is chosen at run time.
//
// Same structure as delay_commutator, but both delay lines are MAX_DELAY
// long and tapped after stage `tap` (delay = tap + 1 clocks), so one physical
// commutator can serve the different FFT stages that a folded datapath maps
// onto it. `tap` must stay constant while a pass of data is inside.
// The frame control (ctrl_in) travels through a matching variable delay,
// so ctrl_out stays aligned with the data on out0/out1; it clears on reset.
module var_commutator
  import fft_pkg::*;
#(
  parameter int MAX_DELAY = 32
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         swap,
  input  logic [cntw(MAX_DELAY)-1:0]   tap,
  input  cplx_t                        in0,
  input  cplx_t                        in1,
  output cplx_t                        out0,
  output cplx_t                        out1,
  input  strm_ctrl_t                   ctrl_in,
  output strm_ctrl_t                   ctrl_out
);
  strm_ctrl_t csr [MAX_DELAY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < MAX_DELAY; i++) csr[i] <= '0;
    end else begin
      // Stages beyond the tap are cleared so that control bits left there
      // by a pass with a shorter delay cannot reappear when it grows.
      csr[0] <= ctrl_in;
      for (int i = 1; i < MAX_DELAY; i++) csr[i] <= (i <= int'(tap)) ? csr[i-1] : '0;
    end
  end

  assign ctrl_out = csr[tap];

  cplx_t pre [MAX_DELAY];
  cplx_t post [MAX_DELAY];
  cplx_t in1_d, sw0, sw1;

  always_ff @(posedge clk) begin
    pre[0] <= in1;
    post[0] <= sw0;
    for (int i = 1; i < MAX_DELAY; i++) begin
      pre[i] <= pre[i-1];
      post[i] <= post[i-1];
    end
  end

  always_comb begin
    in1_d = pre[tap];
    sw0 = swap ? in1_d : in0;
    sw1 = swap ? in0   : in1_d;
    out0 = post[tap];
  end

  assign out1 = sw1;
endmodule
