// frame_pos: position of the current cycle within a frame.
//
// Watches the frame control of a stream point and returns, in the same
// cycle, the index 0..LEN-1 of the data word there (0 on the start-of-frame
// cycle, one more on each later valid cycle). Combinational output from a
// registered count; the count only advances on valid cycles.
module frame_pos
  import fft_pkg::*;
#(
  parameter int LEN = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  strm_ctrl_t            ctrl,
  output logic [cntw(LEN)-1:0]  pos
);
  logic [cntw(LEN)-1:0] cnt_q;

  always_comb pos = ctrl.sof ? '0 : cnt_q + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt_q <= '0;
    else if (ctrl.valid) cnt_q <= pos;
  end
endmodule
