// fft_core: N-point pipelined FFT core whose throughput/area trade-off is
// set by one parameter, t = T_NUM / T_DEN.
//
// The throughput target is t * 2/N frames per clock (2t samples per clock).
// For t >= 1 (T_DEN = 1) the core is a radix-2^2 multi-path delay
// commutator FFT expanded to t parallel pipelines (r22mdc_vexp): 2t lanes,
// t*(2*ceil(log4 N) - 2) complex multipliers, N - 2t delay registers.
// For t = 1/f < 1 (T_NUM = 1, T_DEN = f, f dividing log2 N) it is a radix-2
// MDC FFT folded to log2(N)/f stages that the data passes f times
// (r2mdc_hcomp): 2 lanes, log2(N)/f multipliers. Exactly one of the two is
// built, so a given throughput yields one architecture.
//
// Interface (LANES = 2t, or 2 when folded): a frame is N/LANES consecutive
// valid clocks, accepted while in_ready is high (always high for t >= 1).
// Input lanes 2u and 2u+1 at clock c carry x[cU+u] and x[cU+u+N/2], U =
// LANES/2. Output lanes at clock c carry X(k)/N for k = bitrev(c*LANES +
// lane), bit-reversed order; out_sof marks the first output clock. Samples
// are DATA_W-bit complex words (fft_pkg); the input magnitude must stay
// below 2**(DATA_W-1).
//
// Lint note: rst_n is read synchronously only by the disable condition of
// the assertion inside the expanded pipeline, so its report as both
// synchronous and asynchronous concerns no logic.
module fft_core
  import fft_pkg::*;
#(
  parameter int N     = 256,
  parameter int T_NUM = 1,
  parameter int T_DEN = 1,
  localparam int LANES = (T_DEN == 1) ? 2 * T_NUM : 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  cplx_t in_data  [LANES],
  output logic  out_valid,
  output logic  out_sof,
  output cplx_t out_data [LANES]
);
  if (T_DEN == 1) begin : g_vexp
    assign in_ready = 1'b1;
    r22mdc_vexp #(.N(N), .T(T_NUM)) u_core (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(in_data),
      .out_valid(out_valid), .out_sof(out_sof), .out_data(out_data));
  end else begin : g_hcomp
    if (T_NUM != 1) begin : g_bad_t
      $error("fft_core: t below 1 must be 1/f");
    end
    r2mdc_hcomp #(.N(N), .F(T_DEN)) u_core (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
      .in_data(in_data), .out_valid(out_valid), .out_sof(out_sof),
      .out_data(out_data));
  end
endmodule
