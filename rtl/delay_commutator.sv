// delay_commutator: two-path delay commutator between two MDC stages.
//
// Reorders two parallel streams so that elements DELAY positions apart in
// one stream meet on the two outputs. Lane 1 passes a DELAY-stage delay
// line before the switch, lane 0 goes straight in; after the switch, output
// 0 passes a DELAY-stage delay line and output 1 leaves directly. The
// switch crosses while `swap` is set (the second half of every 2*DELAY
// block of the incoming stream) and passes straight otherwise. Fed with the
// butterfly outputs of a stage of distance 2*DELAY, it delivers the pairs of
// the next stage, distance DELAY, DELAY clocks later.
module delay_commutator
  import fft_pkg::*;
#(
  parameter int DELAY = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  swap,
  input  cplx_t in0,
  input  cplx_t in1,
  output cplx_t out0,
  output cplx_t out1
);
  cplx_t in1_d, sw0, sw1;

  delay_line #(.T(cplx_t), .DEPTH(DELAY)) u_pre (
    .clk(clk), .rst_n(rst_n), .d(in1), .q(in1_d));

  always_comb begin
    sw0 = swap ? in1_d : in0;
    sw1 = swap ? in0   : in1_d;
  end

  delay_line #(.T(cplx_t), .DEPTH(DELAY)) u_post (
    .clk(clk), .rst_n(rst_n), .d(sw0), .q(out0));

  assign out1 = sw1;
endmodule
