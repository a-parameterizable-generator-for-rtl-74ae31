// twiddle_rom: the twiddle factors of one complex multiplier.
//
// Every multiplier in the FFT datapath has its own ROM holding exactly the
// twiddle factors it needs, in the order the data stream reaches it. The
// table is built at elaboration from cos/sin, so no data file is involved:
// entry (pass * DEPTH + c) holds W_N^e with
//   e = tw_exponent(MODE, N, T, STAGE0 + pass*STAGE_STEP, UNIT, LANE, c)
// (see fft_pkg), for pass 0..PASSES-1 and local cycle c 0..DEPTH-1.
// PASSES > 1 is used by the folded core, whose one physical stage serves a
// different FFT stage on every pass over the data.
// The read is registered: present the address of a pair at the butterfly
// input and the factor is ready, one clock later, with the butterfly output.
module twiddle_rom
  import fft_pkg::*;
#(
  parameter int N          = 256,
  parameter int T          = 1,
  parameter int MODE       = TW_R2,
  parameter int STAGE0     = 0,
  parameter int STAGE_STEP = 1,
  parameter int PASSES     = 1,
  parameter int UNIT       = 0,
  parameter int LANE       = 1,
  parameter int DEPTH      = N / (2 * T)
) (
  input  logic                                clk,
  input  logic [cntw(PASSES * DEPTH)-1:0]     addr,
  output twiddle_t                            w
);
  localparam int ENTRIES = PASSES * DEPTH;

  function automatic logic [ENTRIES-1:0][2*TW_W-1:0] build();
    logic [ENTRIES-1:0][2*TW_W-1:0] r;
    for (int p = 0; p < PASSES; p++)
      for (int c = 0; c < DEPTH; c++)
        r[p * DEPTH + c] = twiddle(N, tw_exponent(MODE, N, T, STAGE0 + p * STAGE_STEP,
                                                  UNIT, LANE, c));
    return r;
  endfunction

  localparam logic [ENTRIES-1:0][2*TW_W-1:0] ROM = build();

  always_ff @(posedge clk) begin
    if (ENTRIES == 1) w <= twiddle_t'(ROM[0]);
    else              w <= twiddle_t'(ROM[addr]);
  end
endmodule
