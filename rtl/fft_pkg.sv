// fft_pkg: types, word widths and constant functions shared by the FFT cores.
//
// Samples are complex two's-complement words of DATA_W bits per component.
// Twiddle factors are TW_W-bit signed words in which 1.0 is 2**(TW_W-2), so
// both +1 and -1 are exact. The widths are this design's choice; the
// generator described for these cores leaves the data width as a user
// parameter without naming a value.
//
// The stream position functions describe the order in which the pipelined
// multi-path delay commutator (MDC) datapaths carry a frame. A radix-2
// decimation-in-frequency (DIF) FFT of N = 2**M points has M stages; stage l
// combines elements i and i + D(l) of the in-place array, D(l) = N / 2**(l+1).
// With T butterfly units per stage, unit u at local cycle c of a frame
// handles the pair whose lower element is pair_base(N, T, l, c, u).
package fft_pkg;

  localparam int DATA_W = 16;
  localparam int TW_W   = 16;
  localparam int TW_FRAC = TW_W - 2;

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  typedef logic signed [TW_W-1:0] coef_t;
  typedef struct packed {
    coef_t re;
    coef_t im;
  } twiddle_t;

  // Frame control carried alongside the data: valid marks a cycle that
  // holds data, sof marks the first cycle of a frame.
  typedef struct packed {
    logic valid;
    logic sof;
  } strm_ctrl_t;

  // Twiddle-factor schedules a ROM can hold.
  typedef enum int {
    TW_R2  = 0,  // radix-2 DIF: W on the difference output only
    TW_R22 = 1   // radix-2^2: after BFII, on both outputs
  } tw_mode_e;

  localparam real PI = 3.14159265358979323846;

  function automatic int ilog2(input int v);
    int r = 0;
    while ((1 << r) < v) r++;
    return r;
  endfunction

  // Number of bits needed to count 0..n-1 (at least 1).
  function automatic int cntw(input int n);
    return (n <= 2) ? 1 : ilog2(n);
  endfunction

  function automatic int bitrev(input int v, input int bits);
    int r = 0;
    for (int b = 0; b < bits; b++) if (v[b]) r |= 1 << (bits - 1 - b);
    return r;
  endfunction

  // Butterfly distance of stage l.
  function automatic int stage_dist(input int n, input int l);
    return n >> (l + 1);
  endfunction

  // Lower in-place index of the pair unit u handles at local cycle c of
  // stage l. While D(l) >= T the units work as T interleaved pipelines
  // (unit u owns indices congruent to u mod T); once D(l) < T each cycle
  // holds 2T consecutive elements and the units split them spatially.
  function automatic int pair_base(input int n, input int t, input int l,
                                   input int c, input int u);
    int d, dl;
    d = stage_dist(n, l);
    if (d >= t) begin
      dl = d / t;
      return (c / dl) * 2 * d + (c % dl) * t + u;
    end
    return c * 2 * t + (u / d) * 2 * d + (u % d);
  endfunction

  // Exponent e of W_N^e applied after stage l to output `lane` of unit u
  // at local cycle c.
  //  TW_R2 : radix-2 DIF, (base mod D) * 2**l on the difference output.
  //  TW_R22: after a BFII stage l (odd), the twiddle deferred from stage
  //          l-1 and the one of stage l merged: (k1 + 2*lane) * j2 * 2**(l-1)
  //          with j2 = base mod D and k1 the half of the stage l-1 block.
  function automatic int tw_exponent(input int mode, input int n, input int t,
                                     input int l, input int u, input int lane,
                                     input int c);
    int d, base, j2, k1;
    d = stage_dist(n, l);
    base = pair_base(n, t, l, c, u);
    j2 = base % d;
    if (mode == TW_R2) return (lane == 1) ? (j2 << l) : 0;
    k1 = (base / (2 * d)) % 2;
    return ((k1 + 2 * lane) * j2) << (l - 1);
  endfunction

  // Quantised W_N^e = cos(2*pi*e/N) - j*sin(2*pi*e/N).
  function automatic twiddle_t twiddle(input int n, input int e);
    twiddle_t w;
    real ang, sc;
    ang = 2.0 * PI * real'(e) / real'(n);
    sc = real'(1 << TW_FRAC);
    w.re = coef_t'($rtoi(((($cos(ang) * sc) >= 0.0) ? 0.5 : -0.5) + $cos(ang) * sc));
    w.im = coef_t'($rtoi(((($sin(ang) * sc) >= 0.0) ? -0.5 : 0.5) - $sin(ang) * sc));
    return w;
  endfunction

endpackage
