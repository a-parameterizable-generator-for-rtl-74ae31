// tb_fft_pkg: reference arithmetic for the FFT testbenches.
//
// A direct O(N^2) DFT in double precision, independent of the hardware's
// stage structure, plus helpers for random stimulus and the bit-reversed
// output order of the cores.
package tb_fft_pkg;
  import fft_pkg::*;

  localparam real TB_PI = 3.14159265358979323846;

  // X(k)/N of the frame (xr, xi), as real numbers in LSB units.
  function automatic void dft_scaled(input int n, input real xr[], input real xi[],
                                     input int k, output real yr, output real yi);
    real ar = 0.0, ai = 0.0, ang;
    for (int i = 0; i < n; i++) begin
      ang = -2.0 * TB_PI * real'((i * k) % n) / real'(n);
      ar += xr[i] * $cos(ang) - xi[i] * $sin(ang);
      ai += xr[i] * $sin(ang) + xi[i] * $cos(ang);
    end
    yr = ar / real'(n);
    yi = ai / real'(n);
  endfunction

  function automatic int brev(input int v, input int bits);
    int r = 0;
    for (int b = 0; b < bits; b++) if (((v >> b) & 1) != 0) r |= 1 << (bits - 1 - b);
    return r;
  endfunction

  function automatic int log2i(input int v);
    int r = 0;
    while ((1 << r) < v) r++;
    return r;
  endfunction

  function automatic sample_t rand_sample(input int amp);
    return sample_t'(int'($urandom_range(2 * amp)) - amp);
  endfunction

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction
endpackage
