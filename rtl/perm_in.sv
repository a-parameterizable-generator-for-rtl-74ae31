// perm_in: interconnection permutation I_n between parallel MDC pipelines.
//
// Fixed wiring of n = 2**k wires. Wire i is the output `i mod 2` of
// butterfly unit i/2 of one stage; the permutation delivers it to input
// position dest(i) of the next stage:
//   i <  n/2 : dest(i) = i + (i mod 2) * (n/2 - 1)
//   i >= n/2 : dest(i) = i + (i mod 2) * (n/2 - 1) - (n/2 - 1)
// For n = 4 this swaps wires 1 and 2; for n = 8 it sends 1->4, 3->6, 4->1,
// 6->3. It pairs elements that lie n/4 apart once the butterfly distance
// has fallen below the number of parallel pipelines. No logic, no delay.
module perm_in
  import fft_pkg::*;
#(
  parameter int NW = 4
) (
  input  cplx_t in  [NW],
  output cplx_t out [NW]
);
  function automatic int dest(input int i);
    int h = NW / 2 - 1;
    return (i < NW / 2) ? i + (i % 2) * h : i + (i % 2) * h - h;
  endfunction

  for (genvar i = 0; i < NW; i++) begin : g_wire
    assign out[dest(i)] = in[i];
  end
endmodule
