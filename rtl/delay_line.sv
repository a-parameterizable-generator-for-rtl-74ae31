// delay_line: fixed delay of DEPTH clock cycles for a value of any type.
//
// A plain shift register. DEPTH = 0 gives a wire. With RESET set the stages
// clear on reset; use that for control (valid) bits, and leave it off for
// data so that long delay lines stay free of reset wiring.
//
// With RESET off, rst_n is left unconnected inside (a lint tool reports it
// unused); the port stays so that all instances share one interface.
module delay_line #(
  parameter type T = logic,
  parameter int DEPTH = 1,
  parameter bit RESET = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  T     d,
  output T     q
);
  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_sr
    T sr [DEPTH];
    if (RESET) begin : g_rst
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int i = 0; i < DEPTH; i++) sr[i] <= T'(0);
        end else begin
          sr[0] <= d;
          for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
        end
      end
    end else begin : g_norst
      always_ff @(posedge clk) begin
        sr[0] <= d;
        for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
      end
    end
    assign q = sr[DEPTH-1];
  end
endmodule
