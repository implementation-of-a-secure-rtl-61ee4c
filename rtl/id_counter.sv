// id_counter: the ADPLL's digitally controlled oscillator (ID counter).
// Clocked by the ID clock (2*N*f0), id_out toggles on every clock, giving
// the N*f0 DCO output. A carry from the loop filter removes the next toggle,
// delaying the output by half a DCO period; this is how the loop pulls the
// phase toward the reference. The document gives the clock ratio and that
// the ID counter changes its frequency after the loop filter output; the
// one-toggle-per-carry action is this design's reading.
// Timing: id_out is registered; a carry seen at a clock edge holds id_out at
// that edge.
`timescale 1ps/1ps
module id_counter (
  input  logic clk,
  input  logic rst,
  input  logic carry,
  output logic id_out
);
  always_ff @(posedge clk) begin
    if (rst)         id_out <= 1'b0;
    else if (!carry) id_out <= ~id_out;
  end
endmodule
