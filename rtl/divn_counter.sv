// divn_counter: divide-by-N counter in the ADPLL feedback path.
// Counts rising edges of the DCO output (seen in the ID clock domain) modulo
// N; div_out is high for the first N/2 DCO periods of every N, so it runs at
// the DCO frequency divided by N (f0 when the DCO runs at N*f0). N = 8 is
// the document's value; the duty cycle is this design's choice.
// Timing: div_out is registered and changes one clock after the DCO edge
// that completes a half period.
`timescale 1ps/1ps
module divn_counter #(
  parameter int unsigned N = 8
) (
  input  logic clk,
  input  logic rst,
  input  logic id_out,
  output logic div_out
);
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1;
  logic [CW-1:0] cnt;
  logic          id_q;
  logic          rise;

  assign rise = id_out & ~id_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      id_q    <= 1'b0;
      cnt     <= '0;
      div_out <= 1'b1;
    end else begin
      id_q <= id_out;
      if (rise) begin
        cnt     <= (cnt == CW'(N - 1)) ? '0 : cnt + 1'b1;
        div_out <= (cnt == CW'(N - 1)) || (cnt < CW'(N / 2 - 1));
      end
    end
  end
endmodule
