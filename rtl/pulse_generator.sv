// pulse_generator: starts the ring oscillator from the system clock.
// After reset is released it counts START_CYCLES system clocks, then emits
// a one-cycle start_pulse and from that cycle on holds ro_en high, which
// lets the ring oscillator run. A new reset stops the ring again.
// The document only names this block (System Clk -> Pulse Generator ->
// Ring Oscillator); the start delay and this behaviour are this design's.
// Timing: start_pulse and ro_en rise START_CYCLES+1 clocks after rst falls.
`timescale 1ps/1ps
module pulse_generator #(
  parameter int unsigned START_CYCLES = 16
) (
  input  logic clk,
  input  logic rst,
  output logic start_pulse,
  output logic ro_en
);
  localparam int unsigned CW = $clog2(START_CYCLES + 1);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt         <= '0;
      start_pulse <= 1'b0;
      ro_en       <= 1'b0;
    end else begin
      start_pulse <= 1'b0;
      if (!ro_en) begin
        if (cnt == CW'(START_CYCLES)) begin
          start_pulse <= 1'b1;
          ro_en       <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
