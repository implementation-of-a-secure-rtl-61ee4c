// sensor_threshold: turns a sensor's ADC sample into one bit.
// When sample_valid is high the sample is compared with THRESHOLD: above it
// detect becomes 1 (gas or object detected), otherwise 0. detect holds until
// the next sample. The fixed-threshold rule follows the document; the
// threshold value (mid-scale) and the strict "greater than" are this
// design's choices. Timing: detect and detect_valid are registered, one
// clock after sample_valid.
`timescale 1ps/1ps
module sensor_threshold #(
  parameter int unsigned WIDTH     = 12,
  parameter int unsigned THRESHOLD = 2048
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] sample,
  input  logic             sample_valid,
  output logic             detect,
  output logic             detect_valid
);
  always_ff @(posedge clk) begin
    if (rst) begin
      detect       <= 1'b0;
      detect_valid <= 1'b0;
    end else begin
      detect_valid <= sample_valid;
      if (sample_valid) detect <= (sample > WIDTH'(THRESHOLD));
    end
  end
endmodule
