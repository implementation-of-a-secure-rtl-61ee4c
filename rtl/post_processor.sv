// post_processor: post-processing of the raw random bits.
// Each output bit is the XOR of the current raw bit and the previous one.
// This keeps the bit rate (one output bit per raw bit) and reduces a bias
// of the raw stream; correlation between neighbours is not removed. The
// document only names a post-processing stage and reports an output rate equal to the raw
// rate, so this rate-preserving XOR corrector is this design's choice.
// Timing: rnd_bit/rnd_valid follow raw_bit/raw_valid by one clock.
// Reset is asynchronous (the sampling clock stops during reset).
`timescale 1ps/1ps
module post_processor (
  input  logic clk,
  input  logic rst,
  input  logic raw_bit,
  input  logic raw_valid,
  output logic rnd_bit,
  output logic rnd_valid
);
  logic prev;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      prev      <= 1'b0;
      rnd_bit   <= 1'b0;
      rnd_valid <= 1'b0;
    end else begin
      rnd_valid <= raw_valid;
      if (raw_valid) begin
        prev    <= raw_bit;
        rnd_bit <= raw_bit ^ prev;
      end
    end
  end
endmodule
