// trng_sampler: the sampling network of the TRNG (DFF1-DFF4, two XOR gates
// and the divide-by-2 counter).
// All flip-flops are clocked by IDout3, the DCO output of ADPLL 2. DFF1 and
// DFF2 sample ADPLL 1's two outputs (IDout1, IDout2); the jitter between the
// two loops, both locked to the same ring oscillator, makes these samples
// random. Their XOR is XORed with DFF3's own output, so DFF3 accumulates the
// parity of successive sample pairs. The divide-by-2 counter output marks
// every second edge: on the edge after each rising edge of it DFF4 takes DFF3 (the raw random bit) and
// DFF3 restarts from the new sample pair, so each raw bit is the parity of
// the two sample pairs of one divide-by-2 period and appears at IDout3/2
// (200 Mbit/s at the document's 400 MHz DCO output).
// The network follows the document's block diagram; which pin of each
// flip-flop is clock and which is reset is drawn but not labelled apart,
// and the reading above (rising edge of the divide-by-2 output as DFF3 restart and
// DFF4 load, DFF1/DFF2 reset only by rst) is this design's.
// Timing: raw_bit and raw_valid are registered; raw_valid is high for one
// clock with each new raw_bit. Reset is asynchronous (see div2_counter).
`timescale 1ps/1ps
module trng_sampler (
  input  logic clk,
  input  logic rst,
  input  logic t,
  input  logic idout1,
  input  logic idout2,
  output logic raw_bit,
  output logic raw_valid
);
  logic q1, q2, q3;
  logic div2, div2_q;
  logic load;
  logic pair;

  div2_counter u_div2 (.clk, .rst, .t, .q(div2));

  assign pair = q1 ^ q2;
  // a rising edge of the divide-by-2 output loads DFF4
  assign load = div2 & ~div2_q;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      q1        <= 1'b0;
      q2        <= 1'b0;
      q3        <= 1'b0;
      raw_bit   <= 1'b0;
      raw_valid <= 1'b0;
      div2_q    <= 1'b0;
    end else begin
      q1        <= idout1;
      q2        <= idout2;
      div2_q    <= div2;
      raw_valid <= load;
      if (load) begin
        raw_bit <= q3;
        q3      <= pair;
      end else begin
        q3      <= q3 ^ pair;
      end
    end
  end
endmodule
