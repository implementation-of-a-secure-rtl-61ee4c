// div2_counter: the divide-by-2 counter of the TRNG sampling network, a
// toggle flip-flop. Clocked by the sampling clock (IDout3); while t is high
// q toggles on every edge, so it runs at half the sampling clock; while t is
// low q holds. t is the board's T-FF input pin. Reset is asynchronous,
// because the sampling clock is itself held still while the ADPLLs are in
// reset. The T input and the divide-by-2 function follow the document; the
// reset style is this design's.
`timescale 1ps/1ps
module div2_counter (
  input  logic clk,
  input  logic rst,
  input  logic t,
  output logic q
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst)    q <= 1'b0;
    else if (t) q <= ~q;
  end
endmodule
