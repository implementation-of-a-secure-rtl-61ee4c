// seg7_display: shows a 12-bit sensor value on a 4-digit multiplexed
// seven-segment display, in hexadecimal. Digit 0 (rightmost) shows bits
// 3:0, digit 1 bits 7:4, digit 2 bits 11:8; digit 3 stays dark. A refresh
// counter selects one digit every REFRESH_CYCLES clocks; anodes (an) and
// segments (seg, order g..a) are active low, as on common Artix-7 boards.
// Showing the tracking-sensor value on the seven-segment display follows
// the document; hexadecimal digits and the refresh period (1 ms per digit at
// 100 MHz) are this design's choices.
`timescale 1ps/1ps
module seg7_display #(
  parameter int unsigned REFRESH_CYCLES = 100000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [11:0] value,
  output logic [6:0]  seg,
  output logic [3:0]  an
);
  localparam int unsigned CW = $clog2(REFRESH_CYCLES);
  logic [CW-1:0] cnt;
  logic [1:0]    digit;
  logic [3:0]    nib;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt   <= '0;
      digit <= '0;
    end else if (cnt == CW'(REFRESH_CYCLES - 1)) begin
      cnt   <= '0;
      digit <= digit + 1'b1;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  always_comb begin
    unique case (digit)
      2'd0:    nib = value[3:0];
      2'd1:    nib = value[7:4];
      2'd2:    nib = value[11:8];
      default: nib = 4'h0;
    endcase
    an = (digit == 2'd3) ? 4'b1111 : ~(4'b0001 << digit);
  end

  // segment patterns, bit 6 = g ... bit 0 = a, active low
  always_comb begin
    unique case (nib)
      4'h0: seg = 7'b1000000;
      4'h1: seg = 7'b1111001;
      4'h2: seg = 7'b0100100;
      4'h3: seg = 7'b0110000;
      4'h4: seg = 7'b0011001;
      4'h5: seg = 7'b0010010;
      4'h6: seg = 7'b0000010;
      4'h7: seg = 7'b1111000;
      4'h8: seg = 7'b0000000;
      4'h9: seg = 7'b0010000;
      4'hA: seg = 7'b0001000;
      4'hB: seg = 7'b0000011;
      4'hC: seg = 7'b1000110;
      4'hD: seg = 7'b0100001;
      4'hE: seg = 7'b0000110;
      default: seg = 7'b0001110;
    endcase
  end
endmodule
