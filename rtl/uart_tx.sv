// uart_tx: serial transmitter to the Wi-Fi module (8 data bits, no parity,
// one stop bit, least significant bit first).
// When valid is high while ready, the byte is taken and sent as a start bit
// (0), eight data bits and a stop bit (1), each CLKS_PER_BIT clocks long;
// ready is low during the frame. The idle line is high. The serial link to
// the Wi-Fi module is from the document; the frame format and the 115200
// baud rate at a 100 MHz clock (CLKS_PER_BIT = 868) are this design's.
`timescale 1ps/1ps
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  output logic       txd
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT);
  logic [CW-1:0] tick;
  logic [3:0]    bit_idx;
  logic [9:0]    shreg;
  logic          busy;

  assign ready = ~busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy    <= 1'b0;
      tick    <= '0;
      bit_idx <= '0;
      shreg   <= '1;
      txd     <= 1'b1;
    end else if (!busy) begin
      txd <= 1'b1;
      if (valid) begin
        busy    <= 1'b1;
        shreg   <= {1'b1, data, 1'b0};
        tick    <= '0;
        bit_idx <= '0;
        txd     <= 1'b0;
      end
    end else begin
      if (tick == CW'(CLKS_PER_BIT - 1)) begin
        tick <= '0;
        if (bit_idx == 4'd9) begin
          busy <= 1'b0;
          txd  <= 1'b1;
        end else begin
          bit_idx <= bit_idx + 1'b1;
          shreg   <= {1'b1, shreg[9:1]};
          txd     <= shreg[1];
        end
      end else begin
        tick <= tick + 1'b1;
      end
    end
  end
endmodule
