// uart_rx: serial receiver for bytes from the Wi-Fi module (8N1, least
// significant bit first). The line passes a two-flop synchroniser; a falling
// edge starts a frame (a line still low after a bad frame does not), the
// start bit is checked at its middle and each following bit is sampled
// CLKS_PER_BIT clocks later, in the middle of the bit. After the stop bit, valid pulses for one clock with the byte in data;
// frame_err pulses instead if the stop bit is low. Frame format and rate are
// this design's choices, matching uart_tx.
`timescale 1ps/1ps
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT);
  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_t;
  state_t        state;
  logic [1:0]    sync;
  logic [CW-1:0] tick;
  logic [2:0]    bit_idx;
  logic          line, line_q;

  assign line = sync[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      sync      <= 2'b11;
      line_q    <= 1'b1;
      state     <= IDLE;
      tick      <= '0;
      bit_idx   <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync      <= {sync[0], rxd};
      line_q    <= line;
      valid     <= 1'b0;
      frame_err <= 1'b0;
      case (state)
        IDLE: if (line_q && !line) begin
          state <= START;
          tick  <= '0;
        end
        START: if (tick == CW'(CLKS_PER_BIT / 2 - 1)) begin
          tick    <= '0;
          bit_idx <= '0;
          state   <= line ? IDLE : DATA;
        end else tick <= tick + 1'b1;
        DATA: if (tick == CW'(CLKS_PER_BIT - 1)) begin
          tick <= '0;
          data <= {line, data[7:1]};
          if (bit_idx == 3'd7) state <= STOP;
          else bit_idx <= bit_idx + 1'b1;
        end else tick <= tick + 1'b1;
        STOP: if (tick == CW'(CLKS_PER_BIT - 1)) begin
          tick  <= '0;
          state <= IDLE;
          if (line) valid <= 1'b1;
          else      frame_err <= 1'b1;
        end else tick <= tick + 1'b1;
        default: state <= IDLE;
      endcase
    end
  end
endmodule
