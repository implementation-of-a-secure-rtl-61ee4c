// receiver: the display-side FPGA.
// Bytes from the Wi-Fi module arrive over the UART; the two encrypted sensor
// bits of each byte (riat_pkg::sensor_frame_t) are XORed with this board's
// own TRNG output random bit q3 to give the decrypted bits plain[1:0]
// (bit 0 gas, bit 1 tracking), which drive the system display. A byte with
// a bad stop bit is discarded (rx_error pulses).
// XOR decryption with a TRNG-based random bit follows the document. The
// document does not say how the receiver's random bit comes to equal the
// transmitter's; as built, the result equals the sensor bits only when both
// ends applied the same random bit (key_used shows the bit applied here).
`timescale 1ps/1ps
module receiver #(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic       sys_clk,
  input  logic       clk_hf,
  input  logic       rst,
  input  logic       t,
  input  logic       rx,
  output logic       q3,
  output logic [1:0] cipher,
  output logic [1:0] plain,
  output logic       plain_valid,
  output logic       key_used,
  output logic       rx_error
);
  import riat_pkg::*;

  logic rnd_bit, rnd_valid, raw_bit, idout3;
  logic [1:0] rnd_sync;
  logic [7:0] rx_byte;
  logic       rx_valid;
  sensor_frame_t frame;

  trng u_trng (
    .sys_clk, .clk_hf, .rst, .t, .rnd_bit, .rnd_valid, .raw_bit, .idout3
  );

  always_ff @(posedge sys_clk) begin
    if (rst) rnd_sync <= '0;
    else     rnd_sync <= {rnd_sync[0], rnd_bit};
  end
  assign q3 = rnd_sync[1];

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk(sys_clk), .rst, .rxd(rx), .data(rx_byte), .valid(rx_valid),
    .frame_err(rx_error)
  );

  assign frame  = sensor_frame_t'(rx_byte);
  assign cipher = {frame.track, frame.gas};

  xor_cipher #(.WIDTH(SENSOR_BITS)) u_dec (
    .clk(sys_clk), .rst, .data_in(cipher), .key_bit(q3), .load(rx_valid),
    .data_out(plain), .key_used, .out_valid(plain_valid)
  );
endmodule
