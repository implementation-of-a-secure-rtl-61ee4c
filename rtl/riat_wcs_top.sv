// riat_wcs_top: the secure sensor link, transmitter and receiver FPGAs.
// The transmitter encrypts the thresholded gas and tracking sensor bits
// with its TRNG and sends them as UART bytes (tx); the receiver takes UART
// bytes (rx), decrypts them with its own TRNG and presents the sensor bits.
// Between tx and rx lie the two Wi-Fi modules, a router and a cloud service,
// which are not logic and stay outside: tx and rx are ports, and a test can
// join them directly. The on-chip ADC (XADC) is a vendor block, so its
// sequencer outputs and DRP port are ports as well (xadc_*). Both boards share sys_clk (100 MHz system clock) and
// clk_hf (16*f0 = 800 MHz ADPLL clock) here; on hardware each board has its
// own. Reset (rst) is active high, t is the T-FF enable pin of the TRNGs.
`timescale 1ps/1ps
module riat_wcs_top #(
  parameter int unsigned CLKS_PER_BIT   = 868,
  parameter int unsigned REFRESH_CYCLES = 100000
) (
  input  logic        sys_clk,
  input  logic        clk_hf,
  input  logic        rst,
  input  logic        t,
  // transmitter board
  input  logic        xadc_eoc,
  input  logic [4:0]  xadc_channel,
  input  logic [15:0] xadc_do,
  input  logic        xadc_drdy,
  output logic        xadc_den,
  output logic [6:0]  xadc_daddr,
  output logic        q1,
  output logic        xorout,
  output logic        tx,
  output logic [11:0] led,
  output logic [6:0]  seg,
  output logic [3:0]  an,
  output logic        tx_key,
  output logic        tx_frame_sent,
  output logic        tx_dropped,
  // receiver board
  input  logic        rx,
  output logic        q3,
  output logic [1:0]  rx_cipher,
  output logic [1:0]  rx_plain,
  output logic        rx_plain_valid,
  output logic        rx_key,
  output logic        rx_error
);
  transmitter #(.CLKS_PER_BIT(CLKS_PER_BIT), .REFRESH_CYCLES(REFRESH_CYCLES)) u_tx (
    .sys_clk, .clk_hf, .rst, .t, .xadc_eoc, .xadc_channel, .xadc_do,
    .xadc_drdy, .xadc_den, .xadc_daddr,
    .q1, .xorout, .tx, .led, .seg, .an, .key_used(tx_key),
    .frame_sent(tx_frame_sent), .tx_dropped
  );

  receiver #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .sys_clk, .clk_hf, .rst, .t, .rx, .q3, .cipher(rx_cipher),
    .plain(rx_plain), .plain_valid(rx_plain_valid), .key_used(rx_key),
    .rx_error
  );
endmodule
