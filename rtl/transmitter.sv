// transmitter: the sensor-side FPGA.
// The TRNG produces the output random bit q1, which a two-flop synchroniser
// brings into the system-clock domain. Each ADC sample pair (gas sensor on
// XADC channel 3, tracking sensor on channel 1) is turned into two detect
// bits by fixed thresholds; both bits are XORed with the current random bit
// and the encrypted pair is sent to the Wi-Fi module as one byte
// (riat_pkg::sensor_frame_t) over the UART. xorout is the encrypted gas
// bit. The 12 LEDs show the gas sample and the seven-segment display the
// tracking sample. A sample pair that arrives while the UART is still
// sending is encrypted but not sent (tx_dropped pulses): the ADC delivers
// pairs far faster than a 115200-baud line carries bytes, so the line
// carries the newest pair each time it is free.
// The chain sensor -> threshold -> XOR with TRNG bit -> Wi-Fi follows the
// document; the byte format, the drop policy and the synchroniser are this
// design's. key_used shows the random bit applied to the last sample.
`timescale 1ps/1ps
module transmitter #(
  parameter int unsigned CLKS_PER_BIT   = 868,
  parameter int unsigned REFRESH_CYCLES = 100000,
  parameter int unsigned GAS_THRESHOLD  = 2048,
  parameter int unsigned TRK_THRESHOLD  = 2048
) (
  input  logic        sys_clk,
  input  logic        clk_hf,
  input  logic        rst,
  input  logic        t,
  // on-chip ADC (channel sequencer and DRP)
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
  output logic        key_used,
  output logic        frame_sent,
  output logic        tx_dropped
);
  import riat_pkg::*;

  logic rnd_bit, rnd_valid, raw_bit, idout3;
  logic [11:0] gas_sample, track_sample;
  logic sample_valid;
  logic [1:0] rnd_sync;
  logic gas_det, gas_dv, trk_det, trk_dv;
  logic [SENSOR_BITS-1:0] cipher;
  logic cipher_valid, uart_ready;
  sensor_frame_t frame;

  trng u_trng (
    .sys_clk, .clk_hf, .rst, .t, .rnd_bit, .rnd_valid, .raw_bit, .idout3
  );

  xadc_reader u_adc (
    .clk(sys_clk), .rst, .eoc(xadc_eoc), .channel(xadc_channel),
    .drp_do(xadc_do), .drp_drdy(xadc_drdy), .drp_den(xadc_den),
    .drp_daddr(xadc_daddr), .gas_sample, .track_sample, .sample_valid
  );

  always_ff @(posedge sys_clk) begin
    if (rst) rnd_sync <= '0;
    else     rnd_sync <= {rnd_sync[0], rnd_bit};
  end
  assign q1 = rnd_sync[1];

  sensor_threshold #(.WIDTH(ADC_WIDTH), .THRESHOLD(GAS_THRESHOLD)) u_gas (
    .clk(sys_clk), .rst, .sample(gas_sample), .sample_valid,
    .detect(gas_det), .detect_valid(gas_dv)
  );
  sensor_threshold #(.WIDTH(ADC_WIDTH), .THRESHOLD(TRK_THRESHOLD)) u_trk (
    .clk(sys_clk), .rst, .sample(track_sample), .sample_valid,
    .detect(trk_det), .detect_valid(trk_dv)
  );

  xor_cipher #(.WIDTH(SENSOR_BITS)) u_enc (
    .clk(sys_clk), .rst, .data_in({trk_det, gas_det}), .key_bit(q1),
    .load(gas_dv), .data_out(cipher), .key_used, .out_valid(cipher_valid)
  );

  assign xorout = cipher[0];

  always_comb begin
    frame          = '0;
    frame.gas      = cipher[0];
    frame.track    = cipher[1];
  end

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk(sys_clk), .rst, .data(frame), .valid(cipher_valid),
    .ready(uart_ready), .txd(tx)
  );

  assign frame_sent = cipher_valid & uart_ready;
  assign tx_dropped = cipher_valid & ~uart_ready;

  always_ff @(posedge sys_clk) begin
    if (rst)               led <= '0;
    else if (sample_valid) led <= gas_sample;
  end

  logic [11:0] trk_shown;
  always_ff @(posedge sys_clk) begin
    if (rst)               trk_shown <= '0;
    else if (sample_valid) trk_shown <= track_sample;
  end

  seg7_display #(.REFRESH_CYCLES(REFRESH_CYCLES)) u_seg (
    .clk(sys_clk), .rst, .value(trk_shown), .seg, .an
  );

  // trk_dv is the same strobe as gas_dv: both thresholds see sample_valid
  always_ff @(posedge sys_clk)
    if (!rst) assert (trk_dv == gas_dv) else $error("transmitter: sensor strobes differ");
endmodule
