// tb_riat_wcs_top: end-to-end run of the whole link at its default sizes
// (115200 baud at 100 MHz, 800 MHz ADPLL clock). The transmitter's serial
// output is wired to the receiver's input, standing in for the Wi-Fi and
// cloud path, and the ADC model feeds the transmitter. Sensor values are
// applied and changed; every byte the receiver gets must
// be the byte the transmitter sent, and the receiver's output XORed with
// both boards' random bits must give back the thresholded sensor bits.
// Mechanisms counted (each must happen at least once): loop-filter carries
// in both boards' ADPLLs, ADPLL 2 lock (sampling clock = N times the ring
// frequency), raw random bits, gas and tracking detect 0 and 1, bytes sent,
// ADC sample pairs dropped while the UART is busy, bytes decrypted, a corrupted
// frame rejected, and output bits stopping when t is low.
`timescale 1ps/1ps
module tb_riat_wcs_top;
  logic sys_clk = 0, clk_hf = 0, rst = 1, t = 1;
  logic [11:0] value_gas = 0, value_trk = 0, led;
  logic xadc_eoc, xadc_drdy, xadc_den;
  logic [4:0] xadc_channel;
  logic [15:0] xadc_do;
  logic [6:0] xadc_daddr;
  logic q1, xorout, tx, tx_key, tx_frame_sent, tx_dropped;
  logic [6:0] seg;
  logic [3:0] an;
  logic rx, q3, rx_plain_valid, rx_key, rx_error;
  logic [1:0] rx_cipher, rx_plain;
  logic corrupt = 0;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask
  always #5000 sys_clk = ~sys_clk;
  always #625  clk_hf  = ~clk_hf;

  assign rx = tx & ~corrupt;

  riat_wcs_top dut (.*);
  xadc_model adc (.clk(sys_clk), .rst, .value_trk, .value_gas, .drp_den(xadc_den),
                  .drp_daddr(xadc_daddr), .eoc(xadc_eoc), .channel(xadc_channel),
                  .drp_do(xadc_do), .drp_drdy(xadc_drdy));

  initial begin : watchdog
    #5ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // what the transmitter sent: sensor bits, its key, the cipher bits
  typedef struct { logic [1:0] plain; logic key; } sent_t;
  sent_t q[$];
  logic [1:0] sensor_bits;
  int n_sent = 0, n_drop = 0, n_dec = 0, n_err = 0, n_carry_tx = 0, n_carry_rx = 0;
  int n_raw = 0, n_gas[2] = '{0, 0}, n_trk[2] = '{0, 0};
  // the pair the transmitter encrypted, thresholded here
  assign sensor_bits = {dut.u_tx.track_sample > 2048, dut.u_tx.gas_sample > 2048};
  always @(posedge sys_clk) if (!rst) begin
    if (tx_frame_sent) begin
      q.push_back('{sensor_bits, tx_key});
      n_sent++;
      n_gas[sensor_bits[0]]++;
      n_trk[sensor_bits[1]]++;
    end
    if (tx_dropped) n_drop++;
    if (rx_error) begin
      n_err++;
      if (q.size() > 0) void'(q.pop_front());
    end
    if (rx_plain_valid) begin
      n_dec++;
      check(q.size() > 0, "decrypted byte expected");
      if (q.size() > 0) begin
        check(rx_cipher == (q[0].plain ^ {2{q[0].key}}), "receiver got the byte that was sent");
        check((rx_plain ^ {2{rx_key}} ^ {2{q[0].key}}) == q[0].plain,
              "plain XOR both keys = sensor bits");
        void'(q.pop_front());
      end
    end
  end
  always @(posedge clk_hf) begin
    n_carry_tx += dut.u_tx.u_trng.carry1 + dut.u_tx.u_trng.carry2;
    n_carry_rx += dut.u_rx.u_trng.carry1 + dut.u_rx.u_trng.carry2;
  end
  logic counting = 0;
  int ro_e = 0, id3_e = 0;
  always @(posedge dut.u_tx.u_trng.idout3) begin
    if (counting) id3_e++;
    if (dut.u_tx.u_trng.raw_valid) n_raw++;
  end
  always @(posedge dut.u_tx.u_trng.ro_out) if (counting) ro_e++;

  localparam int BIT_PS = 868 * 10000;
  int raw_before;
  initial begin
    #20ns rst = 0;
    #6us;
    counting = 1;
    #4us;
    counting = 0;
    check(id3_e * 100 >= ro_e * 8 * 97 && id3_e * 100 <= ro_e * 8 * 103, "transmitter ADPLL 2 locked");
    for (int n = 0; n < 10; n++) begin
      value_gas = (n % 2) ? 12'($urandom_range(4095, 2049)) : 12'($urandom_range(2048, 0));
      value_trk = (n % 3) ? 12'($urandom_range(4095, 2049)) : 12'($urandom_range(2048, 0));
      repeat (2) @(posedge tx_frame_sent);
      #1 check(led == value_gas, "LEDs show the gas sample");
    end
    // a frame whose stop bit is forced low on the way
    @(posedge tx_frame_sent);
    #(9 * BIT_PS + BIT_PS / 4);
    corrupt = 1;
    #(BIT_PS / 2);
    corrupt = 0;
    #(2 * BIT_PS);
    check(n_err == 1, "corrupted frame rejected");
    // t low stops the random bits
    t = 0;
    #200ns;
    raw_before = n_raw;
    #1us;
    check(n_raw == raw_before, "no raw bits while t is low");
    $display("sent %0d dropped %0d decrypted %0d errors %0d carries tx %0d rx %0d raw %0d",
              n_sent, n_drop, n_dec, n_err, n_carry_tx, n_carry_rx, n_raw);
    check(n_carry_tx > 0 && n_carry_rx > 0, "mechanism: loop-filter carries");
    check(n_raw > 0, "mechanism: raw random bits");
    check(n_gas[0] > 0 && n_gas[1] > 0 && n_trk[0] > 0 && n_trk[1] > 0, "mechanism: detect 0 and 1");
    check(n_sent >= 21 && n_drop > 0, "mechanism: bytes sent, samples dropped");
    check(n_dec >= n_sent - 2 && n_dec >= 20, "mechanism: bytes decrypted");
    check(an != 4'b1111, "a display digit is lit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
