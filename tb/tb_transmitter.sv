// tb_transmitter: the sensor-side FPGA with a fast UART (16 clocks per bit)
// and a fast display scan, fed by the ADC model. Random gas and tracking
// values are applied and changed from time to time; the
// serial line is decoded here and each byte is checked against the
// thresholded samples: the two encrypted bits XOR the random bit shown on
// key_used must give the sensor bits, so the two cipher bits XORed together
// equal the two sensor bits XORed together whatever the key. xorout must be
// the encrypted gas bit, the LEDs the gas sample read from the ADC. Samples
// that come while a byte is being sent must be reported as dropped; both
// must happen.
`timescale 1ps/1ps
module tb_transmitter;
  localparam int CPB = 16;
  logic sys_clk = 0, clk_hf = 0, rst = 1, t = 1;
  logic [11:0] value_gas = 0, value_trk = 0, led;
  logic xadc_eoc, xadc_drdy, xadc_den;
  logic [4:0] xadc_channel;
  logic [15:0] xadc_do;
  logic [6:0] xadc_daddr;
  logic q1, xorout, tx, key_used, frame_sent, tx_dropped;
  logic [6:0] seg;
  logic [3:0] an;
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
  transmitter #(.CLKS_PER_BIT(CPB), .REFRESH_CYCLES(4)) dut (.*);
  xadc_model adc (.clk(sys_clk), .rst, .value_trk, .value_gas, .drp_den(xadc_den),
                  .drp_daddr(xadc_daddr), .eoc(xadc_eoc), .channel(xadc_channel),
                  .drp_do(xadc_do), .drp_drdy(xadc_drdy));
  initial begin : watchdog
    #2ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // expected bytes: sensor bits and key of every sample that was sent
  typedef struct { logic gas; logic trk; logic key; } exp_t;
  exp_t q[$];
  logic gas_bit, trk_bit;
  int sent = 0, dropped = 0;
  // the pair the cipher was made from, thresholded here
  assign gas_bit = dut.gas_sample > 2048;
  assign trk_bit = dut.track_sample > 2048;
  always @(posedge sys_clk) begin
    if (!rst && frame_sent) begin
      q.push_back('{gas_bit, trk_bit, key_used});
      sent++;
      check(xorout == (gas_bit ^ key_used), "xorout is the encrypted gas bit");
    end
    if (!rst && tx_dropped) dropped++;
  end
  // serial decoder
  initial begin
    logic [7:0] b;
    exp_t e;
    forever begin
      @(negedge tx);
      if (rst) continue;
      #(CPB * 10000 / 2);
      for (int i = 0; i < 8; i++) begin
        #(CPB * 10000);
        b[i] = tx;
      end
      #(CPB * 10000);
      check(tx == 1, "stop bit");
      check(q.size() > 0, "byte expected");
      if (q.size() > 0) begin
        e = q.pop_front();
        check(b[7:2] == 0, "upper bits zero");
        check(b[0] == (e.gas ^ e.key) && b[1] == (e.trk ^ e.key), "cipher bits = sensor bits XOR key");
        check((b[0] ^ b[1]) == (e.gas ^ e.trk), "key cancels between the two bits");
      end
    end
  end
  initial begin
    #20ns rst = 0;
    #10us;   // TRNG settles
    for (int n = 0; n < 60; n++) begin
      value_gas = 12'($urandom);
      value_trk = 12'($urandom);
      repeat (3 * 10 * CPB) @(posedge sys_clk);
      #1 check(led == value_gas, "LEDs show the gas sample");
    end
    #(20 * CPB * 10000);
    $display("sent %0d, dropped %0d", sent, dropped);
    check(q.size() <= 1, "every sent byte seen on the line (one may be in flight)");
    check(sent > 0 && dropped > 0, "bytes sent and samples dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
