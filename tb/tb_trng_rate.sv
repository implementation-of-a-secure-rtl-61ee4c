// tb_trng_rate: output bit rate of the TRNG against the reported 202.47
// Mbit/s of the transmitter. The ring's stage delay is set to 188 ps, so
// with the model's mean jitter the ring runs at about 49.5 MHz, just inside
// the lock range below f0 = 50 MHz. The generator must then deliver
// N*f_ring/2 bits per second (about 198 Mbit/s), within 2 % of that and
// within 3 % of 202.47 Mbit/s. It also collects 10 sequences of 150 output
// bits and prints the ones count of each (the frequency statistic of the
// statistical test suite); the model has too little jitter for these to
// mean anything about the hardware, so they are printed, not checked.
`timescale 1ps/1ps
module tb_trng_rate;
  logic sys_clk = 0, clk_hf = 0, rst = 1, t = 1;
  logic rnd_bit, rnd_valid, raw_bit, idout3;
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

  trng #(.RO_T_INV_PS(188)) dut (.*);

  initial begin : watchdog
    #200us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic counting = 0;
  int bits = 0, ro_e = 0, seq_ones = 0, seq_len = 0, nseq = 0;
  always @(posedge dut.ro_out) if (counting) ro_e++;
  always @(posedge idout3) if (counting && rnd_valid) begin
    bits++;
    if (nseq < 10) begin
      seq_ones += rnd_bit;
      if (++seq_len == 150) begin
        $display("sequence %0d: %0d ones in 150 bits", nseq, seq_ones);
        nseq++;
        seq_len = 0;
        seq_ones = 0;
      end
    end
  end

  real rate_mbps, ring_mhz;
  initial begin
    #20ns rst = 0;
    #10us;
    counting = 1;
    #20us;
    counting = 0;
    rate_mbps = bits / 20.0;
    ring_mhz  = ro_e / 20.0;
    $display("ring %0.2f MHz, output %0.2f Mbit/s (reported 202.47)", ring_mhz, rate_mbps);
    check(ring_mhz > 48.0 && ring_mhz < 50.0, "ring inside the lock range");
    check(rate_mbps > ring_mhz * 4 * 0.98 && rate_mbps < ring_mhz * 4 * 1.02, "rate = N * f_ring / 2");
    check(rate_mbps > 202.47 * 0.97 && rate_mbps < 202.47 * 1.03, "within 3 % of 202.47 Mbit/s");
    check(nseq == 10, "ten 150-bit sequences collected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
