// tb_trng: runs the complete TRNG (ring oscillator, two ADPLLs, sampling
// network, post-processing) from reset with the document's parameters.
// Checks: the ring starts only after the pulse generator enables it; ADPLL 2
// is locked, i.e. the sampling clock idout3 runs at N times the ring
// frequency (within 3 %, measured over 10 us); one output bit comes every
// two idout3 periods; each output bit is the XOR of the current and the
// previous raw bit; with t low no bits come. The ring model's jitter is the
// only randomness in simulation and both loops lock in step, so the
// simulated stream is close to constant; its statistics say nothing about
// the hardware's and are only printed.
`timescale 1ps/1ps
module tb_trng;
  logic sys_clk = 0, clk_hf = 0, rst = 1, t = 1;
  logic rnd_bit, rnd_valid, raw_bit, idout3;
  int checks = 0, failures = 0;

  always #5000 sys_clk = ~sys_clk;   // 100 MHz
  always #625  clk_hf  = ~clk_hf;    // 800 MHz = 16*f0

  trng dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int idout3_edges = 0, valid_cnt = 0, ones = 0, xor_bad = 0, changes = 0;
  logic prev_raw = 0, prev_rnd = 0, counting = 0;
  int ro_edges = 0;
  always @(posedge idout3) if (counting) idout3_edges++;
  always @(posedge dut.ro_out) if (counting) ro_edges++;
  // raw_bit changes one idout3 edge before rnd_bit; keep the raw bit the
  // post-processor used
  logic raw_q;
  always @(posedge idout3) begin
    raw_q <= raw_bit;
    if (counting && rnd_valid) begin
      valid_cnt++;
      ones += rnd_bit;
      if (rnd_bit != prev_rnd) changes++;
      prev_rnd = rnd_bit;
    end
  end
  // reference post-processing model on the raw stream
  logic [1:0] raw_hist = '0;
  logic       exp_rnd = 0;
  always @(posedge idout3) begin
    if (dut.raw_valid) begin
      exp_rnd  <= dut.raw_bit ^ raw_hist[0];
      raw_hist <= {raw_hist[0], dut.raw_bit};
    end
    if (counting && rnd_valid && rnd_bit != exp_rnd) xor_bad++;
  end

  initial begin
  end

  initial begin : watchdog
    #100us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(posedge sys_clk);
    rst = 0;
    check(dut.ro_en == 0, "ring held off right after reset");
    wait (dut.ro_en);
    #5us;               // let the loops settle
    counting = 1;
    #10us;
    counting = 0;
    $display("in 10 us: ring edges %0d, idout3 edges %0d, bits %0d, ones %0d, changes %0d",
             ro_edges, idout3_edges, valid_cnt, ones, changes);
    check(idout3_edges * 100 >= ro_edges * 8 * 97 && idout3_edges * 100 <= ro_edges * 8 * 103,
          "ADPLL 2 locked: idout3 = N * ring frequency");
    check(valid_cnt == idout3_edges / 2 || valid_cnt == (idout3_edges + 1) / 2, "one bit per two idout3 periods");
    check(xor_bad == 0, "output bit = raw XOR previous raw");
    // t low stops the divide-by-2 counter and so the output bits
    t = 0;
    #100ns;
    valid_cnt = 0;
    counting = 1;
    #500ns;
    counting = 0;
    check(valid_cnt == 0, "no bits while t is low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
