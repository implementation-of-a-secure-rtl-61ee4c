// tb_trng_sampler: drives random idout1/idout2 into the sampling network
// and compares raw_bit/raw_valid with a model of the network: DFF1/DFF2
// register the inputs, DFF3 accumulates their XOR and restarts, and DFF4
// loads DFF3, on the clock after each rising edge of the divide-by-2
// output. One raw bit must come every two clocks while t is high, none
// while t is low.
`timescale 1ps/1ps
module tb_trng_sampler;
  logic clk = 0, rst = 1, t = 1, idout1 = 0, idout2 = 0, raw_bit, raw_valid;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask
  always #1250 clk = ~clk;
  trng_sampler dut (.*);
  initial begin : watchdog
    #50us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic m_q1, m_q2, m_q3, m_div, m_divq, m_raw, m_valid, m_load;
  int nvalid;
  initial begin
    m_q1 = 0; m_q2 = 0; m_q3 = 0; m_div = 0; m_divq = 0; m_raw = 0; m_valid = 0;
    nvalid = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 3000; i++) begin
      if (i == 2000) t = 0;
      idout1 = 1'($urandom);
      idout2 = 1'($urandom);
      @(posedge clk); #1;
      // model, evaluated with the values before this edge
      m_load = m_div & ~m_divq;
      m_valid = m_load;
      if (m_load) begin m_raw = m_q3; m_q3 = m_q1 ^ m_q2; end
      else m_q3 = m_q3 ^ m_q1 ^ m_q2;
      m_divq = m_div;
      if (t || i == 2000) m_div = (i == 2000) ? m_div : ~m_div;
      m_q1 = idout1; m_q2 = idout2;
      check(raw_valid == m_valid, $sformatf("raw_valid at %0d", i));
      check(raw_bit == m_raw, $sformatf("raw_bit at %0d", i));
      if (raw_valid) nvalid++;
      if (i == 1999) begin
        check(nvalid == 1000, $sformatf("%0d raw bits in 2000 clocks, expected 1000", nvalid));
        nvalid = 0;
      end
    end
    check(nvalid <= 1, "no raw bits while t is low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
