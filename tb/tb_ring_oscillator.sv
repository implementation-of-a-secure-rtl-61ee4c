// tb_ring_oscillator: checks the ring oscillator model. While en is low the
// output must not move; once enabled, the period must lie between
// 2*STAGES*T_INV_PS and 2*STAGES*(T_INV_PS+JITTER_PS), and the periods must
// vary (jitter). Disabling it stops the output again.
`timescale 1ps/1ps
module tb_ring_oscillator;
  logic en = 0, ro_out;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  ring_oscillator dut (.en, .ro_out);

  int edges = 0;
  realtime last = 0, pmin = 1e12, pmax = 0;
  always @(posedge ro_out) begin
    if (edges > 0) begin
      if ($realtime - last < pmin) pmin = $realtime - last;
      if ($realtime - last > pmax) pmax = $realtime - last;
    end
    last = $realtime;
    edges++;
  end

  initial begin : watchdog
    #100us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ns;              // the ring settles from its initial state
    edges = 0;
    pmin = 1e12;
    pmax = 0;
    #30ns;
    check(edges == 0, "no edges while disabled");
    en = 1;
    #5us;
    $display("edges %0d, period min %0t max %0t", edges, pmin, pmax);
    check(edges >= 5us / (2 * 51 * 220) - 1 && edges <= 5us / (2 * 51 * 200) + 1, "edge count in range");
    check(pmin >= 2 * 51 * 200 && pmax <= 2 * 51 * 220, "period within jitter bounds");
    check(pmax > pmin, "period jitters");
    en = 0;
    #100ns;
    edges = 0;
    #1us;
    check(edges == 0, "stops when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
