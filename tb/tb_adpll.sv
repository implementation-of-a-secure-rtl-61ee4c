// tb_adpll: drives the ADPLL (N = 8, K = 4, 800 MHz clock, so f0 = 50 MHz)
// with ideal reference clocks. Inside the lock range, which for this loop
// runs from f0*(1-1/K) = 37.5 MHz up to f0, the divided output must follow
// the reference edge for edge over 4 us and the DCO output must run at N
// times the reference; the phase-detector duty cycle, and so the carry
// rate, must rise as the reference moves away from f0. Below the range
// (30 MHz) the loop must fail to lock.
`timescale 1ps/1ps
module tb_adpll;
  logic clk = 0, rst = 1, ref_in = 0;
  logic id_out, div_out, xor_out, carry;
  int ref_half = 10000;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask
  always #625 clk = ~clk;
  always #(ref_half) ref_in = ~ref_in;

  adpll dut (.*);

  initial begin : watchdog
    #200us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ref_e, div_e, id_e, carries;
  logic run = 0;
  always @(posedge ref_in)  if (run) ref_e++;
  always @(posedge div_out) if (run) div_e++;
  always @(posedge id_out)  if (run) id_e++;
  always @(posedge clk)     if (run) carries += carry;

  task automatic measure(input int half_ps, output int r, output int d, output int i, output int c);
    ref_half = half_ps;
    #6us;                    // settle
    ref_e = 0; div_e = 0; id_e = 0; carries = 0;
    run = 1;
    #4us;
    run = 0;
    r = ref_e; d = div_e; i = id_e; c = carries;
    $display("ref half %0d ps: ref %0d div %0d id %0d carries %0d", half_ps, r, d, i, c);
  endtask

  int r, d, i, c, c_prev;
  initial begin
    #5ns rst = 0;
    c_prev = -1;
    foreach (lockhalf[k]) begin
      measure(lockhalf[k], r, d, i, c);
      check(d >= r - 1 && d <= r + 1, "divided output follows the reference");
      check(i >= 8 * r - 8 && i <= 8 * r + 8, "DCO output at N times the reference");
      check(c > c_prev, "carry rate grows with the frequency offset");
      c_prev = c;
    end
    measure(16667, r, d, i, c);   // 30 MHz, below the lock range
    check(d > r + 10, "no lock below f0*(1-1/K)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int lockhalf[4] = '{10000, 10204, 11111, 12821};  // 50, 49, 45, 39 MHz
endmodule
