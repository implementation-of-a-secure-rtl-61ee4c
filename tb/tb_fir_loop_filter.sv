// tb_fir_loop_filter: drives random one-bit samples into the loop filter
// and compares y(n) and the carry with a reference model computed here:
// y(n) = a*x(n-3) + b*x(n-2) + c*x(n-1) + d*x(n) and an accumulator of
// modulus K*(a+b+c+d). Also checks the carry rate for x stuck at 1 (one
// carry every K clocks) and at 0 (none).
`timescale 1ps/1ps
module tb_fir_loop_filter;
  logic clk = 0, rst = 1, x_in = 0, carry;
  logic [5:0] y_out;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask
  always #625 clk = ~clk;
  fir_loop_filter dut (.*);

  localparam int A = 2, B = 7, C = 7, D = 2, K = 4, MOD = K * (A + B + C + D);

  initial begin : watchdog
    #100us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xh[4];     // xh[0] = x(n), xh[1] = x(n-1) ...
  int acc, y, exp_carry, ncarry;
  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    xh = '{0, 0, 0, 0};
    acc = 0;
    exp_carry = 0;
    for (int i = 0; i < 2000; i++) begin
      x_in = (i < 1000) ? 1'($urandom) : 1'(i >= 1500);
      xh[0] = x_in;
      #1;
      y = A * xh[3] + B * xh[2] + C * xh[1] + D * xh[0];
      check(y_out == 6'(y), $sformatf("y(%0d) = %0d, expected %0d", i, y_out, y));
      @(posedge clk); #1;
      acc += y;
      exp_carry = (acc >= MOD);
      if (exp_carry) acc -= MOD;
      check(carry == exp_carry, $sformatf("carry at %0d", i));
      if (i >= 1100 && i < 1500) check(!carry, "no carry with x = 0");
      if (i >= 1600) ncarry += carry;
      xh[3] = xh[2]; xh[2] = xh[1]; xh[1] = xh[0];
    end
    check(ncarry == 100, $sformatf("%0d carries in 400 clocks of x = 1, expected 100", ncarry));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
