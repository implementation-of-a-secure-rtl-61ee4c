// tb_uart_tx: sends random bytes and decodes the serial line independently
// (sampling mid-bit, CLKS_PER_BIT = 16): start bit 0, eight data bits LSB
// first, stop bit 1, and ready low for exactly 10 bit times per frame.
`timescale 1ps/1ps
module tb_uart_tx;
  localparam int CPB = 16;
  logic clk = 0, rst = 1, valid = 0, ready, txd;
  logic [7:0] data = 0;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask
  always #5000 clk = ~clk;
  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.*);
  initial begin : watchdog
    #1ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [7:0] got;
  int busy_clks;
  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check(txd == 1 && ready, "idle line high");
    for (int n = 0; n < 40; n++) begin
      data = 8'($urandom);
      valid = 1;
      @(posedge clk); #1;
      valid = 0;
      busy_clks = 0;
      // now in the start bit; sample the middle of each bit
      repeat (CPB / 2 - 1) @(posedge clk);
      #1 check(txd == 0, "start bit");
      for (int b = 0; b < 8; b++) begin
        repeat (CPB) @(posedge clk);
        #1 got[b] = txd;
      end
      repeat (CPB) @(posedge clk);
      #1 check(txd == 1, "stop bit");
      check(got == data, $sformatf("byte %02x sent as %02x", data, got));
      while (!ready) begin @(posedge clk); #1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // frame length: ready stays low for 10*CPB clocks
  int low = 0;
  always @(posedge clk) begin
    if (!rst && !ready) low++;
    else if (low != 0) begin
      check(low == 10 * CPB, $sformatf("frame %0d clocks", low));
      low = 0;
    end
  end
endmodule
