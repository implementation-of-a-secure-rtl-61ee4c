// tb_uart_rx: a serial driver in the testbench sends random bytes at
// CLKS_PER_BIT = 16 with small timing offsets; every byte must come out
// once with valid, and a frame with a low stop bit must give frame_err.
`timescale 1ps/1ps
module tb_uart_rx;
  localparam int CPB = 16;
  logic clk = 0, rst = 1, rxd = 1, valid, frame_err;
  logic [7:0] data;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask
  always #5000 clk = ~clk;
  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.*);
  initial begin : watchdog
    #2ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [7:0] q[$];
  int nerr = 0;
  always @(posedge clk) begin
    if (!rst && valid) begin
      check(q.size() > 0 && data == q[0], $sformatf("received %02x, expected %02x, %0d left at %0t", data, q.size() > 0 ? q[0] : 8'h00, q.size(), $time));
      if (q.size() > 0) void'(q.pop_front());
    end
    if (!rst && frame_err) nerr++;
  end
  task automatic send(input logic [7:0] b, input logic stop);
    logic [9:0] f;
    f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rxd = f[i];
      #(CPB * 10000);
    end
    rxd = 1;
  endtask
  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    #50000;
    for (int n = 0; n < 40; n++) begin
      logic [7:0] b;
      b = 8'($urandom);
      q.push_back(b);
      #($urandom_range(30000, 0));
      send(b, 1'b1);
      #20000;
    end
    #(CPB * 20000);
    check(q.size() == 0, "all bytes received");
    send(8'h5a, 1'b0);
    #(CPB * 20000);
    check(nerr == 1, "frame error on low stop bit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
