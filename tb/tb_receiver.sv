// tb_receiver: sends bytes to the receiver's UART (16 clocks per bit);
// cipher must show the two encrypted bits of each byte, and plain must be
// those bits XORed with the random bit shown on key_used, once per byte.
// A frame with a low stop bit must raise rx_error and give no output.
`timescale 1ps/1ps
module tb_receiver;
  localparam int CPB = 16;
  logic sys_clk = 0, clk_hf = 0, rst = 1, t = 1, rx = 1;
  logic q3, plain_valid, key_used, rx_error;
  logic [1:0] cipher, plain;
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
  receiver #(.CLKS_PER_BIT(CPB)) dut (.*);
  initial begin : watchdog
    #2ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [1:0] q[$];
  int outs = 0, errs = 0;
  always @(posedge sys_clk) begin
    if (!rst && plain_valid) begin
      outs++;
      check(q.size() > 0, "output expected");
      if (q.size() > 0) begin
        check(plain == (q[0] ^ {2{key_used}}), "plain = cipher XOR key");
        void'(q.pop_front());
      end
    end
    if (!rst && rx_error) errs++;
  end
  task automatic send(input logic [7:0] b, input logic stop);
    logic [9:0] f;
    f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rx = f[i];
      #(CPB * 10000);
    end
    rx = 1;
  endtask
  initial begin
    logic [1:0] c;
    #20ns rst = 0;
    #10us;
    for (int n = 0; n < 40; n++) begin
      c = 2'($urandom);
      q.push_back(c);
      send({6'b0, c}, 1'b1);
      #(3 * 10000);
      check(cipher == c, "cipher bits of the byte");
      #(CPB * 10000);
    end
    send(8'h03, 1'b0);
    #(CPB * 30000);
    check(outs == 40 && q.size() == 0, "one output per byte");
    check(errs == 1, "frame error reported");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
