// tb_divn_counter: feeds a DCO-like toggle signal (with random missing
// toggles) and checks that div_out is high for N/2 and low for N/2 rising
// edges of it, i.e. one output period per N input periods.
`timescale 1ps/1ps
module tb_divn_counter;
  logic clk = 0, rst = 1, id_out = 0, div_out;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask
  always #625 clk = ~clk;
  divn_counter #(.N(8)) dut (.*);

  initial begin : watchdog
    #50us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int rises = 0, exp_cnt = 0;
  logic exp_div = 1;
  int out_rises = 0;
  logic prev_id = 0;
  logic div_q = 1;
  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 2000; i++) begin
      if (($urandom % 6) != 0) id_out = ~id_out;
      @(posedge clk); #1;
      if (id_out && !prev_id) begin
        exp_div = (exp_cnt == 7) || (exp_cnt < 3);
        exp_cnt = (exp_cnt == 7) ? 0 : exp_cnt + 1;
        rises++;
      end
      prev_id = id_out;
      check(div_out == exp_div, $sformatf("div_out at %0d", i));
      if (div_out && !div_q) out_rises++;
      div_q = div_out;
    end
    $display("input rises %0d, output rises %0d", rises, out_rises);
    check(out_rises >= rises / 8 - 1 && out_rises <= rises / 8 + 1, "divide by 8");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
