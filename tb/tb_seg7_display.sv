// tb_seg7_display: with a short refresh period the digits are scanned in
// turn; for each enabled digit the segment pattern is decoded back to a hex
// digit by a table in the testbench and compared with the nibble of the
// value; the fourth digit must stay dark.
`timescale 1ps/1ps
module tb_seg7_display;
  logic clk = 0, rst = 1;
  logic [11:0] value = 0;
  logic [6:0] seg;
  logic [3:0] an;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask
  always #5000 clk = ~clk;
  seg7_display #(.REFRESH_CYCLES(4)) dut (.*);
  initial begin : watchdog
    #1ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // patterns of lit segments (1 = lit), bit 0 = a ... bit 6 = g
  function automatic int decode(input logic [6:0] lit);
    logic [6:0] tbl[16] = '{7'h3f, 7'h06, 7'h5b, 7'h4f, 7'h66, 7'h6d, 7'h7d, 7'h07,
                            7'h7f, 7'h6f, 7'h77, 7'h7c, 7'h39, 7'h5e, 7'h79, 7'h71};
    for (int i = 0; i < 16; i++) if (tbl[i] == lit) return i;
    return -1;
  endfunction
  int seen[4];
  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 50; n++) begin
      value = 12'($urandom);
      if (n < 16) value = {3{4'(n)}};
      seen = '{0, 0, 0, 0};
      repeat (20) begin
        @(posedge clk); #1;
        case (an)
          4'b1110: begin check(decode(~seg) == value[3:0], "digit 0"); seen[0]++; end
          4'b1101: begin check(decode(~seg) == value[7:4], "digit 1"); seen[1]++; end
          4'b1011: begin check(decode(~seg) == value[11:8], "digit 2"); seen[2]++; end
          4'b1111: seen[3]++;
          default: check(0, "invalid anode pattern");
        endcase
      end
      check(seen[0] > 0 && seen[1] > 0 && seen[2] > 0 && seen[3] > 0, "all digits scanned");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
