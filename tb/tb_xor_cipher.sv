// tb_xor_cipher: encrypts random data with random key bits, then decrypts
// the result with the same key bits through a second instance; the
// ciphertext must be data XOR key and the decryption must return the data.
`timescale 1ps/1ps
module tb_xor_cipher;
  logic clk = 0, rst = 1, load = 0, key_bit = 0;
  logic [1:0] data_in = 0, c_out, p_out;
  logic c_key, p_key, c_valid, p_valid;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask
  always #5000 clk = ~clk;
  xor_cipher enc (.clk, .rst, .data_in, .key_bit, .load, .data_out(c_out), .key_used(c_key), .out_valid(c_valid));
  xor_cipher dec (.clk, .rst, .data_in(c_out), .key_bit(c_key), .load(c_valid), .data_out(p_out), .key_used(p_key), .out_valid(p_valid));
  initial begin : watchdog
    #100us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [1:0] d_hist[2];
  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 500; i++) begin
      data_in = 2'($urandom);
      key_bit = 1'($urandom);
      load = 1;
      @(posedge clk); #1;
      check(c_valid && c_out == (data_in ^ {2{key_bit}}) && c_key == key_bit, "encrypt");
      d_hist[1] = d_hist[0]; d_hist[0] = data_in;
      if (i > 0) check(p_valid && p_out == d_hist[1], "decrypt returns the data");
    end
    load = 0;
    @(posedge clk); #1;
    check(!c_valid, "no strobe without load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
