// tb_xadc_reader: the reader against the ADC model. The model converts the
// two sensor channels in turn; the testbench changes the analog values at
// random. Each sample_valid must carry the values the model held when it
// answered the two DRP reads, read from address 0x14 (tracking) and 0x1E
// (gas); a conversion of any other channel must cause no read.
`timescale 1ps/1ps
module tb_xadc_reader;
  logic clk = 0, rst = 1;
  logic eoc, drp_drdy, drp_den, sample_valid;
  logic [4:0] channel;
  logic [15:0] drp_do;
  logic [6:0] drp_daddr;
  logic [11:0] gas_sample, track_sample, value_trk = 0, value_gas = 0;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask
  always #5000 clk = ~clk;

  xadc_model adc (.clk, .rst, .value_trk, .value_gas, .drp_den, .drp_daddr,
                  .eoc, .channel, .drp_do, .drp_drdy);
  xadc_reader dut (.clk, .rst, .eoc, .channel, .drp_do, .drp_drdy, .drp_den,
                   .drp_daddr, .gas_sample, .track_sample, .sample_valid);

  initial begin : watchdog
    #2ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the values returned by the last read of each address
  logic [11:0] last_trk = 0, last_gas = 0;
  int nvalid = 0;
  always @(posedge clk) if (!rst) begin
    if (drp_drdy) begin
      check(drp_daddr == 7'h14 || drp_daddr == 7'h1E, $sformatf("read of a sensor address (%h at %0t)", drp_daddr, $time));
      if (drp_daddr == 7'h14) last_trk = drp_do[15:4];
      if (drp_daddr == 7'h1E) last_gas = drp_do[15:4];
    end
    if (sample_valid) begin
      nvalid++;
      check(gas_sample == last_gas && track_sample == last_trk, "sample pair");
    end
    if (drp_den) check(eoc == 0, "read issued after eoc");
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    repeat (60) begin
      value_trk = 12'($urandom);
      value_gas = 12'($urandom);
      repeat (52) @(posedge clk);
      #1;
    end
    $display("samples %0d, reads %0d", nvalid, adc.reads);
    check(nvalid >= 55 && nvalid <= 61, "one sample per pair of conversions");
    check(adc.reads >= 2 * nvalid && adc.reads <= 2 * nvalid + 2, $sformatf("two reads per sample (%0d, %0d)", adc.reads, nvalid));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
