// xadc_model: simulation model of the on-chip ADC as the fabric sees it in
// channel-sequencer mode. It converts VAUX4 (channel 20) and VAUX14
// (channel 30) in turn, one every CONV_CYCLES clocks, pulsing eoc with the
// channel number. A DRP read (den) answers with drdy DRDY_LAT clocks later;
// do carries the channel's 12-bit value, set by the testbench in
// value_trk / value_gas, in bits 15:4. Reads are ignored during rst.
`timescale 1ps/1ps
module xadc_model #(
  parameter int CONV_CYCLES = 26,
  parameter int DRDY_LAT    = 3
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [11:0] value_trk,
  input  logic [11:0] value_gas,
  input  logic        drp_den,
  input  logic [6:0]  drp_daddr,
  output logic        eoc = 0,
  output logic [4:0]  channel = 0,
  output logic [15:0] drp_do = 0,
  output logic        drp_drdy = 0
);
  int cnt = 0;
  logic which = 0;
  int reads = 0;
  always @(posedge clk) begin
    eoc <= 0;
    if (++cnt == CONV_CYCLES) begin
      cnt = 0;
      eoc <= 1;
      channel <= which ? 5'd30 : 5'd20;
      which = ~which;
    end
  end
  always @(posedge clk) begin
    if (drp_den && !rst) begin
      logic [6:0] a;
      a = drp_daddr;
      reads++;
      repeat (DRDY_LAT) @(posedge clk);
      drp_do   <= {(a == 7'h14) ? value_trk : (a == 7'h1E) ? value_gas : 12'hbad, 4'h0};
      drp_drdy <= 1;
      @(posedge clk);
      drp_drdy <= 0;
    end
  end
endmodule
