// xadc_reader: fabric side of the on-chip ADC (XADC) in channel-sequencer
// mode. The XADC converts its auxiliary channels in turn and pulses eoc
// with the number of the channel it has just finished. For the two sensor
// channels this block then reads the result register over the dynamic
// reconfiguration port (DRP): den for one clock with daddr = {2'b00,
// channel}, then waits for drdy and takes the 12-bit result from do[15:4].
// Once both the gas and the tracking channel have a new result,
// sample_valid pulses for one clock with both values.
// The channel assignment (tracking sensor on VAUX4, DRP address 0x14; gas
// sensor on VAUX14) follows the source description; the VAUX14 address is
// taken as 0x1E, the 7-series result register of that channel. The DRP
// read sequence is the standard one; pairing the two channels into one
// sample strobe is this design's choice.
`timescale 1ps/1ps
module xadc_reader #(
  parameter logic [6:0] TRK_ADDR = 7'h14,
  parameter logic [6:0] GAS_ADDR = 7'h1E
) (
  input  logic        clk,
  input  logic        rst,
  // from the XADC
  input  logic        eoc,
  input  logic [4:0]  channel,
  input  logic [15:0] drp_do,
  input  logic        drp_drdy,
  // to the XADC
  output logic        drp_den,
  output logic [6:0]  drp_daddr,
  // results
  output logic [11:0] gas_sample,
  output logic [11:0] track_sample,
  output logic        sample_valid
);
  logic busy;
  logic gas_new, trk_new;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy         <= 1'b0;
      drp_den      <= 1'b0;
      drp_daddr    <= '0;
      gas_sample   <= '0;
      track_sample <= '0;
      gas_new      <= 1'b0;
      trk_new      <= 1'b0;
      sample_valid <= 1'b0;
    end else begin
      drp_den      <= 1'b0;
      sample_valid <= 1'b0;
      if (!busy) begin
        if (eoc && ({2'b00, channel} == GAS_ADDR || {2'b00, channel} == TRK_ADDR)) begin
          drp_den   <= 1'b1;
          drp_daddr <= {2'b00, channel};
          busy      <= 1'b1;
        end
        if (gas_new && trk_new) begin
          sample_valid <= 1'b1;
          gas_new      <= 1'b0;
          trk_new      <= 1'b0;
        end
      end else if (drp_drdy) begin
        busy <= 1'b0;
        if (drp_daddr == GAS_ADDR) begin
          gas_sample <= drp_do[15:4];
          gas_new    <= 1'b1;
        end else begin
          track_sample <= drp_do[15:4];
          trk_new      <= 1'b1;
        end
      end
    end
  end
endmodule
