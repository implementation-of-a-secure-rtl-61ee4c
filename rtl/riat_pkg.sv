// riat_pkg: types and constants shared by the transmitter and the receiver.
// A sensor sample travels over the serial link as one byte (sensor_frame_t):
// bit 0 carries the gas-sensor bit and bit 1 the tracking-sensor bit, both
// XOR-encrypted with one random bit; the upper six bits are zero. The byte
// format is this design's choice.
`timescale 1ps/1ps
package riat_pkg;
  typedef struct packed {
    logic [5:0] reserved;
    logic       track;
    logic       gas;
  } sensor_frame_t;

  localparam int unsigned SENSOR_BITS = 2;
  localparam int unsigned ADC_WIDTH   = 12;
endpackage
