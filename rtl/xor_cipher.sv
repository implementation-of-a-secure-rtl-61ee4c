// xor_cipher: XOR encryption (transmitter) and decryption (receiver).
// On load, every bit of data_in is XORed with the one random key_bit and the
// result is registered in data_out together with the key bit used; applying
// the same key bit again restores the data. Using the XOR with the TRNG bit
// follows the document; one key bit per sample, shared by all sensor bits,
// is this design's choice. Timing: out_valid pulses one clock after load.
`timescale 1ps/1ps
module xor_cipher #(
  parameter int unsigned WIDTH = 2
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] data_in,
  input  logic             key_bit,
  input  logic             load,
  output logic [WIDTH-1:0] data_out,
  output logic             key_used,
  output logic             out_valid
);
  always_ff @(posedge clk) begin
    if (rst) begin
      data_out  <= '0;
      key_used  <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= load;
      if (load) begin
        data_out <= data_in ^ {WIDTH{key_bit}};
        key_used <= key_bit;
      end
    end
  end
endmodule
