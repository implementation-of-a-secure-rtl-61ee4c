// ring_oscillator: behavioural model of the free-running ring oscillator
// that is the entropy source and the common reference of both ADPLLs.
// This is a simulation model, not synthesizable logic: a ring of STAGES
// inverting stages (a NAND gate for the enable followed by STAGES-1
// inverters) where every stage has a delay of T_INV_PS plus a random extra
// delay of 0..JITTER_PS picoseconds per transition, standing for the
// thermal jitter of the FPGA routing. While en is low the NAND output is
// held high and the ring settles; once en rises, an edge circulates and
// ro_out toggles about every STAGES*T_INV_PS (about 10.2 ns by default,
// i.e. about 49 MHz, just below the 50 MHz ADPLL centre frequency).
// The 51-stage length follows the document; the stage delay and the jitter
// model are this design's own assumptions.
`timescale 1ps/1ps
module ring_oscillator #(
  parameter int unsigned STAGES    = 51,
  parameter int unsigned T_INV_PS  = 200,
  parameter int unsigned JITTER_PS = 20
) (
  input  logic en,
  output logic ro_out
);
  logic [STAGES-1:0] node;

  // the settled state of a disabled ring: even nodes high, odd nodes low
  initial for (int i = 0; i < STAGES; i++) node[i] = (i % 2 == 0);

  // enable gate: NAND of en and the ring's last node
  always @(en or node[STAGES-1])
    node[0] <= #(T_INV_PS + $urandom_range(JITTER_PS, 0)) ~(en & node[STAGES-1]);

  for (genvar i = 1; i < STAGES; i++) begin : g_inv
    always @(node[i-1])
      node[i] <= #(T_INV_PS + $urandom_range(JITTER_PS, 0)) ~node[i-1];
  end

  assign ro_out = node[STAGES-1];
endmodule
