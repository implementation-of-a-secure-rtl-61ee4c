// adpll: first-order all-digital phase-locked loop.
// An XOR gate compares the reference input with the divided-down DCO output
// (phase detector); the FIR loop filter turns the XOR output into carry
// pulses; each carry makes the ID counter (DCO) drop one toggle; a
// divide-by-N counter closes the loop. The DCO runs at N*f0 when no carries
// come, so the loop locks to a reference at or slightly below f0: the phase
// error settles where the carry rate cancels the frequency difference.
// Parameters follow the document (N = 8, K = 4, f0 = 50 MHz, M = 16). The
// FIR clock M*f0 and the ID clock 2*N*f0 are both 800 MHz for these values,
// so a single clock clk serves both. The reference is sampled by that clock
// without a synchroniser: in hardware its metastability is part of the
// entropy.
// Outputs: id_out (DCO, IDout), div_out (feedback, the second ADPLL output),
// xor_out (phase detector) and carry.
`timescale 1ps/1ps
module adpll #(
  parameter int unsigned N      = 8,
  parameter int unsigned M      = 16,
  parameter int unsigned K      = 4,
  parameter int unsigned F0_MHZ = 50,
  parameter int unsigned COEF_A = 2,
  parameter int unsigned COEF_B = 7,
  parameter int unsigned COEF_C = 7,
  parameter int unsigned COEF_D = 2
) (
  input  logic clk,
  input  logic rst,
  input  logic ref_in,
  output logic id_out,
  output logic div_out,
  output logic xor_out,
  output logic carry
);
  logic [5:0] y_unused;

  assign xor_out = ref_in ^ div_out;

  fir_loop_filter #(
    .COEF_W(4), .COEF_A(COEF_A), .COEF_B(COEF_B), .COEF_C(COEF_C),
    .COEF_D(COEF_D), .K(K)
  ) u_lf (
    .clk, .rst, .x_in(xor_out), .y_out(y_unused), .carry
  );

  id_counter u_dco (.clk, .rst, .carry, .id_out);

  divn_counter #(.N(N)) u_divn (.clk, .rst, .id_out, .div_out);

  // the clock ratio M*f0 = 2*N*f0 is what lets one clock serve both parts
  initial assert (M == 2 * N)
    else $warning("adpll: M*f0 differs from 2*N*f0; FIR and ID clock would differ");
endmodule
