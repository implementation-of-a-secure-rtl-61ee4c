// trng: true random number generator built from two ADPLLs.
// The pulse generator starts one free-running ring oscillator; its jittery
// output is the reference of both ADPLL 1 and ADPLL 2, which run from the
// 16*f0 clock clk_hf. ADPLL 2's DCO output (IDout3) clocks the sampling
// network, which samples ADPLL 1's DCO and feedback outputs (IDout1,
// IDout2); the raw bits then pass through post-processing.
// The composition follows the document's TRNG block diagram. The two loops
// use different loop-filter coefficients (2,7,7,2 and 1,4,4,1) so that they
// are not identical copies; the document only says they are set up
// independently. The ring oscillator is a behavioural model (simulation
// only); in hardware it is a ring of LUT inverters. The controller that
// the block diagram names without detail is taken to be the pulse generator
// plus the t-enabled divide-by-2 in the sampling network.
// Outputs: rnd_bit/rnd_valid (output random bit, in the idout3 domain,
// one bit per two idout3 periods), raw_bit (raw random bit), idout3.
`timescale 1ps/1ps
module trng #(
  parameter int unsigned N           = 8,
  parameter int unsigned K           = 4,
  parameter int unsigned RO_STAGES   = 51,
  parameter int unsigned RO_T_INV_PS = 200
) (
  input  logic sys_clk,
  input  logic clk_hf,
  input  logic rst,
  input  logic t,
  output logic rnd_bit,
  output logic rnd_valid,
  output logic raw_bit,
  output logic idout3
);
  logic start_pulse, ro_en, ro_out;
  logic idout1, idout2;
  logic xor1, carry1, xor2, carry2, div2_out;
  logic raw_valid;

  pulse_generator u_pg (.clk(sys_clk), .rst, .start_pulse, .ro_en);

  ring_oscillator #(.STAGES(RO_STAGES), .T_INV_PS(RO_T_INV_PS)) u_ro (
    .en(ro_en), .ro_out
  );

  adpll #(.N(N), .K(K)) u_adpll1 (
    .clk(clk_hf), .rst, .ref_in(ro_out),
    .id_out(idout1), .div_out(idout2), .xor_out(xor1), .carry(carry1)
  );

  adpll #(.N(N), .K(K), .COEF_A(1), .COEF_B(4), .COEF_C(4), .COEF_D(1)) u_adpll2 (
    .clk(clk_hf), .rst, .ref_in(ro_out),
    .id_out(idout3), .div_out(div2_out), .xor_out(xor2), .carry(carry2)
  );

  trng_sampler u_smp (
    .clk(idout3), .rst, .t, .idout1, .idout2, .raw_bit, .raw_valid
  );

  post_processor u_pp (
    .clk(idout3), .rst, .raw_bit, .raw_valid, .rnd_bit, .rnd_valid
  );
endmodule
