// fir_loop_filter: loop filter of the ADPLL.
// A 4-tap (third-order) low-pass FIR filter in transposed ("broadcast")
// form: the one-bit phase-detector output X(n) is broadcast to the four
// coefficient multipliers a, b, c, d and the partial sums pass through three
// D registers, so y(n) = a*x(n-3) + b*x(n-2) + c*x(n-1) + d*x(n).
// The filter output is then accumulated modulo K*(a+b+c+d); each wrap emits
// a one-cycle carry pulse (ca) to the ID counter. With the phase detector
// high all the time a carry comes every K clocks; with it low, never.
// The structure (broadcast form, four taps, a carry output) and K = 4 follow
// the document; the Kaiser-window coefficients (beta = 3, scaled to 2,7,7,2)
// and the accumulator reading of the carry are this design's choices.
// Timing: y_out is combinational from the registers and x_in; carry is
// registered, one clock after the sample that causes the wrap.
`timescale 1ps/1ps
module fir_loop_filter #(
  parameter int unsigned COEF_W = 4,
  parameter int unsigned COEF_A = 2,
  parameter int unsigned COEF_B = 7,
  parameter int unsigned COEF_C = 7,
  parameter int unsigned COEF_D = 2,
  parameter int unsigned K      = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              x_in,
  output logic [COEF_W+1:0] y_out,
  output logic              carry
);
  localparam int unsigned YW      = COEF_W + 2;
  localparam int unsigned MODULUS = K * (COEF_A + COEF_B + COEF_C + COEF_D);
  localparam int unsigned AW      = $clog2(MODULUS) + 1;

  logic [YW-1:0] s1, s2, s3;
  logic [AW-1:0] acc;
  logic [AW-1:0] acc_next;

  // multiplying by a one-bit sample is a gate on the coefficient
  function automatic logic [YW-1:0] tap(input int unsigned coef, input logic x);
    return x ? YW'(coef) : '0;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      s1 <= '0;
      s2 <= '0;
      s3 <= '0;
    end else begin
      s1 <= tap(COEF_A, x_in);
      s2 <= s1 + tap(COEF_B, x_in);
      s3 <= s2 + tap(COEF_C, x_in);
    end
  end

  assign y_out    = s3 + tap(COEF_D, x_in);
  assign acc_next = acc + AW'(y_out);

  always_ff @(posedge clk) begin
    if (rst) begin
      acc   <= '0;
      carry <= 1'b0;
    end else if (acc_next >= AW'(MODULUS)) begin
      acc   <= acc_next - AW'(MODULUS);
      carry <= 1'b1;
    end else begin
      acc   <= acc_next;
      carry <= 1'b0;
    end
  end
endmodule
