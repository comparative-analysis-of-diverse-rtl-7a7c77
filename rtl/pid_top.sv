// pid_top: the two realizations of the digital PID controller side by side.
//
// Both controllers evaluate the same incremental PID law
//
//   u(k) = u(k-1) + s0*e(k) + s1*e(k-1) + s2*e(k-2),   e(k) = ref - y(k)
//
// with the DC-motor speed-loop tuning s0 = 28, s1 = -55, s2 = 27:
//
//   pid_da    multiplierless: a bit-serial distributed-arithmetic
//             datapath reading an 8-word look-up table (the proposed
//             realization), E_W + 1 clocks per sample;
//   pid_mult  three multipliers and an adder tree, u(k) combinational,
//             registers updated by a one-clock sample strobe.
//
// Each controller has its own ports (inputs 4-bit signed, u 16-bit signed,
// plus a flag for a saturated error), so the two can be driven by one
// stimulus and compared, or used independently. Clock and reset (synchronous,
// active high) are shared. See pid_da and pid_mult for the exact timing.
module pid_top #(
  parameter int unsigned E_W    = pid_pkg::E_W,
  parameter int unsigned COEF_W = pid_pkg::COEF_W,
  parameter int unsigned U_W    = pid_pkg::U_W,
  parameter logic signed [COEF_W-1:0] S0 = pid_pkg::S0,
  parameter logic signed [COEF_W-1:0] S1 = pid_pkg::S1,
  parameter logic signed [COEF_W-1:0] S2 = pid_pkg::S2
) (
  input  logic                  clk,
  input  logic                  rst,
  // distributed-arithmetic controller
  input  logic                  da_start_i,
  input  logic signed [E_W-1:0]  da_ref_i,
  input  logic signed [E_W-1:0]  da_y_i,
  output logic signed [U_W-1:0] da_u_o,
  output logic                  da_valid_o,
  output logic                  da_busy_o,
  output logic                  da_e_sat_o,
  // multiplier-based controller
  input  logic                  mul_sample_i,
  input  logic signed [E_W-1:0]  mul_ref_i,
  input  logic signed [E_W-1:0]  mul_y_i,
  output logic signed [U_W-1:0] mul_u_o,
  output logic                  mul_e_sat_o
);

  pid_da #(
    .E_W(E_W), .COEF_W(COEF_W), .U_W(U_W), .S0(S0), .S1(S1), .S2(S2)
  ) u_da (
    .clk     (clk),
    .rst     (rst),
    .start_i (da_start_i),
    .ref_i   (da_ref_i),
    .y_i     (da_y_i),
    .u_o     (da_u_o),
    .valid_o (da_valid_o),
    .busy_o  (da_busy_o),
    .e_sat_o (da_e_sat_o)
  );

  pid_mult #(
    .E_W(E_W), .COEF_W(COEF_W), .U_W(U_W), .S0(S0), .S1(S1), .S2(S2)
  ) u_mult (
    .clk      (clk),
    .rst      (rst),
    .sample_i (mul_sample_i),
    .ref_i    (mul_ref_i),
    .y_i      (mul_y_i),
    .u_o      (mul_u_o),
    .e_sat_o  (mul_e_sat_o)
  );

endmodule
