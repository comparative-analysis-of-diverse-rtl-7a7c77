// pid_mult: multiplier-based digital PID controller.
//
// Direct realization of the incremental PID law
//
//   u(k) = u(k-1) + s0*e(k) + s1*e(k-1) + s2*e(k-2),   e(k) = ref - y(k)
//
// following its block diagram: a subtractor forms e(k); two registers hold
// e(k-1) and e(k-2); three multipliers form s0*e(k), s1*e(k-1) and
// s2*e(k-2); one adder sums the first two products, a second adds the third
// product to u(k-1), and a final adder gives u(k), which is both the output
// and the input of the u(k-1) register. This realization serves as the
// reference against which the multiplierless DA controller (pid_da) is
// compared; both compute the same numbers.
//
// Output arithmetic: u_o is U_W bits two's complement and wraps around on
// overflow, as the plain adders of the diagram do (this design's reading).
// e_sat_o flags that ref - y(k) was outside the E_W-bit range and limited.
//
// Timing: u_o is combinational from ref_i, y_i and the registers. On every
// clock edge with sample_i high the registers take e(k) -> e(k-1),
// e(k-1) -> e(k-2) and u(k) -> u(k-1), ending the sample. The sample
// strobe and the synchronous, active-high reset to zero are this design's
// choices.
module pid_mult #(
  parameter int unsigned E_W    = pid_pkg::E_W,
  parameter int unsigned COEF_W = pid_pkg::COEF_W,
  parameter int unsigned U_W    = pid_pkg::U_W,
  parameter logic signed [COEF_W-1:0] S0 = pid_pkg::S0,
  parameter logic signed [COEF_W-1:0] S1 = pid_pkg::S1,
  parameter logic signed [COEF_W-1:0] S2 = pid_pkg::S2
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  sample_i,  // end of sample: update registers
  input  logic signed [E_W-1:0]  ref_i,     // set point
  input  logic signed [E_W-1:0]  y_i,       // measured output y(k)
  output logic signed [U_W-1:0] u_o,       // controller output u(k)
  output logic                  e_sat_o    // ref - y(k) was limited
);

  localparam int unsigned P_W = COEF_W + E_W;     // product width

  logic signed [E_W-1:0] e_k;
  logic signed [E_W-1:0] e_hist [2];              // e(k-1), e(k-2)
  logic signed [P_W-1:0] p0, p1, p2;
  logic signed [U_W-1:0] u_prev;
  logic signed [U_W-1:0] sum01, sum2u;

  pid_error_sub #(.E_W(E_W)) u_sub (
    .ref_i (ref_i),
    .y_i   (y_i),
    .e_o   (e_k),
    .sat_o (e_sat_o)
  );

  pid_delay_line #(.W(E_W), .DEPTH(2)) u_hist (
    .clk   (clk),
    .rst   (rst),
    .adv_i (sample_i),
    .d_i   (e_k),
    .q_o   (e_hist)
  );

  always_comb begin
    p0    = P_W'(S0) * P_W'(e_k);
    p1    = P_W'(S1) * P_W'(e_hist[0]);
    p2    = P_W'(S2) * P_W'(e_hist[1]);
    sum01 = U_W'(p0) + U_W'(p1);
    sum2u = U_W'(p2) + u_prev;
    u_o   = sum01 + sum2u;
  end

  always_ff @(posedge clk) begin
    if (rst)           u_prev <= '0;
    else if (sample_i) u_prev <= u_o;
  end

endmodule
