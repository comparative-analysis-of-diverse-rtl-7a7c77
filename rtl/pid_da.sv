// pid_da: multiplierless (distributed-arithmetic) digital PID controller.
//
// Evaluates the incremental PID law
//
//   u(k) = u(k-1) + s0*e(k) + s1*e(k-1) + s2*e(k-2),   e(k) = ref - y(k)
//
// with no multiplier: the three products are replaced by the bit-serial
// look-up-table inner product of da_mac, whose 8-word table holds every
// subset sum of s0, s1, s2. On a start_i the error e(k) is formed
// (pid_error_sub) and handed to da_mac together with e(k-1) and e(k-2) from
// the delay line, which advances on the same edge. When da_mac reports
// done, the increment is added to the u(k-1) register, which is the output
// u_o. That structure is the document's; the handshake, the reset values
// and the output word handling are this design's choices.
//
// Output arithmetic: u_o is U_W bits two's complement and, like a plain
// adder, wraps around on overflow (no saturation); only the low U_W bits of
// the DA increment are therefore used. e_sat_o flags a sample whose
// ref - y(k) was outside the E_W-bit range and was limited.
//
// Timing: start_i is taken while busy_o is low; ref_i and y_i are sampled
// on that edge. E_W + 1 clock edges later valid_o is high for one cycle and
// u_o already holds u(k). A new start_i may be given in the valid_o cycle,
// so the sample period can be as short as E_W + 2 clocks.
// Reset is synchronous and active high and clears u(k-1) and the history.
module pid_da #(
  parameter int unsigned E_W    = pid_pkg::E_W,
  parameter int unsigned COEF_W = pid_pkg::COEF_W,
  parameter int unsigned U_W    = pid_pkg::U_W,
  parameter logic signed [COEF_W-1:0] S0 = pid_pkg::S0,
  parameter logic signed [COEF_W-1:0] S1 = pid_pkg::S1,
  parameter logic signed [COEF_W-1:0] S2 = pid_pkg::S2
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  start_i,   // take a new sample
  input  logic signed [E_W-1:0]  ref_i,     // set point
  input  logic signed [E_W-1:0]  y_i,       // measured output y(k)
  output logic signed [U_W-1:0] u_o,       // controller output u(k)
  output logic                  e_sat_o,   // ref - y(k) was limited
  output logic                  valid_o,   // u_o updated this cycle
  output logic                  busy_o     // a sample is being processed
);

  localparam int unsigned TAPS  = 3;
  localparam int unsigned SUM_W = COEF_W + $clog2(TAPS) + E_W;
  localparam logic signed [COEF_W-1:0] COEF [TAPS] = '{S0, S1, S2};

  logic signed [E_W-1:0]   e_k;
  logic signed [E_W-1:0]   e_hist [TAPS-1];   // e(k-1), e(k-2)
  logic signed [E_W-1:0]   x [TAPS];
  logic                    take;
  logic                    mac_busy;
  logic                    mac_done;
  logic signed [SUM_W-1:0] delta;

  pid_error_sub #(.E_W(E_W)) u_sub (
    .ref_i (ref_i),
    .y_i   (y_i),
    .e_o   (e_k),
    .sat_o (e_sat_o)
  );

  assign take = start_i && !busy_o;

  pid_delay_line #(.W(E_W), .DEPTH(TAPS-1)) u_hist (
    .clk   (clk),
    .rst   (rst),
    .adv_i (take),
    .d_i   (e_k),
    .q_o   (e_hist)
  );

  always_comb begin
    x[0] = e_k;
    x[1] = e_hist[0];
    x[2] = e_hist[1];
  end

  da_mac #(.TAPS(TAPS), .E_W(E_W), .COEF_W(COEF_W), .COEF(COEF)) u_mac (
    .clk     (clk),
    .rst     (rst),
    .start_i (take),
    .x_i     (x),
    .busy_o  (mac_busy),
    .done_o  (mac_done),
    .sum_o   (delta)
  );

  // busy from the start edge until u(k) has been written
  always_ff @(posedge clk) begin
    if (rst) begin
      busy_o  <= 1'b0;
      valid_o <= 1'b0;
      u_o     <= '0;
    end else begin
      valid_o <= 1'b0;
      if (take) busy_o <= 1'b1;
      if (mac_done) begin
        u_o     <= u_o + U_W'(delta);
        valid_o <= 1'b1;
        busy_o  <= 1'b0;
      end
    end
  end

  // the serial run lies inside the controller's busy window
  assert property (@(posedge clk) disable iff (rst) mac_busy |-> busy_o)
    else $error("pid_da: DA run outside the busy window");

endmodule
