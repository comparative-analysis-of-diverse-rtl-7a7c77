// pid_delay_line: error history registers e(k-1), e(k-2), ...
//
// A chain of DEPTH registers of W bits. On every clock where adv_i is high
// the current error d_i enters stage 0 and every stage moves one place
// along, so q_o[0] holds e(k-1) and q_o[1] holds e(k-2) for the default
// DEPTH = 2 -- the two "REG" boxes in the multiplier-based controller's
// block diagram, which the DA controller needs in the same way.
//
// Timing: one clock edge per sample, gated by adv_i. Reset (synchronous,
// active high) clears every stage to zero, i.e. the controller starts with
// a zero error history; the reset behaviour is this design's choice.
module pid_delay_line #(
  parameter int unsigned W     = pid_pkg::E_W,
  parameter int unsigned DEPTH = pid_pkg::TAPS - 1
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                adv_i,           // sample strobe: shift once
  input  logic signed [W-1:0] d_i,             // e(k)
  output logic signed [W-1:0] q_o [DEPTH]      // q_o[i] = e(k-1-i)
);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(DEPTH); i++) q_o[i] <= '0;
    end else if (adv_i) begin
      q_o[0] <= d_i;
      for (int i = 1; i < int'(DEPTH); i++) q_o[i] <= q_o[i-1];
    end
  end

endmodule
