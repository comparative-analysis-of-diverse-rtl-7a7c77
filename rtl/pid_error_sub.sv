// pid_error_sub: control-error subtractor, e(k) = ref - y(k).
//
// The subtractor at the input of both controller realizations. Reference,
// measured plant output and error are all E_W-bit two's complement numbers
// (4 bits by default, the error width of the reference design). The
// difference is formed one bit wider and then limited to the E_W-bit range
// [-2**(E_W-1), 2**(E_W-1)-1], so a large difference saturates instead of
// wrapping around to the wrong sign. The subtraction is the one of the
// controller block diagram; the signed input format and the saturation are
// this design's choices.
//
// Interface: purely combinational, no clock.
module pid_error_sub #(
  parameter int unsigned E_W = pid_pkg::E_W
) (
  input  logic signed [E_W-1:0] ref_i,   // set point
  input  logic signed [E_W-1:0] y_i,     // measured plant output y(k)
  output logic signed [E_W-1:0] e_o,     // error e(k) = ref - y(k), saturated
  output logic                  sat_o    // the difference was out of range
);

  localparam logic signed [E_W:0] MAX = (E_W+1)'(2**(E_W-1) - 1);
  localparam logic signed [E_W:0] MIN = -(E_W+1)'(2**(E_W-1));

  logic signed [E_W:0] diff;

  always_comb begin
    diff  = (E_W+1)'(ref_i) - (E_W+1)'(y_i);
    sat_o = 1'b1;
    if (diff > MAX)      e_o = MAX[E_W-1:0];
    else if (diff < MIN) e_o = MIN[E_W-1:0];
    else begin
      e_o   = diff[E_W-1:0];
      sat_o = 1'b0;
    end
  end

endmodule
