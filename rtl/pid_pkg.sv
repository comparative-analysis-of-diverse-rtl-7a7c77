// pid_pkg: widths and coefficients shared by both realizations of the
// incremental digital PID controller
//
//   u(k) = u(k-1) + s0*e(k) + s1*e(k-1) + s2*e(k-2)
//
// The coefficients s0 = 28, s1 = -55, s2 = 27 are the tuned values for the
// DC-motor speed loop the design was derived for. The widths follow the
// signal names of the reference simulation: a 4-bit error, 12-bit
// coefficients and a 16-bit controller output. Giving the reference and the
// measurement the same 4-bit signed format as the error is this design's
// own choice.
package pid_pkg;

  localparam int unsigned E_W    = 4;        // ref, y(k) and error width (signed)
  localparam int unsigned COEF_W = 12;       // coefficient width (signed)
  localparam int unsigned U_W    = 16;       // controller output width (signed)
  localparam int unsigned TAPS   = 3;        // e(k), e(k-1), e(k-2)

  localparam logic signed [COEF_W-1:0] S0 = 12'sd28;
  localparam logic signed [COEF_W-1:0] S1 = -12'sd55;
  localparam logic signed [COEF_W-1:0] S2 = 12'sd27;

endpackage
