// tb_pid_error_sub: exhaustive check of the error subtractor.
// Every pair of 4-bit signed reference and measurement values is applied;
// the expected error is ref - y clamped to [-8, 7], with the saturation
// flag set exactly when clamping happened.
module tb_pid_error_sub;
  localparam int E_W = 4;
  logic signed [E_W-1:0] r, y, e;
  logic sat;
  int checks = 0, failures = 0;

  pid_error_sub #(.E_W(E_W)) dut (.ref_i(r), .y_i(y), .e_o(e), .sat_o(sat));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = -8; a <= 7; a++) begin
      for (int b = -8; b <= 7; b++) begin
        int d, exp_e;
        bit exp_sat;
        r = E_W'(a);
        y = E_W'(b);
        #1;
        d = a - b;
        exp_sat = (d > 7) || (d < -8);
        exp_e = (d > 7) ? 7 : (d < -8) ? -8 : d;
        checks++;
        if (int'(e) != exp_e || sat != exp_sat) begin
          failures++;
          $display("FAIL ref=%0d y=%0d e=%0d sat=%0b expected %0d %0b", a, b, e, sat, exp_e, exp_sat);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
