// tb_pid_mult: multiplier-based controller.
// A random stream of reference and measurement values is applied, one
// sample per strobe, with idle clocks in between. The expected u(k) is
// computed from u(k) = u(k-1) + 28 e(k) - 55 e(k-1) + 27 e(k-2), with
// e(k) = ref - y(k) limited to 4-bit signed and u kept modulo 2**16; it is
// compared with the combinational output before each strobe, and the
// output must not move on clocks without a strobe.
module tb_pid_mult;
  localparam int E_W = 4;
  logic clk = 0, rst = 1, sample = 0;
  logic signed [E_W-1:0] r = '0, y = '0;
  logic signed [15:0] u;
  logic sat;
  int checks = 0, failures = 0;
  int e1 = 0, e2 = 0;
  logic signed [15:0] up = '0;

  pid_mult dut (.clk(clk), .rst(rst), .sample_i(sample), .ref_i(r), .y_i(y), .u_o(u), .e_sat_o(sat));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clamp(int v);
    return v > 7 ? 7 : v < -8 ? -8 : v;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 2000; i++) begin
      int ek;
      logic signed [15:0] uexp;
      r = E_W'($urandom);
      y = E_W'($urandom);
      #1;
      ek = clamp(int'(r) - int'(y));
      uexp = 16'(int'(up) + 28 * ek - 55 * e1 + 27 * e2);
      checks++;
      if (u !== uexp) begin
        failures++;
        $display("FAIL k=%0d u=%0d expected %0d", i, u, uexp);
      end
      if (($urandom % 4) == 0) begin
        // idle clock: no strobe, state must hold
        @(posedge clk);
        #1;
        checks++;
        if (u !== uexp) begin
          failures++;
          $display("FAIL state moved without strobe");
        end
      end
      sample = 1;
      @(posedge clk);
      #1 sample = 0;
      up = uexp; e2 = e1; e1 = ek;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
