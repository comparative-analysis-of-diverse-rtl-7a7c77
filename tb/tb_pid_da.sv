// tb_pid_da: distributed-arithmetic controller.
// A random stream of samples; for each, start is raised (sometimes held
// high across the whole run, which must not start a second sample) and the
// test waits for valid. u(k) is compared with the incremental PID law
// u(k) = u(k-1) + 28 e(k) - 55 e(k-1) + 27 e(k-2), e(k) = ref - y(k)
// limited to 4-bit signed, u modulo 2**16. valid must come E_W + 1 = 5
// clocks after the start edge and u must not change between samples.
module tb_pid_da;
  localparam int E_W = 4;
  logic clk = 0, rst = 1, start = 0;
  logic signed [E_W-1:0] r = '0, y = '0;
  logic signed [15:0] u;
  logic valid, busy, sat;
  int checks = 0, failures = 0;
  int e1 = 0, e2 = 0;
  logic signed [15:0] up = '0;

  pid_da dut (.clk(clk), .rst(rst), .start_i(start), .ref_i(r), .y_i(y), .u_o(u),
              .valid_o(valid), .busy_o(busy), .e_sat_o(sat));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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
    for (int i = 0; i < 3000; i++) begin
      int ek, cycles;
      bit hold;
      logic signed [15:0] uexp;
      r = E_W'($urandom);
      y = E_W'($urandom);
      ek = clamp(int'(r) - int'(y));
      uexp = 16'(int'(up) + 28 * ek - 55 * e1 + 27 * e2);
      hold = ($urandom % 3) == 0;
      start = 1;
      @(posedge clk);
      #1;
      if (!hold) start = 0;
      // inputs may change once the sample has been taken
      r = E_W'($urandom);
      y = E_W'($urandom);
      cycles = 0;
      while (!valid) begin
        checks++;
        if (!busy || u !== up) begin
          failures++;
          $display("FAIL k=%0d busy=%0b or u moved before valid", i, busy);
        end
        @(posedge clk);
        #1;
        cycles++;
      end
      start = 0;
      checks++;
      if (u !== uexp || cycles != E_W + 1) begin
        failures++;
        $display("FAIL k=%0d u=%0d expected %0d cycles=%0d", i, u, uexp, cycles);
      end
      up = uexp; e2 = e1; e1 = ek;
      repeat ($urandom % 3) begin
        @(posedge clk);
        #1;
        checks++;
        if (u !== up || valid || busy) begin
          failures++;
          $display("FAIL idle state wrong");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
