// tb_pid_top: end-to-end test of both controller realizations at their
// default sizes (4-bit error, 12-bit coefficients 28/-55/27, 16-bit u).
//
// The same sample stream drives the distributed-arithmetic controller and
// the multiplier-based one. For each sample the expected u(k) is computed
// from u(k) = u(k-1) + 28 e(k) - 55 e(k-1) + 27 e(k-2), e(k) = ref - y(k)
// limited to 4-bit signed, and both outputs must equal it (and so each
// other). The DA result must arrive E_W + 1 = 5 clocks after its start.
//
// Phase 1 applies a fixed 15-sample error sequence (ref = e, y = 0), the
// error vector used to exercise the DA controller in simulation. Phase 2
// applies random reference and measurement values.
//
// Mechanisms counted, each of which must occur at least once: completed DA
// samples, multiplier-controller sample strobes, each of the 8 look-up-table
// addresses used by a DA run and a nonzero table word subtracted for the
// sign-bit slice (both worked out from the error history the test drives),
// a start request ignored because the DA controller was busy, and error
// saturation in each controller.
module tb_pid_top;
  localparam int E_W = 4;
  logic clk = 0, rst = 1;
  logic da_start = 0, mul_sample = 0;
  logic signed [E_W-1:0] da_r = '0, da_y = '0, mul_r = '0, mul_y = '0;
  logic signed [15:0] da_u, mul_u;
  logic da_valid, da_busy, da_sat, mul_sat;
  int checks = 0, failures = 0;
  int e1 = 0, e2 = 0;
  logic signed [15:0] up = '0;

  // mechanism counters
  int n_da = 0, n_mul = 0, n_sign_sub = 0, n_busy_reject = 0, n_da_sat = 0, n_mul_sat = 0;
  int lut_hits [8];

  localparam logic [3:0] ERR_SEQ [15] = '{4'b1000, 4'b0111, 4'b0011, 4'b0010, 4'b0001,
                                          4'b0101, 4'b0110, 4'b0000, 4'b0100, 4'b0100,
                                          4'b0011, 4'b0111, 4'b0101, 4'b0110, 4'b0001};

  pid_top dut (
    .clk(clk), .rst(rst),
    .da_start_i(da_start), .da_ref_i(da_r), .da_y_i(da_y), .da_u_o(da_u),
    .da_valid_o(da_valid), .da_busy_o(da_busy), .da_e_sat_o(da_sat),
    .mul_sample_i(mul_sample), .mul_ref_i(mul_r), .mul_y_i(mul_y), .mul_u_o(mul_u),
    .mul_e_sat_o(mul_sat)
  );

  always #5 clk = ~clk;

  // start requests that arrive while the DA controller is busy
  always @(posedge clk) begin
    if (!rst && da_start && da_busy) n_busy_reject++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clamp(int v);
    return v > 7 ? 7 : v < -8 ? -8 : v;
  endfunction

  task automatic one_sample(input logic signed [E_W-1:0] r, input logic signed [E_W-1:0] y);
    int ek, cycles;
    logic signed [15:0] uexp, mul_k;
    ek = clamp(int'(r) - int'(y));
    // table addresses this sample's serial run reads, bit slice by bit slice
    for (int b = 0; b < E_W; b++) begin
      int a;
      a = ((ek >> b) & 1) | (((e1 >> b) & 1) << 1) | (((e2 >> b) & 1) << 2);
      lut_hits[a]++;
      if (b == E_W - 1 && a != 0 && a != 7) n_sign_sub++;   // words 0 and 7 are zero
    end
    uexp = 16'(int'(up) + 28 * ek - 55 * e1 + 27 * e2);
    da_r = r; da_y = y; mul_r = r; mul_y = y;
    #1;
    if (da_sat) n_da_sat++;
    if (mul_sat) n_mul_sat++;
    // multiplier-based: output is combinational, then strobe
    checks++;
    if (mul_u !== uexp) begin
      failures++;
      $display("FAIL mult u=%0d expected %0d (e=%0d)", mul_u, uexp, ek);
    end
    mul_k = mul_u;
    // DA: start, keep the request up for a while during the run
    da_start = 1;
    mul_sample = 1;
    @(posedge clk);
    #1 mul_sample = 0;
    n_mul++;
    cycles = 0;
    while (!da_valid) begin
      if (cycles == 1) da_start = 0;   // held into the busy phase once
      @(posedge clk);
      #1;
      cycles++;
    end
    da_start = 0;
    n_da++;
    checks++;
    if (da_u !== uexp || cycles != E_W + 1) begin
      failures++;
      $display("FAIL DA u=%0d expected %0d cycles=%0d", da_u, uexp, cycles);
    end
    checks++;
    if (da_u !== mul_k) begin
      failures++;
      $display("FAIL realizations differ: DA %0d mult %0d", da_u, mul_k);
    end
    up = uexp; e2 = e1; e1 = ek;
  endtask

  initial begin
    for (int i = 0; i < 8; i++) lut_hits[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // phase 1: fixed error sequence
    foreach (ERR_SEQ[i]) begin
      one_sample(signed'(ERR_SEQ[i]), '0);
      $display("e(%0d)=%0d u=%0d", i, signed'(ERR_SEQ[i]), da_u);
    end
    // phase 2: random reference and measurement
    for (int i = 0; i < 4000; i++) one_sample(E_W'($urandom), E_W'($urandom));

    $display("mechanisms: da_samples=%0d mul_samples=%0d sign_slice_sub=%0d busy_reject=%0d da_sat=%0d mul_sat=%0d",
             n_da, n_mul, n_sign_sub, n_busy_reject, n_da_sat, n_mul_sat);
    for (int i = 0; i < 8; i++) begin
      $display("lut address %0d read %0d times", i, lut_hits[i]);
      checks++;
      if (lut_hits[i] == 0) failures++;
    end
    checks += 6;
    if (n_da == 0) failures++;
    if (n_mul == 0) failures++;
    if (n_sign_sub == 0) failures++;
    if (n_busy_reject == 0) failures++;
    if (n_da_sat == 0) failures++;
    if (n_mul_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
