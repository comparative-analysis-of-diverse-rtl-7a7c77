// tb_pid_delay_line: the two-stage error history.
// Random samples are pushed with a random advance strobe; a software copy
// of the history is kept and compared with q_o after every clock. Reset
// must clear both stages.
module tb_pid_delay_line;
  localparam int W = 4;
  logic clk = 0, rst = 1, adv = 0;
  logic signed [W-1:0] d = '0;
  logic signed [W-1:0] q [2];
  int checks = 0, failures = 0;
  int h1 = 0, h2 = 0;

  pid_delay_line #(.W(W), .DEPTH(2)) dut (.clk(clk), .rst(rst), .adv_i(adv), .d_i(d), .q_o(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    checks++;
    if (int'(q[0]) != h1 || int'(q[1]) != h2) begin
      failures++;
      $display("FAIL q0=%0d q1=%0d expected %0d %0d", q[0], q[1], h1, h2);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check();
    for (int i = 0; i < 500; i++) begin
      adv = ($urandom % 3) != 0;
      d = W'($urandom);
      @(posedge clk);
      if (adv) begin h2 = h1; h1 = int'(d); end
      #1 check();
    end
    rst = 1;
    @(posedge clk);
    #1 rst = 0;
    h1 = 0; h2 = 0;
    check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
