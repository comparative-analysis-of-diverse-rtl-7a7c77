// tb_da_mac: bit-serial distributed-arithmetic inner product.
// Exhaustive over all 16^3 triples of 4-bit signed samples: each result
// must equal 28*x0 - 55*x1 + 27*x2 (products taken in integer arithmetic
// here), done_o must come exactly E_W = 4 clocks after the start edge and
// last one cycle, and a start given while busy must be ignored.
module tb_da_mac;
  localparam int E_W = 4;
  logic clk = 0, rst = 1, start = 0;
  logic signed [E_W-1:0] x [3];
  logic busy, done;
  logic signed [17:0] sum;
  int checks = 0, failures = 0;

  da_mac dut (.clk(clk), .rst(rst), .start_i(start), .x_i(x), .busy_o(busy),
              .done_o(done), .sum_o(sum));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int a, input int b, input int c, input bit poke);
    int cycles, expv;
    x[0] = E_W'(a); x[1] = E_W'(b); x[2] = E_W'(c);
    start = 1;
    @(posedge clk);
    #1 start = 0;
    cycles = 0;
    if (poke) begin
      // a start while busy, with other samples, must change nothing
      start = 1; x[0] = E_W'(~a); x[1] = E_W'(~b);
    end
    while (!done) begin
      @(posedge clk);
      #1 start = 0;
      cycles++;
    end
    expv = 28 * a - 55 * b + 27 * c;
    checks++;
    if (int'(sum) != expv || cycles != E_W) begin
      failures++;
      $display("FAIL x=%0d,%0d,%0d sum=%0d expected %0d cycles=%0d", a, b, c, sum, expv, cycles);
    end
    checks++;
    if (busy) begin
      failures++;
      $display("FAIL busy high with done");
    end
    @(posedge clk);
    #1;
    checks++;
    if (done) begin
      failures++;
      $display("FAIL done longer than one cycle");
    end
  endtask

  initial begin
    for (int t = 0; t < 3; t++) x[t] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int a = -8; a < 8; a++)
      for (int b = -8; b < 8; b++)
        for (int c = -8; c < 8; c++)
          run(a, b, c, ((a + b + c) & 7) == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
