// da_mac: bit-serial distributed-arithmetic inner product.
//
// Computes  sum_o = COEF[0]*x_i[0] + COEF[1]*x_i[1] + ... + COEF[TAPS-1]*x_i[TAPS-1]
// for signed E_W-bit samples x_i without a multiplier. All samples are
// latched on start_i. Then, one bit position per clock and most
// significant bit first, the bits of that position across all samples
// form the address of the DA look-up table (da_lut_rom), and the word read
// is added into a shift accumulator:
//
//   acc <= 2*acc - ROM[slice(E_W-1)]   (sign bit of two's complement)
//   acc <= 2*acc + ROM[slice(b)]       (b = E_W-2 .. 0)
//
// After the last slice acc equals the inner product exactly. Using the
// look-up table in place of the multiplications, bit-serially, is the
// distributed-arithmetic method of the controller; the MSB-first order and
// the start/busy/done handshake are this design's choice.
//
// Timing: start_i is taken only while busy_o is low. E_W clock edges after
// the edge that took start_i, done_o is high for one cycle, busy_o is low
// again and sum_o holds the result (it keeps it until the next done_o). A
// new start can be given in that same cycle, so one result is produced
// every E_W + 1 clocks. Reset is synchronous and active high.
module da_mac #(
  parameter int unsigned TAPS   = pid_pkg::TAPS,
  parameter int unsigned E_W    = pid_pkg::E_W,
  parameter int unsigned COEF_W = pid_pkg::COEF_W,
  parameter logic signed [COEF_W-1:0] COEF [TAPS] = '{pid_pkg::S0, pid_pkg::S1, pid_pkg::S2},
  localparam int unsigned LUT_W = COEF_W + $clog2(TAPS),
  localparam int unsigned SUM_W = LUT_W + E_W
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    start_i,
  input  logic signed [E_W-1:0]   x_i [TAPS],
  output logic                    busy_o,
  output logic                    done_o,
  output logic signed [SUM_W-1:0] sum_o
);

  localparam int unsigned BIT_W = (E_W > 1) ? $clog2(E_W) : 1;

  logic signed [E_W-1:0]   xr [TAPS];    // latched samples
  logic [BIT_W-1:0]        bit_q;        // bit position being processed
  logic signed [SUM_W-1:0] acc_q;
  logic [TAPS-1:0]         slice;
  logic signed [LUT_W-1:0] lut_word;
  logic signed [SUM_W-1:0] acc_next;

  // one bit slice across all latched samples addresses the table
  always_comb begin
    for (int t = 0; t < int'(TAPS); t++) slice[t] = xr[t][bit_q];
  end

  da_lut_rom #(.TAPS(TAPS), .COEF_W(COEF_W), .COEF(COEF)) u_rom (
    .addr_i (slice),
    .data_o (lut_word)
  );

  always_comb begin
    if (bit_q == BIT_W'(E_W - 1))
      acc_next = (acc_q <<< 1) - SUM_W'(lut_word);
    else
      acc_next = (acc_q <<< 1) + SUM_W'(lut_word);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy_o <= 1'b0;
      done_o <= 1'b0;
      bit_q  <= '0;
      acc_q  <= '0;
      sum_o  <= '0;
      for (int t = 0; t < int'(TAPS); t++) xr[t] <= '0;
    end else begin
      done_o <= 1'b0;
      if (!busy_o) begin
        if (start_i) begin
          for (int t = 0; t < int'(TAPS); t++) xr[t] <= x_i[t];
          bit_q  <= BIT_W'(E_W - 1);
          acc_q  <= '0;
          busy_o <= 1'b1;
        end
      end else begin
        acc_q <= acc_next;
        if (bit_q == '0) begin
          sum_o  <= acc_next;
          done_o <= 1'b1;
          busy_o <= 1'b0;
        end else begin
          bit_q <= bit_q - 1'b1;
        end
      end
    end
  end

  // a result is announced only once the serial run has ended
  assert property (@(posedge clk) disable iff (rst) done_o |-> !busy_o)
    else $error("da_mac: done_o while busy_o");

endmodule
