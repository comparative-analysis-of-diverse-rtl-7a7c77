// tb_da_lut_rom: contents of the distributed-arithmetic table.
// The default instance must hold 0, s0, s1, s0+s1, s2, s0+s2, s1+s2 and
// s0+s1+s2 at addresses 0..7 with s0 = 28, s1 = -55, s2 = 27 (the values
// are written out here by hand). A second instance with extreme 12-bit
// coefficients checks that the words are wide enough not to overflow.
module tb_da_lut_rom;
  logic [2:0] addr;
  logic signed [13:0] data, data_x;
  int checks = 0, failures = 0;

  localparam int EXP_DEF [8] = '{0, 28, -55, -27, 27, 55, -28, 0};
  localparam int EXP_EXT [8] = '{0, -2048, -2048, -4096, 2047, -1, -1, -2049};

  da_lut_rom dut (.addr_i(addr), .data_o(data));
  da_lut_rom #(.TAPS(3), .COEF_W(12), .COEF('{-12'sd2048, -12'sd2048, 12'sd2047})) dut_x (
    .addr_i(addr), .data_o(data_x));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 8; a++) begin
      addr = 3'(a);
      #1;
      checks += 2;
      if (int'(data) != EXP_DEF[a]) begin
        failures++;
        $display("FAIL default addr=%0d data=%0d expected %0d", a, data, EXP_DEF[a]);
      end
      if (int'(data_x) != EXP_EXT[a]) begin
        failures++;
        $display("FAIL extreme addr=%0d data=%0d expected %0d", a, data_x, EXP_EXT[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
