// da_lut_rom: distributed-arithmetic look-up table.
//
// Word a of the ROM holds the sum of the coefficients COEF[t] whose address
// bit a[t] is set:
//
//   ROM[a] = sum over t of a[t] * COEF[t]
//
// With the three PID coefficients this is the 8-word table of the DA
// controller: address bit 0 is a bit of e(k) and selects s0, bit 1 a bit of
// e(k-1) and selects s1, bit 2 a bit of e(k-2) and selects s2, so ROM[0]=0,
// ROM[1]=s0, ROM[2]=s1, ROM[3]=s0+s1, ROM[4]=s2, ROM[5]=s0+s2,
// ROM[6]=s1+s2, ROM[7]=s0+s1+s2. The words are worked out from the
// coefficient parameters when the design is elaborated, so new tuning
// only needs new parameter values. The ROM grows as 2**TAPS words.
//
// Interface: asynchronous read (a LUT-based ROM, no clock); data_o is
// LUT_W = COEF_W + clog2(TAPS) bits, enough for the sum of all taps.
module da_lut_rom #(
  parameter int unsigned TAPS   = pid_pkg::TAPS,
  parameter int unsigned COEF_W = pid_pkg::COEF_W,
  parameter logic signed [COEF_W-1:0] COEF [TAPS] = '{pid_pkg::S0, pid_pkg::S1, pid_pkg::S2},
  localparam int unsigned LUT_W = COEF_W + $clog2(TAPS)
) (
  input  logic [TAPS-1:0]          addr_i,
  output logic signed [LUT_W-1:0]  data_o
);

  typedef logic signed [LUT_W-1:0] word_t;
  typedef word_t rom_t [2**TAPS];

  function automatic rom_t build_rom();
    rom_t r;
    for (int a = 0; a < 2**TAPS; a++) begin
      r[a] = '0;
      for (int t = 0; t < int'(TAPS); t++)
        if (a[t]) r[a] = r[a] + word_t'(COEF[t]);
    end
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  always_comb data_o = ROM[addr_i];

endmodule
