# Digital PID controller: distributed-arithmetic vs. multiplier realization

This RTL implements one small digital PID controller twice, so that the two
hardware realizations can be compared side by side:

* **`pid_da`** – a *multiplierless* controller. The three
  coefficient-times-sample products are never formed. The controller reads
  precomputed coefficient sums from an 8-word look-up table, one bit position
  at a time. This is *distributed arithmetic* (DA), and it is the main design.
* **`pid_mult`** – the direct realization with three multipliers and an adder
  tree. It is the reference the DA controller is measured against.

Both compute exactly the same numbers. `pid_top` holds the two controllers
side by side. Each has its own ports. They share only the clock and the reset.

## The control law

The controller uses the incremental ("velocity") form of the discrete PID law:

    e(k) = ref - y(k)
    u(k) = u(k-1) + s0*e(k) + s1*e(k-1) + s2*e(k-2)

Here `s0 = K(1 + Ts/2Ti + Td/Ts)`, `s1 = K(-1 + Ts/2Ti - 2Td/Ts)` and
`s2 = K*Td/Ts` come from a trapezoidal discretization of
`K(1 + 1/(s*Ti) + s*Td)`. The default coefficients are **s0 = 28, s1 = -55,
s2 = 27**. They were tuned offline (Ziegler–Nichols) for the speed loop of a
small DC motor with `G(s) = 0.01 / (0.005 s² + 0.06 s + 0.1001)`.

The controller needs three registers: e(k-1), e(k-2) and u(k-1).

One property of these particular coefficients matters for the hardware:
s0 + s1 + s2 = 0. Summing the increments therefore telescopes to
`u(k) = 28 e(k) - 27 e(k-1)`, so the integral action is zero. With 4-bit
errors the output is bounded by |u| ≤ 440, and the 16-bit output register
can never overflow. Other coefficients can be set through parameters. Then
the output wraps around modulo 2¹⁶, as a plain adder does (see *Number formats*).

## Distributed arithmetic: how `pid_da` avoids the multipliers

Write each 4-bit two's-complement error as its bits,
`e = -2³·e[3] + Σ_{b<3} 2^b·e[b]`. Then the sum of products regroups by bit
position:

    s0·e(k) + s1·e(k-1) + s2·e(k-2)
      = Σ_b w_b · F( e(k)[b], e(k-1)[b], e(k-2)[b] ),   w_3 = -8, w_b = 2^b otherwise

In this sum `F(a0,a1,a2) = a0·s0 + a1·s1 + a2·s2`. F takes only 8 values,
so it is stored in a ROM, `da_lut_rom`. Address bit 0 is a bit of e(k),
bit 1 a bit of e(k-1) and bit 2 a bit of e(k-2):

| address (e(k-2) e(k-1) e(k)) | word | default |
|---|---|---|
| 000 | 0 | 0 |
| 001 | s0 | 28 |
| 010 | s1 | -55 |
| 011 | s0+s1 | -27 |
| 100 | s2 | 27 |
| 101 | s0+s2 | 55 |
| 110 | s1+s2 | -28 |
| 111 | s0+s1+s2 | 0 |

The words are computed from the coefficient parameters when the design is
elaborated: `ROM[a] = Σ_t a[t]·COEF[t]`. They are 14 bits wide: the 12-bit
coefficients plus 2 bits of growth for a sum of three. The ROM is read
asynchronously, the way an FPGA maps it into LUTs. With T taps it grows as
2^T words. That growth is the cost of the method.

`da_mac` walks the bit positions **most significant first**, one per clock.
Each step shifts the accumulator left and adds the table word for that bit
slice. The first step handles the sign slice and subtracts the word instead:

    acc = 0
    acc = 2·acc − F(slice 3)      (sign bit)
    acc = 2·acc + F(slice 2)
    acc = 2·acc + F(slice 1)
    acc = 2·acc + F(slice 0)      → acc = s0·e(k) + s1·e(k-1) + s2·e(k-2)

The result is exact and no bits are dropped. For example, with
e(k) = -8 (1000) and zero history, only the sign slice addresses word 001.
That gives acc = -28, -56, -112, -224 = 28·(-8).

### `pid_da` around the DA core

`pid_da` puts four things around `da_mac`: the error subtractor
(`pid_error_sub`), the two-stage error history (`pid_delay_line`), the u(k-1)
register and a handshake.

* `start_i` is accepted while `busy_o` is low. On that clock edge three things
  happen at once:
  * `ref_i` and `y_i` are sampled.
  * `da_mac` latches `{e(k), e(k-1), e(k-2)}`.
  * The history shifts, so it already holds e(k) and e(k-1) for the next sample.
* `da_mac` then needs E_W = 4 clocks, one per bit slice.
* One more clock adds the increment to u. `valid_o` pulses for one cycle
  with the new `u_o` and `busy_o` drops.
* Latency: **E_W + 1 = 5 clocks** from the start edge to valid. The shortest
  sample period is E_W + 2 = 6 clocks, because a new start is taken in the
  valid cycle. A `start_i` held high during a run is ignored.
* `u_o` is registered. It changes only in the cycle in which `valid_o` is
  high.

## The multiplier realization, `pid_mult`

This follows the classic block diagram directly. The subtractor forms e(k).
Two registers hold e(k-1) and e(k-2). Three multipliers form s0·e(k),
s1·e(k-1) and s2·e(k-2). Three adders complete the sum:
`(s0·e(k) + s1·e(k-1)) + (s2·e(k-2) + u(k-1))`. Their result is both the
output u(k) and the input of the u(k-1) register.

* `u_o` is **combinational**. It is valid as soon as `ref_i`/`y_i` and the
  registers settle.
* A one-clock `sample_i` strobe ends the sample. On that edge
  e(k)→e(k-1), e(k-1)→e(k-2) and u(k)→u(k-1). Without the strobe nothing moves.

So `pid_mult` gives an answer in the same cycle, with three multipliers in the
path. `pid_da` has no multiplier: it uses an 8-word table, a shift-add
accumulator and a few more flip-flops, and it takes 5 clocks per sample.

## Number formats

| signal | format | set by |
|---|---|---|
| ref, y(k), e(k) | 4-bit two's complement (`E_W`) | parameter |
| s0, s1, s2 | 12-bit two's complement (`COEF_W`) | parameter |
| DA table words | `COEF_W + clog2(3)` = 14 bits | derived |
| DA increment | 14 + `E_W` = 18 bits | derived |
| u(k) | 16-bit two's complement (`U_W`), wraps on overflow | parameter |

* `ref - y(k)` is formed one bit wider and then **saturated** to the 4-bit
  range [-8, 7]. The `e_sat_o` output flags a sample that was limited.
* The increment is added to u(k-1) modulo 2^U_W in both controllers, so
  their results always agree bit for bit.

## Interfaces

`pid_top` ports (both controllers use the same clock `clk` and the same
synchronous, active-high reset `rst`):

| port | dir | width | meaning |
|---|---|---|---|
| `da_start_i` | in | 1 | DA: take a sample |
| `da_ref_i`, `da_y_i` | in | 4 | DA: set point, measured output (signed) |
| `da_u_o` | out | 16 | DA: u(k), registered |
| `da_valid_o` | out | 1 | DA: u(k) updated (one-cycle pulse) |
| `da_busy_o` | out | 1 | DA: sample in progress |
| `da_e_sat_o` | out | 1 | DA: error was limited |
| `mul_sample_i` | in | 1 | multiplier: sample strobe |
| `mul_ref_i`, `mul_y_i` | in | 4 | multiplier: set point, measured output |
| `mul_u_o` | out | 16 | multiplier: u(k), combinational |
| `mul_e_sat_o` | out | 1 | multiplier: error was limited |

Reset clears the error history and u(k-1) to zero.

Parameters (all modules take them from `pid_pkg`): `E_W` (4), `COEF_W` (12),
`U_W` (16), `S0`/`S1`/`S2` (28/-55/27). To retune the controller, override
`S0..S2`. The DA table follows automatically.

## Files

| file | content |
|---|---|
| `rtl/pid_pkg.sv` | widths and default coefficients |
| `rtl/pid_error_sub.sv` | saturating error subtractor |
| `rtl/pid_delay_line.sv` | e(k-1), e(k-2) registers |
| `rtl/da_lut_rom.sv` | DA coefficient-sum table |
| `rtl/da_mac.sv` | bit-serial DA inner product |
| `rtl/pid_da.sv` | DA (multiplierless) controller |
| `rtl/pid_mult.sv` | multiplier-based controller |
| `rtl/pid_top.sv` | both controllers side by side |
| `tb/tb_<module>.sv` | a self-checking testbench for each module |

## Verification

Each testbench computes its expected values independently, with integer
arithmetic on the control law. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_pid_error_sub`: all 256 input pairs.
* `tb_da_lut_rom`: all 8 words. It also tests extreme 12-bit coefficients
  for word-width overflow.
* `tb_da_mac`: all 4096 sample triples. It checks the 4-clock latency,
  checks that `done` lasts one cycle, and checks that a start given while
  busy is ignored.
* `tb_pid_mult`, `tb_pid_da`: 2000–3000 random samples each. They check
  the output value, the hold between samples and the DA latency of 5 clocks.
* `tb_pid_top`: runs at the default sizes. Both controllers get the same
  stimulus:
  * first the 15-sample error sequence
    `-8, 7, 3, 2, 1, 5, 6, 0, 4, 4, 3, 7, 5, 6, 1`, then 4000 random samples;
  * both must match the model, and match each other;
  * it counts the events that must each happen: all 8 table addresses used,
    a nonzero sign-slice subtraction, a start rejected while busy, and error
    saturation in each controller.

To run one testbench with Verilator:

    verilator --binary --timing --assert -Wno-fatal rtl/pid_pkg.sv tb/tb_pid_top.sv \
              -y rtl --top-module tb_pid_top -o sim
    ./obj_dir/sim

Every testbench finishes in well under a second.

## Where this design departs from the original description, and what is missing

* **Widths.** The source gives none in its text. The 4-bit error, the 12-bit
  coefficients and the 16-bit output come from the signal names of its
  simulation waveforms.
* **Input format.** Signed 4-bit ref/y(k) with error saturation is this
  design's choice.
* **Output arithmetic.** Wrap-around on overflow is this design's choice.
* **Handshakes.** The DA start/busy/valid handshake, the MSB-first bit order,
  the 5-clock latency and the sample strobe of `pid_mult` are this design's
  choices. The source names the method, a bit-serial LUT-based DA, but does
  not describe its internals or timing.
* **Table assignment.** The DA table printed in the source lists some
  addresses (011, 100, 110) with words that do not fit any one assignment of
  address bits to coefficients. The table above uses the assignment that its
  other rows (001, 010, 101) imply, and it makes every word a subset sum.
* **Waveform outputs.** The source's DA waveform shows output values for its
  error sequence (starting -28, -11, 10, -1, ...). These do not follow from
  the control law as given, so they are not used as expected values. The
  testbench checks that sequence against the control law instead.
* **Not included.**
  * The DC motor is the plant, used only to tune the coefficients.
  * The board demonstration logic is not part of the controller and has no
    described function: switches, LEDs, the LCD that showed the DA output,
    and the counters stepping through the test vector.
* **Resource comparison.** The original Spartan-3E results were:
  * multiplier-based: 131 slices, 102 flip-flops, 238 4-input LUTs, 2 MULT18X18;
  * DA: 111 slices, 129 flip-flops, 195 LUTs, no multiplier.

  These came from a vendor flow and are not reproduced here. In generic
  synthesis `pid_da` maps to no multiplier cell and `pid_mult` to multiply-add
  cells.
