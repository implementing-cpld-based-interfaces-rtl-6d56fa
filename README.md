# Motion-control interfaces for an 80C52 board in one small CPLD

Small microcontrollers cannot keep up in software with the signals of motion
hardware. An optical encoder can change state millions of times per second,
a stepper needs an exact pattern sequence on four drive transistors, and a
PWM motor drive needs a steady pulse train. This design moves those three
jobs into a CPLD that sits on the external bus of an 80C52. The
microcontroller sees only a handful of byte registers:

- **Quadrature decoder/counter.** It samples the two encoder channels on the
  fast system clock and counts every edge of either channel (x4 resolution).
  It keeps a 16-bit position that the CPU reads one byte at a time, without
  tearing.
- **Half-step stepper sequencer.** Four JK flip-flops step through the eight
  half-step drive patterns of a unipolar motor, forward or backward. Each
  edge of a step clock from the CPU's timer advances it one step.
- **PWM generator.** The CPU sets the period and the off time, both in
  clocks.
- **Predefined I/O.** 8 digital inputs, 8 digital outputs and a free chip
  select. These serve users who never reconfigure the device.

The target board runs everything from an 11.0592 MHz clock, which the
microcontroller shares.

## The microcontroller's view: one 16-byte I/O page

The bus glue (`mcu_bus_if`) does two things:

- It latches the low address byte from the multiplexed AD bus while ALE is
  high.
- It decodes the page 0x7FF0–0x7FFF.

It passes each access on as a `bus_req_t`: page select, A3..0, read strobe,
write strobe and write data. The strobes stay level-sensitive. A register
loads on every clock while it is selected and WR is low, and keeps the last
byte. Read data goes out on `data_out` with `data_oe` as the tri-state
enable. The pad buffer that drives the shared AD bus is outside this RTL.

| Address | Access | Register |
|---|---|---|
| 0x7FF0 | read  | digital inputs, after a 2-flop synchroniser |
| 0x7FF1 | write/read | digital outputs |
| 0x7FF2 | any   | asserts the free chip select `cs_n` for the duration of the strobe |
| 0x7FF4 | read  | encoder count bits 7..0. Also latches bits 15..8 |
| 0x7FF4 | write | clears the encoder count (the data is ignored) |
| 0x7FF5 | read  | encoder count bits 15..8, as latched by the last 0x7FF4 read |
| 0x7FF6 | write | PWM `totaltime`: the period in clocks (0 means 256) |
| 0x7FF7 | write | PWM `lowtime`: the clocks per period the output is low |

The original design fixes only the PWM addresses (0x7FF6, 0x7FF7). The other
addresses and the clear-by-write are choices of this implementation. They
are gathered in `cpld_pkg.sv`.

**Reading the position.** Always read 0x7FF4 first, then 0x7FF5. The
low-byte read copies the upper byte into a holding latch. If the counter
carries between the two reads, the pair still belongs to one count. The
latch loads on every clock of the low-byte strobe, so it holds the upper
byte from the strobe's last clock.

## Quadrature decoding

Channels A and B are two square waves a quarter period apart. Together they
step through four states (A,B):

```
state 1 = (1,0)   state 2 = (1,1)   state 3 = (0,1)   state 4 = (0,0)
1 -> 2 -> 3 -> 4 -> 1  : count up   (A leads B)
1 -> 4 -> 3 -> 2 -> 1  : count down (B leads A)
```

`quad_edge_detect` holds a 2-stage shift register per channel. Its 4-bit
output is `enc_dec = {B_prev, B_now, A_prev, A_now}`. `quad_decoder` is a
16-entry truth table over that code:

| enc_dec | meaning | output |
|---|---|---|
| 0111, 1110, 1000, 0001 | one channel moved forward (1→2, 2→3, 3→4, 4→1) | `up_cnt` |
| 0010, 0100, 1101, 1011 | one channel moved backward (1→4, 4→3, 3→2, 2→1) | `dwn_cnt` |
| all others | no change, or both channels changed in one clock | none |

Every edge of either channel counts, so a 512-slot codewheel gives 2048
counts per revolution. The 16-bit `quad_counter` then covers 32 revolutions
before it wraps. Read the count as a two's complement position.

Timing and limits:

- An edge on a channel reaches the count two clocks later: one clock in the
  shift register, one in the counter.
- Each encoder state must last at least one clock. At 11.0592 MHz that is
  11.06 M counts/s, about 324,000 rpm with a 2048-count encoder.
- A jump of two states in one clock is ignored silently. That position is
  lost.
- There is no metastability stage in front of the shift register, as in the
  original. Feed `cha`/`chb` from clean Schmitt-triggered signals, or add a
  synchroniser stage if the encoder is not slow relative to the clock.

## Half-step sequencer

Transistors 1..4 pull the four half-windings to ground. The eight half steps
are:

| step | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 |
|---|---|---|---|---|---|---|---|---|
| transistors on | 1,3 | 1 | 1,4 | 4 | 2,4 | 2 | 2,3 | 3 |
| Q3Q2Q1Q0 | 1010 | 1000 | 1001 | 0001 | 0101 | 0100 | 0110 | 0010 |

`dig_out[0]` = Q3 drives transistor 1, ..., and `dig_out[3]` = Q0 drives
transistor 4. Each flip-flop is a JK flip-flop, `Q+ = J·!Q + !K·Q`. J and K
are functions of the four Q bits and the direction bit `dir`:
`dir = 0` steps 1→8, `dir = 1` steps 8→1. Write `f = !dir`. The two-level
minimisation used here, with the eight unused codes as don't-cares, is:

```
J3 = !Q2·(f·!Q0 + dir·!Q1)     K3 = f·Q0 + dir·Q1
J2 = !Q3·(f·Q0  + dir·Q1)      K2 = f·Q1 + dir·Q0
J1 = !Q0·(f·!Q3 + dir·Q3)      K1 = f·Q3 + dir·Q2
J0 = !Q1·(f·!Q2 + dir·Q2)      K0 = f·Q2 + dir·Q3
```

The testbench checks all 16 transitions (8 states × 2 directions) against
the step table.

Start-up and illegal states:

- Reset loads 1000 (step 2).
- The all-off code 0000 is forced to 1000 on the next step clock. The
  original does this with an asynchronous preset on Q3.
- The other unused codes are not forced out. 1100 holds while `dir = 0`. If
  noise can corrupt the state, assert reset.

The sequencer runs on its own clock, `step_clk`: each rising edge is one half
step. Motor speed is set by how fast the CPU's timer toggles it. `dir` must
be stable around that edge.

## PWM generator

Counter `cntr` runs 0, 1, …, `totaltime`−1, 0, …. The registered output is
low while `cntr < lowtime` and high otherwise:

```
period   = totaltime clocks            (totaltime = 0 behaves as 256)
off time = lowtime clocks per period   (lowtime >= totaltime: always low;
                                        lowtime = 0: always high)
```

At 11.0592 MHz the 8-bit period spans 43.2 kHz to 5.5 MHz. The 10 kHz
common in motor amplifiers is out of reach without a clock prescaler or a
wider counter. Neither is part of this design.

Polarity: the original text describes `lowtime` as the off time, and so does
its waveform sketch. The original register listing, though, compares with
the opposite polarity, which would make `lowtime` the on time. This design
follows the description. Swap the comparison in `pwm_ctrl.sv` if your drive
stage inverts.

The original resets the counter asynchronously when it equals `totaltime`.
Here the wrap is synchronous, with the same period.

## Clocks and reset

| Clock | Drives |
|---|---|
| `clk` | everything except the stepper: the 11.0592 MHz system clock, which the microcontroller is assumed to share |
| `step_clk` | the stepper only |

Because the CPU shares `clk`, the bus signals are sampled without
synchronisers. ALE must be high at at least one rising edge of `clk`.
`rst_n` is an asynchronous, active-low reset for both domains. The original
flip-flops have no user reset; this one exists so that start-up is defined.

## How far it can be trusted

**Taken from the original.** These parts follow the published CPLD design
closely:

- the edge-detector structure and the decoder truth table;
- the 16-bit counter and the upper-byte latch on the low-byte read;
- the half-step state table and the JK flip-flop approach;
- the PWM registers and their addresses.

**This implementation's choices.** The original gives only names or a
function for these:

- every address except the PWM pair;
- the counter clear by writing 0x7FF4;
- the ALE-based address latch and the page decode;
- the digital I/O and chip-select registers;
- the reset;
- the synchronous form of the stepper preset and the PWM counter clear;
- the PWM polarity (see above).

**Not built.** The microcontroller, memories, LCD, A/D converter, serial
port and JTAG programming logic are off-the-shelf parts. So are the encoder,
the motor and its transistors. The CPLD's own glue for the memory map
(SRAM/EEPROM/LCD selects) is not specified, so it is not built.

**Capacity.** The top instantiates all interfaces at once, each with its
own pins: 26 user pins and 97 flip-flops. The original device offers 18
user pins and has 64 macrocells (EPM7064), about three quarters of them free
for user logic. There, the predefined I/O and the motion interfaces are
alternative loads. Build a smaller top with the blocks you need. The
encoder interface is 28 flip-flops, the PWM 25, the stepper 4 and the
digital I/O 24.

**Verification.** Each module has a self-checking testbench in `tb/`:

- exhaustive for the decoder and the stepper transitions;
- randomised for the counter, bus glue, I/O and PWM settings;
- `tb_cpld_top` drives 8051-style MOVX cycles at 11.0592 MHz against the
  full top with default parameters. It counts up and down, checks the
  carry-protected read, clears the counter, steps the motor both ways,
  measures the PWM, and exercises the digital I/O and chip select.
- `tb_encoder_speed` turns a 2048-count encoder at 300,000 rpm, one state
  change every 97.66 ns against a 90.42 ns clock. It checks the position
  after 1, 16 and 32 revolutions (where the count wraps to 0) and after one
  revolution back.

Nothing has been run on hardware.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl rtl/cpld_pkg.sv \
    tb/tb_cpld_top.sv --top-module tb_cpld_top
./obj_dir/Vtb_cpld_top
```

Replace `tb_cpld_top` with any other `tb_<module>` to run one block. Each
testbench ends by printing `TB_RESULT checks=N failures=M`.

## Files

| File | Contents |
|---|---|
| `rtl/cpld_pkg.sv` | page address, register offsets, `bus_req_t`, decode helpers |
| `rtl/mcu_bus_if.sv` | address latch and page decode |
| `rtl/quad_edge_detect.sv`, `quad_decoder.sv`, `quad_counter.sv`, `enc_bus_if.sv` | encoder interface parts |
| `rtl/quad_encoder_if.sv` | the four parts wired together |
| `rtl/stepper_ctrl.sv` | JK half-step sequencer |
| `rtl/pwm_ctrl.sv` | PWM generator |
| `rtl/gpio_port.sv` | predefined digital I/O and chip select |
| `rtl/cpld_top.sv` | everything on one bus |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_encoder_speed.sv` | encoder interface at its speed and range limits |
