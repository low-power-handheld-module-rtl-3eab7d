# MB-2: a low-power counter-based measuring instrument

MB-2 is a small handheld instrument built around one idea: every measurement
is the same operation, *count pulses of one signal while a second signal
holds a gate open*. Which signal is counted and what opens the gate is
chosen by the mode:

| mode        | pulses counted                 | gate open for                          | reading           |
|-------------|--------------------------------|----------------------------------------|-------------------|
| frequency   | INPUT_A edges                  | 1 s, 10 ms or 1 ms from the crystal    | frequency         |
| period      | reference strobe (1 Hz/kHz/MHz)| N periods of INPUT_A, N = 1/10/100/1000| N x period        |
| phase       | INPUT_A edges                  | N periods of INPUT_B                   | A edges per N B periods |
| chronometer | reference strobe (1 Hz/kHz/MHz)| from one INT press to the next         | elapsed time      |
| calibrator  | INPUT_A edges                  | as the frequency meter                 | frequency of an external generator |

The count is a four-decade BCD number. It is shown on a four-digit
multiplexed seven-segment LED display, with LEDs for the range, the divider
factor and overload, and each displayed digit is also sent on a serial line
(TxD) for logging on a PC or microcontroller. The whole design runs on a
20 MHz crystal clock (IN20M) and is written in synthesizable SystemVerilog
for a small CPLD or FPGA.

## The measurement cycle

A three-state machine (`work_fsm`) paces everything. It moves one state
forward on each *pacing strobe*:

```
   S3 (clear)  --step-->  S1 (count)  --step-->  S2 (hold)  --step-->  S3 ...
   MESURE_CE=1            MESURE_C=1             both 0
```

* **S1** enables the counter (`MESURE_C`): each counted pulse adds one.
* **S2** freezes the counter and copies it into the result register. The
  display and the serial line only ever read the result register.
* **S3** clears the counter (`MESURE_CE`) for the next round.

Each state lasts one pacing interval. So the counter is open for exactly one
interval, and the result stays on display through S2 and S3, which is twice
the counting time. In the frequency modes the pacing strobe is the gate
strobe from the time base. A 1 s gate therefore gives a new reading every
3 s. In the period and phase modes the pacing strobe is the output of the
input divider: the gate is N whole periods of the divided signal. In the
chronometer the INT button is the pacing strobe. The first press starts the
count, the second stops it and shows the time, and the third clears it.

Reset, and any change of mode or range, put the machine in S3. The next
strobe then starts a full, clean interval. A half-interval count is never
shown.

The result register has two extra features:

* **PAUSE (Memory).** While PAUSE is high the register is not reloaded. The
  display keeps the last value and the counter carries on underneath.
* **Overload.** A carry out of 9999 sets a flag. It is latched with the
  result and lights LED_OVL. The digits show the count modulo 10000.

The counter counts in BCD, one 4-bit decade per digit. No binary-to-decimal
conversion is needed anywhere.

## Time base and ranges

`ref_reg` divides IN20M by `PRESCALE` (20) to a 1 MHz strobe. A chain of
decade counters then gives 100 kHz, 10 kHz, 1 kHz, 100 Hz, 10 Hz and 1 Hz.
Every output is a one-cycle enable strobe, not a clock. All strobes are
aligned, so the 1 Hz strobe falls on a 1 kHz strobe. The CLK_RANGE button
steps the result range Hz -> kHz -> MHz -> Hz:

| range | gate (frequency, calibrator) | display   | reference counted (period, chronometer) |
|-------|------------------------------|-----------|-----------------------------------------|
| Hz    | 1 s                          | `NNNN`    | 1 Hz  (count = seconds)                 |
| kHz   | 10 ms                        | `NNN.N`   | 1 kHz (count = milliseconds)            |
| MHz   | 1 ms                         | `N.NNN`   | 1 MHz (count = microseconds)            |

The INPUT_RANGE button steps the input divider `in_div` x1 -> x10 -> x100 ->
x1000 and lights LED_x1 .. LED_x1000. The reading is not rescaled in
hardware. In the period mode the display shows the reference pulses counted
over N input periods. In the phase mode it shows the INPUT_A edges counted
over N periods of INPUT_B. The LED gives N, which the user applies. A change
of either range restarts the measurement.

The input signals are sampled at 20 MHz through two-flip-flop synchronisers.
Counted edges are therefore limited to just under 10 MHz. A strobe reaches
the counter 2-3 clock cycles after the edge.

## Display and serial output

`ind_driver` steps through eight slots on each 1 kHz strobe: digit 0 lit,
dark, digit 1 lit, dark, and so on up to digit 3. Each digit is lit 1 ms out
of 8 ms, a refresh of 125 Hz per digit. The dark slot between digits stops
one digit's pattern from ghosting into the next. The levels are:

* EN_DISP0..3 are active high. Digit 0 is the least significant.
* The segments SEG_A..SEG_G are active low (`bcd7seg`).
* The decimal point PT is active low. It is lit with the digit that the
  range table gives, in the frequency and calibrator modes only.

Each time a digit is switched on, its value is offered to the transmitter
`uart_tx`. It is taken if the holding register is free. One byte is sent per
digit:

```
byte  = {2'b00, digit index[1:0], BCD digit[3:0]}
frame = start '0' | D0 .. D7 | parity | stop '1' | stop '1'     (LSB first, even parity)
```

The line rests at '1' between frames. The transmitter is double-buffered.
A holding register takes the next byte while the shift register sends the
current one, so frames can follow each other with no gap. The bit rate is
set by an external clock on CLK_UART: each rising edge, resynchronised, is
one bit period. It is meant for a 9600 Hz generator. At 9600 bit/s a frame
lasts 1.25 ms, within the 2 ms between lit digits, so every digit goes out.
The number of stop bits and the parity sense are parameters of `uart_tx` and
`mb2_top`.

## Ports of `mb2_top`

| port | dir | meaning |
|------|-----|---------|
| `in20m` | in | 20 MHz crystal clock, the only clock |
| `reset_n` | in | asynchronous reset, active low |
| `input_a`, `input_b` | in | measured signals |
| `in_mode`, `input_range`, `clk_range`, `int_btn` | in | buttons, act on the rising edge (not debounced) |
| `pause` | in | Memory: hold the displayed value while high |
| `clk_uart` | in | serial bit clock (9600 Hz) |
| `led_hz`, `led_khz`, `led_mhz` | out | result range |
| `led_x1` .. `led_x1000` | out | input divider factor |
| `led_ovl` | out | overload |
| `en_disp0` .. `en_disp3` | out | digit enables, active high |
| `seg_a` .. `seg_g`, `pt` | out | segments and decimal point, active low |
| `txd` | out | serial data |

Parameters: `PRESCALE` (20, crystal cycles per microsecond), `STOP_BITS` (2),
`ODD_PARITY` (0).

## Files

| file | block |
|------|-------|
| `rtl/mb2_pkg.sv` | mode, state, range and divider enums; digit count |
| `rtl/sync_edge.sv` | synchroniser and rising-edge strobe for every asynchronous input |
| `rtl/ref_reg.sv` | time base: 1 MHz / 1 kHz / 100 Hz / 1 Hz strobes |
| `rtl/range_div.sv` | result range, gate and reference selection, decimal point |
| `rtl/in_div.sv` | input divider /1, /10, /100, /1000 |
| `rtl/mode_p.sv` | mode register and per-mode routing of pulses and pacing |
| `rtl/work_fsm.sv` | S1/S2/S3 measurement FSM |
| `rtl/work_reg.sv` | BCD counter, result register, overload, digit multiplexer |
| `rtl/ind_driver.sv` | display scan |
| `rtl/bcd7seg.sv` | seven-segment decoder |
| `rtl/uart_tx.sv` | serial transmitter |
| `rtl/mb2_top.sv` | top level |

Each file opens with a description of its timing and interface. The
description also says which parts follow the original instrument and which
are this implementation's own choices.

## How far it follows the original instrument

Taken from the original description:

* the five modes and what each one counts;
* the block split (reference divider, input divider /1../1000, two-level
  working registers, range logic, mode logic, display driver, decoder,
  transmitter);
* the three-state FSM with its MESURE_C / MESURE_CE outputs;
* display time = 2 x counting time;
* the 20 MHz reference;
* active-low segments, dark gaps between digits and a refresh above 100 Hz
  per digit;
* the serial frame with parity and two stop bits, double buffering and an
  external bit clock.

Choices made in this implementation:

* **One clock.** The original clocked some registers from derived clocks.
  Here every register runs on IN20M with enable strobes.
* **Rates and display formats.** The gate times, reference rates and
  decimal point positions in the table above.
* **Controls.** Buttons step through their settings on the rising edge.
  PAUSE acts while high.
* **Restarts.** Reset and every mode or range change go to the clear state.
* **Overload.** The rule above: a carry out of 9999.
* **Serial data.** The byte format and even parity.
* **Signal levels.** EN_DISP is active high and PT is active low.
* **Phase mode.** INPUT_A is counted and the divided INPUT_B opens the gate.
  The original's block diagram for this mode can be read the other way
  round; the wording of its description was followed.
* **Calibrator.** It has the frequency meter's data path. No further
  difference is described.
* **Scale factors.** They are not multiplied into the reading (see *Time
  base and ranges*).
* **No binary-to-BCD converter.** The original's block diagram also shows
  one. Since counting is done in BCD, this design has no binary value for it
  to convert, and it is not included.

## Simulation

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_mb2_top rtl/mb2_pkg.sv tb/tb_mb2_top.sv && obj_dir/Vtb_mb2_top
```

* `tb_mb2_top` runs the whole instrument with `PRESCALE = 2`, so every rate
  is 10x faster. It runs in a few seconds. Each mode is measured once. Both
  ranges are changed, and one run overloads the counter and one holds a
  value with PAUSE. The reading is decoded from the segment lines and from
  the TxD frames and checked against the count expected from the input
  periods.
* `tb_mb2_full` uses the default parameters: a real 1 s gate on a 5 kHz
  input, about 60 M clock cycles, under a minute. It checks that the gate
  lasts exactly 20,000,000 cycles and that the display and TxD read 5000.
* `tb_mb2_trace` replays the instrument's reference traces at a reduced time
  base. Four INPUT_A edges fall in each gate. It checks that the digit-0
  counter steps 1, 2, 3, 4 in S1, is cleared in S3 and leaves 0004 in the
  result register. It also checks the segment patterns of '4' and '0' and
  the TxD bytes 0x04, 0x10, 0x20, 0x30.
* The block testbenches (`tb_ref_reg`, `tb_in_div`, `tb_work_reg`,
  `tb_work_fsm`, `tb_mode_p`, `tb_range_div`, `tb_ind_driver`, `tb_bcd7seg`,
  `tb_uart_tx`) compare each block with an independent model. The models
  cover strobe spacing, BCD counts against integers, the state sequence,
  the routing table, the scan order and frame decoding.

After synthesis the design is about 130 flip-flops, plus a small ROM for the
segment decoder.
