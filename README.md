# Memory-data display peripheral for the PDP-8/S

This peripheral plots a table of up to 61 words from a PDP-8/S memory on an
ordinary oscilloscope. The scope needs no storage of its own. The unit keeps
its own copy of the words in a recirculating serial memory, and it replays that
memory to a D-to-A converter without end. Each word becomes one dot. The dot's
height is the word's 8 low bits, and its horizontal position is the word's
number. The whole picture is redrawn every 4880 µs.

The RTL here is a synchronous SystemVerilog model of that unit. The original
was built in 1969 from discrete DEC and 3C logic modules and a
magnetostrictive delay line; its design comes from a master's thesis of the
University of Windsor. The RTL keeps the original's block structure, counts and bit timing.
It replaces the asynchronous pulse logic with one clock and single-cycle
enables. It also replaces the delay line with a 976-stage shift register.

## The word time: everything happens in 16 bit times

The serial memory holds 61 words of 16 bit times each, so it holds 976 bits.
A bit time is 5 µs, so the memory's loop delay is 4880 µs. Twelve of the 16
bit times carry data, least significant bit first. The other four are spacers,
always 0. A 4-bit bit counter names the bit time, and a 6-bit word counter
(0..60) names the word now passing the memory output. Because the loop is
exactly 61 × 16 bit times, every bit of the memory always passes the output
at the same (word counter, bit counter) value.

| bit time | pulse  | what happens |
|---------:|--------|--------------|
| 0        | T0     | compare unit: if a store is pending (write flag on) and MA counter = word counter, set COMP |
| 1..12    | T1–T12 | output register shifts in the memory's output bit. While COMP is on, the input register also shifts its low bit into the memory in place of the recirculated bit |
| 13       | T13    | word counter +1 (wraps 60 → 0). The converter register takes the output register's 8 low bits. While COMP is on: MA counter +1 and the write flag turns off |
| 14       | T14    | COMP cleared |
| 15       | –      | spacer |

Every word time thus reads one word, and a pending store is written into the
single word time whose number equals the MA counter. A word read out during
word time *w* reaches the converter at the end of that word time and stays
there through word time *w*+1. A newly stored word shows up on the screen on
the next pass of the memory, one recirculation later.

## Talking to the processor: three IOT instructions

The unit answers device code 44 (octal). The driving program uses three
instructions. Each is a PDP-8/S IOT whose low three bits choose which of the
IOP1, IOP2 and IOP4 pulses are sent:

| instruction | pulses | effect |
|-------------|--------|--------|
| `6447` | IOT1, IOT2, IOT4 | initialise: clear the MA counter, make the unit ready for a word |
| `6446` | IOT2, IOT4 | IOT2 copies the AC into the input register. IOT4 turns the write flag on |
| `6442` | IOT2 | skip the next instruction once the word has been written |

A display program clears the MA counter once. For each word it then loads the
AC and issues `6446`, and loops on `6442; JMP .-1` until the skip comes. The MA
counter advances by itself after each store, so the k-th word sent lands in
word slot k. A store waits for its slot to come round, which takes up to one
recirculation: at most 976 + 16 bit times, about 5 ms. A table of 61 words
therefore loads in about 0.3 s.

The same IOT2 pulse means something different in each instruction. Two
flip-flops tell the three cases apart (`iot_control`):

* **FF1** is reset by IOT1 and set by IOT4. It is reset only between the IOT1
  and the IOT4 of `6447`. An IOT2 in that window clears the MA counter.
* **FF2** ("ready for a word") is set by IOT4 and by the skip pulse. It is
  reset by IOT1 and whenever the write flag is on.
* IOT2 with FF1 and FF2 set and the write flag off is the `6446` load.
* IOT4 with FF1 and FF2 set sets FF4. FF4's widened pulse turns the write
  flag on.
* IOT2 with FF1 set, FF2 reset and the write flag off is the `6442` that
  skips. That skip sets FF2 again, ready for the next `6446`.
* While the write flag is on, IOT2 does nothing, so the `6442` loop spins.

How FF1 behaves and what the write flag does come from the original
description. FF2's exact role, and the terms of the load and skip gates, are
this design's reading of the original gating. In particular, one case is
unprotected. If a program issues a second `6442` right after the one that
skipped, that IOT2 loads the AC again, as a `6446` would. The documented
program never does this.

The original had to widen the 100 ns DEC pulses into 2.5 µs pulses for its
slower modules. It did this with a flip-flop, a delay and a level converter.
`pulse_converter` keeps this widening for the MA clear and the write-flag set.
`ac_gating` holds the AC copy for 3 µs, as the original's holding flip-flops
did. In this synchronous model the widths no longer matter for correctness.
One timing rule is checked by an assertion in the top: the 3 µs AC hold must
be over before the store's first shift. The shift comes at least one bit time
after the write flag is set.

## Output: converter and scope

`dac_gating` takes the 8 low bits of the word read at T13 and holds them for
the converter. `d_to_a_converter` is a behavioural model (a `real` output) of
the analogue converter. All ones give 0 V, all zeros give −10 V, and the code
is linear in between, with steps of 10/255 V ≈ 0.04 V. The scope's time base is
meant to be synchronised with the word counter. The top brings out
`word_count` and a one-cycle `sweep_sync` pulse at each return to word 0. The
exact sync signal the original used is not known.

## Clocking in this model

One system clock drives everything. The default period is taken to be 100 ns,
one DEC pulse width. `master_clock` divides it by `CLK_DIV` = 50 to make the
bit pulse T (200 kHz). T and the decoded T0…T14 are one clock wide, where the
original's were 2.5 µs wide. The IOP inputs are one-clock pulses. Reset is
synchronous and active high, and it also clears the serial memory. The
original had no reset.

## Files

`rtl/` holds one module or package per file:

| file | block |
|------|-------|
| `display_pkg.sv` | shared constants (61 words, 16-bit word time, 12 data bits, 8 converter bits, device code 44) and the `timing_t` pulse bundle |
| `display_unit.sv` | top: wires all blocks as in the original block diagram |
| `device_selector.sv` | matches select code 44, turns IOP pulses into IOT pulses |
| `iot_control.sv` | FF1, FF2, FF4, the write flag, the MA-clear, load and skip decoding |
| `pulse_converter.sv` | flip-flop + delay pulse widener (used twice in `iot_control`) |
| `ac_gating.sv` | AC holding register feeding the input register's set inputs |
| `timing_unit.sv` | `master_clock`, `bit_counter` and `timing_decoder` |
| `word_counter.sv`, `ma_counter.sv` | the two 6-bit address counters |
| `compare_unit.sv` | equality at T0 with the write flag; sets COMP, cleared at T14 |
| `input_shift_register.sv` | 12-bit parallel-in, serial-out register, LSB first, cleared by shifting |
| `delay_line_store.sv` | 976-bit recirculating memory with the AND-OR entry gate |
| `output_shift_register.sv` | 12-bit serial-in, parallel-out register |
| `dac_gating.sv` | T13 transfer of the 8 low bits to the converter |
| `d_to_a_converter.sv` | behavioural model of the analogue converter |

### Top-level parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `CLK_DIV` | 50 | system clocks per bit time (5 µs at 100 ns) |
| `WORDS` | 61 | words in the serial memory; the memory has `16*WORDS` bits |
| `CODE` | 6'o44 | device select code |
| `STRETCH` | 25 | width of the widened MA-clear and write-set pulses, clocks |
| `AC_HOLD` | 30 | how long the AC copy is held, clocks (3 µs); keep below `CLK_DIV` |

## Simulating

Each block has a self-checking testbench in `tb/`, named `tb_<module>.sv`.
Each one prints `TB_RESULT checks=N failures=M` and stops on a watchdog if it
hangs. Any one can be run with plain Verilator:

```
verilator --binary --timing --assert --top-module tb_display_unit \
    -y rtl -y tb rtl/display_pkg.sv tb/tb_display_unit.sv
./obj_dir/Vtb_display_unit
```

`tb_display_unit` runs the whole unit at its default parameters, which takes
a few seconds. A small model of the processor runs the display program twice:
first a triangle table (255 falling to 0 and back, two periods over 61 words),
then a sawtooth that restarts half way. After each table the testbench waits
two recirculations. It then checks every word read from the memory, the
converter code and the converter voltage over a full sweep. It also checks
these timings:

* one sweep is exactly 976 bit times;
* each store ends within 976 + 16 bit times of the write flag going on;
* the MA counter advances once per word.

It counts each mechanism (MA clear, load, write flag, store, refused `6442`,
skip, sweep wrap) and fails if one never happens. The block testbenches
compare each block with an independent reference model, including a
976-entry reference array for the serial memory.

## Where this model departs from the original, and what it leaves out

* Synchronous single-clock model. Pulse widths, voltage levels (−3 V/0 V DEC,
  −6 V/0 V 3C) and the level converters are not modelled.
* The delay line is a shift register. Its analogue behaviour (attenuation,
  the need to reclock) is not modelled. The output flip-flop is the last
  shift stage.
* The load/skip gating follows the reading given above, not a gate-for-gate
  copy. In the original, the write flag is turned off by T13 gated with COMP.
* The converter has a holding register at its input, and its step is 1/255 of
  the range rather than 1/256, so that its end points are exactly 0 V and −10 V.
* Bit order: port bit 0 is the least significant bit. This is PDP-8 bit 11.
* Not included: the processor (core memory, memory buffer, instruction
  decoding, IOP generator, accumulator, skip bus); the −10 V reference; the
  oscilloscope. Brightness modulation is also left out, because the original
  only mentions that it was applied, not how.
