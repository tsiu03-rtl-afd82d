# PS/2 keyboard decoder with 7-segment output

This design reads a PS/2 keyboard and shows the result on board LEDs and
7-segment displays. It displays:

- the last complete scan code on ten red LEDs: `LEDR[9]` = release (F0) flag,
  `LEDR[8]` = extended (E0) flag, `LEDR[7:0]` = the last byte;
- the last digit key typed (0..9 on the row above the letters) on `HEX0`,
  or the letter **E** when the last key was anything else;
- a two-digit group number on `HEX7` (tens) and `HEX6` (units).

The design is small. The interesting part is how it finds the byte
boundaries in the PS/2 bit stream without a bit counter. This is explained
in the next section.

## How a PS/2 keyboard talks

The keyboard drives two open-collector lines, `PS2_CLK` and `PS2_DAT`. Both
are high when idle. A byte is sent as an 11-bit frame. The keyboard makes
the clock (about 10–20 kHz, a period of 50–100 µs). Each bit is valid on a
falling clock flank:

| bit | meaning                              |
|-----|--------------------------------------|
| 0   | start bit, always 0                  |
| 1–8 | data D0..D7, least significant first |
| 9   | parity (odd)                         |
| 10  | stop bit, always 1                   |

A key press sends a *make code*. A release sends a *break code*. In scan-code
set 2 (the power-on default), a make code is one byte, sometimes preceded by
`E0` for "extended" keys. The break code is the same byte preceded by `F0`,
placed after the `E0` if there is one. Examples:

| key        | make   | break      |
|------------|--------|------------|
| 1          | 16     | F0 16      |
| keypad 4   | 6B     | F0 6B      |
| left arrow | E0 6B  | E0 F0 6B   |
| left Ctrl  | 14     | F0 14      |
| right Ctrl | E0 14  | E0 F0 14   |

## Structure

```
PS2_CLK ─┐  ps2_sync      ps2_byte_rx        scancode_asm        ┌─ LEDR[9:0]
PS2_DAT ─┴─► 3 flops  ──► 10-bit shift  ──►  E0/F0 flags,   ─────┤
            + edge det.   register,          10-bit register     └─► scancode_to_seg7 ─► HEX0
          bit, bit_en     byte, byte_en      scancode, scancode_en
GROUP_NUMBER ─► digit_to_seg7 ×2 ─► HEX7, HEX6
```

Each stage passes data forward with a one-cycle *enable* pulse and no
back-pressure. Downstream stages therefore act once per bit, once per byte
and once per scan code, and they count nothing twice.

### Part 1: synchronising the lines and detecting flanks (`ps2_sync`)

One flip-flop samples each line on the system clock (`ps2_clk2`, `ps2_dat2`).
A second flip-flop delays the clock sample (`ps2_clk2_old`). Then

    ps2_bit_en = ps2_clk2_old & ~ps2_clk2      // 1 → 0 seen
    ps2_bit    = ps2_dat2

This gives one pulse per falling flank, one system clock cycle long. The data
sample comes from the same clock edge, so it is the bit that was on the line
at the flank. The keyboard is never clocked directly. A `falling_edge(PS2_CLK)`
design would make PS2_CLK a second clock and bring in its glitches.

These three flip-flops have no reset. Both lines idle high, so the flip-flops
settle within two cycles, while the rest is still held in reset. Only one
synchronising stage is used. If your board needs metastability hardening, add
a second stage in front of `ps2_clk2`/`ps2_dat2`. This adds one cycle of
latency and changes nothing else.

### Part 2: bits to bytes without a counter (`ps2_byte_rx`)

The shift register is ten bits wide and rests at **all ones**. Each
`ps2_bit_en` shifts the new bit in at bit 9 and moves everything one place
right. The start bit is the only guaranteed 0 in a frame. It enters first, so
after ten shifts (start, D0..D7, parity) it has reached bit 0:

| after flank | sr9 | sr8 | sr7 … sr2 | sr1 | sr0 |
|-------------|-----|-----|-----------|-----|-----|
| 1 (start)   | 0   | 1   | 1 … 1     | 1   | 1   |
| 2 (D0)      | D0  | 0   | 1 … 1     | 1   | 1   |
| 9 (D7)      | D7  | D6  | D5 … D0   | 0   | 1   |
| 10 (parity) | P   | D7  | D6 … D1   | D0  | **0** |
| +1 cycle    | 1   | 1   | 1 … 1     | 1   | 1   |

So

    ps2_byte    = shiftreg[8:1]
    ps2_byte_en = ~shiftreg[0]

While `ps2_byte_en` is high, the next clock edge reloads all ones, so the
enable lasts exactly one cycle. The stop bit then shifts a 1 into a register
of ones and changes nothing. The parity bit lands in bit 9 and is ignored.
The register needs no counter and no state machine.

Two consequences follow:

- **No framing check.** A wrong parity or a missing stop bit goes unnoticed.
- **No resynchronisation.** Suppose the register falls out of step with the
  frames, for example after a reset or a glitch in the middle of a byte. It
  then stays out of step until a bit pattern happens to realign it, because
  there is no idle timeout. A hardened version would reload all ones after
  about 100 µs with no flank (5000 cycles at 50 MHz). This design does not do
  that.

`rstn` loads all ones asynchronously. `ps2_byte_en` does so synchronously,
and it wins if a bit arrives in the same cycle. That cannot happen with a
real keyboard, because bits are hundreds of cycles apart.

### Part 3: bytes to scan codes (`scancode_asm`)

Two flags remember the prefixes. On each `ps2_byte_en`:

- `E0` sets the E0 flag;
- `F0` sets the F0 flag;
- any other byte loads `scancode = {F0 flag, E0 flag, byte}`, clears both
  flags and pulses `scancode_en` for one cycle.

A multi-byte code such as `E0 F0 14` (right Ctrl released) is reported once,
as `{1, 1, 14h}`. The outputs change only when a code is complete, so the LEDs
and HEX0 do not flicker while bits arrive. The scan code is a packed struct
`scancode_t {f0, e0, code}` in `kb_pkg`. The flags, the scan code and
`scancode_en` reset to 0.

The top level brings `scancode_en` out as a port. Nothing in this design
consumes it, but it is the hook for any logic that should act once per key
event.

### The displays (`scancode_to_seg7`, `digit_to_seg7`)

Segment *i* of a display is driven by bit *i*. The numbering is 0 top,
1 upper right, 2 lower right, 3 bottom, 4 lower left, 5 upper left,
6 middle. The LEDs are **active low**: a 0 lights a segment. Written
`HEX[6:0]`, the digit 5 is `0010010`.

| key | make code | HEX[6:0] |
|-----|-----------|----------|
| 1   | 16        | 1111001  |
| 2   | 1E        | 0100100  |
| 3   | 26        | 0110000  |
| 4   | 25        | 0011001  |
| 5   | 2E        | 0010010  |
| 6   | 36        | 0000010  |
| 7   | 3D        | 1111000  |
| 8   | 3E        | 0000000  |
| 9   | 46        | 0010000  |
| 0   | 45        | 1000000  |
| other | —       | 0000110 (E) |

`scancode_to_seg7` looks only at the byte. A digit's break code therefore
still shows the digit. The keypad digits have other codes and show **E**.
`digit_to_seg7` holds the same ten patterns and drives HEX7/HEX6 from the
`GROUP_NUMBER` parameter, so those two outputs are constant.

## Timing

Let the tenth falling flank of `PS2_CLK` (the parity bit) fall between clock
edges *k−1* and *k*:

| edge  | what happens                                         |
|-------|------------------------------------------------------|
| k     | `ps2_clk2` goes 0 → `ps2_bit_en` high                |
| k+1   | parity bit shifted in → `ps2_byte_en` high           |
| k+2   | `scancode`/`LEDR`/`HEX0` update, `scancode_en` high  |

The total is three clock edges, 60 ns at 50 MHz. A PS/2 bit lasts at least
2500 cycles at 50 MHz, so the design has far more margin than it needs at any
practical system clock.

## Top level `lab2_kb`

| port        | dir | width | meaning                                 |
|-------------|-----|-------|-----------------------------------------|
| rstn        | in  | 1     | asynchronous reset, active low          |
| clk         | in  | 1     | system clock (50 MHz on the target board) |
| PS2_CLK     | in  | 1     | PS/2 clock line                         |
| PS2_DAT     | in  | 1     | PS/2 data line                          |
| HEX0        | out | 7     | last digit, active low                  |
| LEDR        | out | 10    | `{F0, E0, byte}` of the last scan code  |
| HEX7, HEX6  | out | 7     | group number, tens and units            |
| scancode_en | out | 1     | one-cycle pulse per new scan code       |

Parameter: `GROUP_NUMBER` (default 86), 0..99.

After synthesis, the whole design is 26 flip-flops and a few dozen
word-level cells.

## Where this departs from a minimal lab solution

- The port names, the widths, the three-part split and all codes and segment
  patterns are those of the original exercise. These choices are this
  design's own:
  - the asynchronous reset of the scan-code register and its flags;
  - `scancode_en` as a registered pulse, brought out as a port;
  - the group number as a parameter driving a digit encoder, instead of two
    hard-wired constants;
  - **E** for digit-encoder inputs 10..15.
- An earlier, simpler form of the same exercise is not provided. In that form
  an always-shifting 10-bit register is decoded continuously, from
  `shiftreg[7:0]`, and the outputs flicker during a byte.
- An optional refinement is not implemented: blanking HEX0 while no key is
  held.
- Data cannot be sent *to* the keyboard, for example to set its LEDs.

## Files

`rtl/` (synthesizable, one unit per file):

- `kb_pkg.sv`: types (`seg7_t`, `ps2_byte_t`, `scancode_t`) and the code and
  segment constants.
- `ps2_sync.sv`, `ps2_byte_rx.sv`, `scancode_asm.sv`,
  `scancode_to_seg7.sv`, `digit_to_seg7.sv`: the blocks above.
- `lab2_kb.sv`: the top level.

`tb/` (self-checking; each prints `TB_RESULT checks=N failures=M`):

- `ps2_keyboard_model.sv`: behavioural keyboard. It sends 11-bit frames with
  odd parity and can send a frame with wrong parity.
- `ps2_sync_tb.sv`: random line activity against a cycle model; counts one
  enable per falling flank; checks the latency.
- `ps2_byte_rx_tb.sv`: random bytes and parity bits. Checks one byte enable,
  in the cycle after the tenth bit, for each frame, and reset in the middle
  of a frame.
- `scancode_asm_tb.sv`: make and break codes with and without E0, plus random
  byte streams, against a reference model.
- `scancode_to_seg7_tb.sv`, `digit_to_seg7_tb.sv`: exhaustive, against
  patterns built from lists of lit segments.
- `lab2_kb_tb.sv`: end to end at default parameters, with a 5 MHz system
  clock and a 20 kHz PS/2 clock. It checks:
  - keys 1..9, 0 at 2 ms intervals;
  - key 4, with the correct and with a wrong parity bit;
  - the make and break codes of the table above, plus P, keypad 3 and page
    down;
  - reset between a prefix and its final byte;
  - LEDR never changes without `scancode_en`;
  - the three-edge latency for every byte;
  - that every mechanism occurred.
- `lab2_kb_key4_tb.sv`: one key-4 frame with a slow, asymmetric PS/2 clock:
  100 µs per bit, with the clock low from 10 to 35 µs.

## Simulating

With Verilator 5 (the testbenches use timing controls):

```sh
verilator --binary --timing --assert --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv --top-module lab2_kb_tb \
  rtl/kb_pkg.sv tb/lab2_kb_tb.sv -o sim
./obj_dir/sim
```

Replace `lab2_kb_tb` with any other testbench name to run that test. Each
test finishes in well under a second. Lint the RTL with
`verilator --lint-only -Wall -y rtl rtl/kb_pkg.sv rtl/lab2_kb.sv`. The only
remaining warnings are package constants that a given module does not use.
