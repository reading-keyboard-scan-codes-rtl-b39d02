# PS/2 keyboard scan-code reader

A PC/AT keyboard does not send characters. It sends *scan codes*, one byte
per key event, over a two-wire serial link: a clock line it drives only while
it is sending, and a data line that is valid on each falling edge of that
clock. This design receives those bytes in an FPGA and shows them on two
displays of an XS/XStend prototyping board:

* the 8-segment LED bargraph shows the bit pattern of the last scan code;
* the right seven-segment digit shows `0`-`9` when the code is that of a
  digit key on the main key row, and `E` for any other code.

The whole circuit is four small blocks and runs in a single clock domain, the
board clock `sys_clk`. The keyboard clock is never used as a clock.

```
 kb_clk ──►┌─────────┐ kb_clk_s  ┌────────────────────┐ edge_found
           │ kb_sync │──────────►│ kb_clk_fall_detect │────────────┐
 kb_data ─►│         │ kb_data_s └────────────────────┘            ▼
           └─────────┘────────────────────────────────────►┌────────────────────┐
                                                            │ scancode_shift_reg │ sr[9:0]
                                                            └────────────────────┘
                              sr[7:0] ─► invert ─────────────────────► db[7:0]  (bargraph)
                              sr[7:0] ─► digit_seg_decoder ──────────► rsb[6:0] (right digit)
                              1 ──────────────────────────────► fcs, rlcs, rrcs, sdcs
```

## The PS/2 frame

Each byte travels in an 11-bit frame, one bit per keyboard clock period:

| bit | 0     | 1-8                        | 9           | 10       |
|-----|-------|----------------------------|-------------|----------|
|     | start (0) | data, least significant bit first | odd parity | stop (1) |

Both lines idle high. Keyboards clock at roughly 10-30 kHz; the exact rate
varies from keyboard to keyboard, which is why the receiver does not time
anything and only reacts to the clock's falling edges.

A key press sends the key's *make* code. A release sends the *break* code:
`F0` followed by the same make code. Keys of the extended set (cursor keys,
right Ctrl/Alt and so on) are prefixed by `E0`. Modifier keys are ordinary
keys with their own codes; for example Shift-A is `12 1C F0 1C F0 12`. The
receiver here does not interpret any of this: it simply shows every byte as
it arrives, so a key release shows `F0` and then the key's code again.

## How a frame is received

**Synchronisation (`kb_sync`).** Both keyboard lines are registered on the
rising edge of `sys_clk`, so the rest of the logic sees copies that change
only with the board clock. The default is one register per line, as in the
original board design. `STAGES` makes the chain longer if metastability is a
concern; each extra stage adds one cycle of latency and changes nothing else.

**Falling-edge detection (`kb_clk_fall_detect`).** The synchronised keyboard
clock is stored once more, and `edge_found = old & ~current`. That is high
for exactly one `sys_clk` cycle per falling edge and is used as a clock
enable.

**Shift register (`scancode_shift_reg`).** On each `edge_found` the
synchronised data bit enters bit 9 of a 10-bit register and every other bit
moves down one place. Because the data arrives LSB first, after the eleventh
(last) falling edge of a frame the start bit has been pushed out at the bottom
and the register holds

```
 sr[9] = stop   sr[8] = parity   sr[7:0] = scan code
```

This is the part of the design that is easiest to misread, so note what it
does *not* have: there is no bit counter, no "byte ready" flag, and no
parity or framing check. The register always holds the last ten bits seen on
the line. That is enough here because a frame is eleven bits long: as soon as
one complete frame has been shifted in, the register is aligned with it,
whatever was in it before. A missed or extra edge corrupts at most the frame
it happens in. The price is that the outputs are meaningful only between
frames.

**Displays.** The bargraph LEDs are active low, so `db = ~sr[7:0]` lights one
segment for every 1 in the scan code. The digit decoder is combinational. The
parity and stop bits stay in the register and are not shown. Neither display
is registered, so both follow the register while a frame shifts in (a brief
flicker over about a millisecond) and settle when the frame is complete.

**Chip selects.** `fcs`, `rlcs`, `rrcs` and `sdcs` are tied to 1. They
disable the other devices on the board that share these FPGA pins.

## Digit decoding

Only the ten digit keys of the main row are decoded (scan code set 2, the
default set of AT keyboards). The keypad digits have different codes and show
`E`.

| key | scan code | `rsb` (active low) |
|-----|-----------|--------------------|
| 1   | 16        | 1101101 |
| 2   | 1E        | 0100010 |
| 3   | 26        | 0100100 |
| 4   | 25        | 1000101 |
| 5   | 2E        | 0010100 |
| 6   | 36        | 0010000 |
| 7   | 3D        | 0101101 |
| 8   | 3E        | 0000000 |
| 9   | 46        | 0000100 |
| 0   | 45        | 0001000 |
| any other | –   | 0010010 (`E`) |

The patterns imply this wiring of `rsb` to the segments of the right digit:

```
 rsb[6]=a  rsb[5]=f  rsb[4]=b  rsb[3]=g  rsb[2]=e  rsb[1]=c  rsb[0]=d
```

With that order every row of the table draws its character. If your display
is wired differently, change the `SEG_*` constants in `kbd_pkg`.

## Timing

* **Latency.** A falling edge of `kb_clk` is caught by the first `sys_clk`
  rising edge after it, and the register shifts at the second. The complete
  scan code is on `db`/`rsb` two `sys_clk` cycles after the frame's last
  falling edge (plus one cycle per extra synchroniser stage), plus the
  combinational delay of the decoder.
* **Clock ratio.** Each high and low phase of `kb_clk` must last at least two
  `sys_clk` periods. At 25 MHz and a 30 kHz keyboard clock a phase is about
  417 periods, so there is a wide margin. Any board clock in the MHz range
  works.
* **Power-up.** There is no reset input. Every register has a declared
  initial value, which FPGAs load at configuration: synchroniser and
  edge-detector registers start at 1 (idle lines, so no false edge) and the
  shift register at 0. The display therefore starts with the bargraph dark
  and `E` on the digit. For an ASIC, or an FPGA without initial values, add a
  reset to these three registers.

## Ports of `keyb_reader`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `sys_clk` | in  | 1 | board clock |
| `kb_clk`  | in  | 1 | PS/2 clock from the keyboard |
| `kb_data` | in  | 1 | PS/2 data from the keyboard |
| `db`      | out | 8 | bargraph segments, active low |
| `rsb`     | out | 7 | right digit segments, active low |
| `fcs`, `rlcs`, `rrcs`, `sdcs` | out | 1 each | chip selects, held at 1 |

Parameter: `SYNC_STAGES` (default 1), the depth of `kb_sync`.

### Board pins (XS board with a Spartan-II XC2S50-TQ144)

| signal | pin(s) |
|--------|--------|
| `sys_clk` | P88 (through a global clock buffer) |
| `kb_clk`, `kb_data` | P31, P30 |
| `fcs`, `rlcs`, `rrcs`, `sdcs` | P41, P79, P80, P132 |
| `db[7:0]` | P67, P60, P62, P57, P49, P46, P44, P68 (`db[7]` first) |
| `rsb[6:0]` | P48, P42, P27, P29, P28, P40, P47 (`rsb[6]` first) |

These go in the FPGA tool's constraint file; the RTL carries no pin
attributes. The design uses 13 flip-flops and 22 I/O pins; the XC2S50-TQ144
has 1536 flip-flops and 92 user I/Os. The intended clock constraint is 25 MHz.

## Files

| file | contents |
|------|----------|
| `rtl/kbd_pkg.sv` | frame and register sizes, scan codes, segment patterns |
| `rtl/kb_sync.sv` | input synchroniser |
| `rtl/kb_clk_fall_detect.sv` | falling-edge strobe, with an assertion that it lasts one cycle |
| `rtl/scancode_shift_reg.sv` | 10-bit receive shift register |
| `rtl/digit_seg_decoder.sv` | scan code to seven-segment pattern |
| `rtl/keyb_reader.sv` | top level |
| `tb/ps2_keyboard_model.sv` | behavioural keyboard (transmit side only) used by the testbenches |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus two for the top |

## Simulating

Every testbench prints one line `TB_RESULT checks=N failures=M` and ends with
`$finish`. Run one with Verilator, for example the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  --top-module tb_keyb_reader -y rtl -y tb +libext+.sv -Irtl \
  rtl/kbd_pkg.sv tb/tb_keyb_reader.sv
./obj_dir/Vtb_keyb_reader
```

The simulator is two-state. The design does not depend on that, because
every register it reads has an initial value.

* `tb_kb_sync`, `tb_kb_clk_fall_detect`, `tb_scancode_shift_reg`: random
  stimulus against a reference model, cycle by cycle. The shift-register test
  also sends whole frames over a register holding random contents and checks
  that each one is received correctly.
* `tb_digit_seg_decoder`: all 256 codes. The expected patterns are built from
  the segment letters of each character, not copied from the decoder.
* `tb_keyb_reader` (default parameters, 25 MHz board clock, about 54 ms
  simulated, under a second of run time): 45 frames. It sends a hand-timed
  `4` frame, then a 10 kHz keyboard model types every digit's make and break
  codes, Shift-A, an `E0` extended key and a keypad digit, and then a 30 kHz
  model sends a few more. Every falling keyboard clock edge is checked to
  shift its bit in exactly two cycles later. After each frame the test checks
  both displays and the chip selects. It also counts that each digit, `E`,
  `F0`, `E0`, the fast clock and the mid-frame flicker were all seen.
* `tb_keyb_reader_key4`: a single `4` key frame at the reference timing, with
  a 10 kHz keyboard clock and an 83 ns (about 12 MHz) board clock.

## Limits and departures

* No parity, start- or stop-bit check and no byte-ready output, as described
  above. A corrupted frame is displayed as received.
* Receive only. The PS/2 link is bidirectional (the host can send commands,
  for example to set the keyboard LEDs), but that direction is not
  implemented. The inputs are plain inputs, not open-drain pins.
* The make/break/extended structure of the codes is not decoded. After a key
  is released the digit shows `E` briefly (while `F0` is displayed) and then
  the digit again.
* The synchroniser depth is a parameter here. The original design fixes it
  at one register.
