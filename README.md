# Programmable Delay Unit: sixteen timing pulses locked to a fiducial

A linear accelerator's timing system sends one clock to every crate: a 119 MHz
pulse train (period 8.4 ns) in which, now and then, one pulse is left out. That
missing pulse is the *fiducial*, the time reference for one machine cycle. The
Programmable Delay Unit (PDU) is a CAMAC module that turns each fiducial into
sixteen output pulses. Each pulse starts a programmable number of 8.4 ns clock
periods after the fiducial and lasts eight clock periods. Which delay a channel
uses can change from one machine cycle to the next, following the beam pattern
that the control computer announces in advance.

This repository holds synthesizable SystemVerilog for the digital part of such a
module:

- the fiducial detector;
- the controller that loads the delays after every fiducial;
- the three memories that choose the delays;
- the Eight Channel Alarm Clock (ECAC), a gate array that makes the pulses, two
  of which are used;
- a self-checking testbench for every block and one for the whole module.

The structure, memory sizes, word widths and the ECAC's logic follow a published
description of the SLAC PDU II. The CAMAC reply timing, part of the command
set, the synchronisation details and a few reset values are this
implementation's own choices. They are listed under
[Where this RTL departs from the original](#where-this-rtl-departs-from-the-original).

## What happens at a fiducial

```
 FIDO train ──► fiducial_detect ──► pdu_controller ──► ECAC reset, outputs off
                                         │
   channel pointer c (4 bits) ───────────┼───────────────────────────────┐
        │                                │                               │
        ▼                                ▼                               ▼
 mode_select_ram ──mode(3)──► pattern_ram ──index(8)──► {index,c} ──► pattern_timing_table
   16 x 3                       7 x 8                     12 bits          4K x 20
                                                                              │ delay(20)
                                                    latch line c ──► ECAC[c/8], channel c%8
```

1. **Detect.** `fiducial_detect` sees the missing pulse. The controller
   synchronises it to the clock and pulses `ecac_reset`. This clears the 20-bit
   counter that both ECACs use to measure time since the fiducial, and drops
   the common output enable.
2. **Program.** For c = 0 … 15 the controller sets the channel pointer to c.
   The pointer selects channel c's 3-bit mode in `mode_select_ram`. The mode
   addresses `pattern_ram`, which returns an 8-bit row index. The table address
   is {row index, c}, and the 20-bit word there is loaded into ECAC channel c
   through that channel's own latch line. Each channel takes two clocks.
3. **Finish.** The three Pattern Input Registers are overwritten with the
   standby row FF and the Time Slot Counter advances modulo 36. The channel
   pointer gets back the value it had before the fiducial, and the outputs are
   enabled. In the testbench, the time from the missing pulse to output enable
   is 37 clocks: 0.31 µs at 119 MHz, or 4.6 µs if the module runs from an
   8 MHz clock. The original module's budget is 12 µs.
4. **Fire.** The ECAC counter has been running since the reset. Each channel's
   output goes high when the counter reaches the channel's delay and stays high
   for eight clocks.

A delay shorter than the programming time (about 35 counts) is loaded too late
to fire in the same cycle. Real timing tables use delays far longer than that.

### Choosing a row: modes, pattern registers and the slot counter

The table holds 256 rows of 16 delays. Each channel's mode picks, per channel,
where its row index comes from. The mode is used directly as the address of the
7 × 8 `pattern_ram`:

| mode / word | contents | changed by |
|---|---|---|
| 0 | upper byte of the table pointer (used for CAMAC access) | CAMAC, pointer increment |
| 1, 2, 3 | Pattern Input Registers 1–3: the beam pattern of the coming machine cycles | CAMAC; set to FF after every programming cycle |
| 4 | Time Slot Counter, 0 … 35 | CAMAC; +1 mod 36 after every programming cycle |
| 5 | constant FF: the standby row | — |
| 6 | spare, reads FF | — |

A channel in a pattern-register mode therefore uses the announced row once. It
falls back to the standby row FF until the computer writes the register again.
A channel in slot-counter mode steps through rows 0 … 35 on successive
fiducials.

## The Eight Channel Alarm Clock

This is the part worth reading closely (`rtl/ecac.sv`, `rtl/ecac_channel.sv`,
`rtl/ecac_counter.sv`).

Each ECAC is one free-running counter shared by eight channels. A channel holds
a 20-bit delay D and does not compare all 20 bits every clock. It compares in
two stages:

- a **3-bit equality** of the counter's low bits with D[2:0], true once every
  eight clocks;
- at each such instant, the **17-bit equality** of the upper bits is captured
  in the output flip-flop.

The flip-flop turns on at the 3-bit match where the upper bits also agree,
which is when the counter equals D. It turns off at the next 3-bit match,
eight clocks later, when the upper bits no longer agree. The eight-clock pulse
width therefore needs no extra logic. The structure works like the match lines
of a content-addressable memory: the counter is built once and each channel
adds only two comparators and a flip-flop.

```
counter (changes on ↑clk)   D-1 │  D  │ D+1 │ ... │ D+7 │ D+8 │
3-bit match                      ‾‾‾‾‾                   ‾‾‾‾‾
out (captured on ↓clk)             ‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾
```

In the original chip the 3-bit match, ANDed with the inverted clock, *is* the
clock of the output flip-flop. Here the flip-flop is clocked on the falling
edge with the 3-bit match as its enable, which samples at the same instant
without a gated clock. The output is ANDed with the common output enable and
driven as a true/complement pair, standing in for the differential ECL output.

`timeout` is counter bit 18 AND bit 17. It first rises 3 · 2¹⁷ = 393 216 clocks
(3.30 ms) after a reset. That is longer than the spacing of fiducials in normal
operation, so a raised `timeout` means fiducials have stopped arriving. The
controller latches it as the "fiducial missing" status.

### The counter and its test inputs

The original counter consists of five 4-bit ripple counters. The carry into
each upper section is held in a flip-flop, which avoids a long carry chain at
119 MHz. `ecac_counter` keeps the five sections and their terminal-count
(=15) terms, and uses them as synchronous count enables. The count is the same
plain binary count at every edge. Two test inputs let a tester preload the
counter after a reset instead of waiting up to 2²⁰ clocks:

- `candh` stops ordinary counting while it is high. The first clock edge that
  sees it high adds one.
- `test[k]` (TEST k+1) adds one to section k+1 alone, without carry, on the
  first edge that sees it high.

For example, holding `candh` high for 20 clocks while pulsing `test[0]` once
advances the counter by 1 + 16 = 17 instead of 20. The top-level testbench
checks this.

## Finding the fiducial

`fiducial_detect` is one flip-flop. Its D input is the FIDO line. Its clock is
the FIDO line inverted and delayed by about 7 ns, so it samples the line 7 ns
after every falling edge. With an 8.4 ns period the next pulse has normally
begun by then, and the flip-flop stores 1. After a missing pulse the line is
still low, and the inverted output `fid_det` goes high for about two periods.

The 7 ns delay is an analog part and is not in the RTL. Its output enters the
top as `fido_dly_n`. The testbenches model it as a second copy of the pulse
train, inverted and shifted by 7 ns. `fid_det` is asynchronous. The controller
passes it through two flip-flops and takes its rising edge. The ECAC counters
are reset 3 clock edges after the first edge that follows the missing pulse.

## CAMAC interface

The dataway is reduced to a command strobe. For one clock the module is given
`cmd_valid` and a `camac_cmd_t` with fields F (5 bits), A (4 bits) and W
(24 bits). One clock later it answers with `rsp_valid` and a `camac_rsp_t`
with fields R (24 bits), Q and X. A table read answers two clocks later. While
the table is being filled after reset, or while a programming cycle runs,
commands are answered Q = 0 and not executed.

| command | action | origin |
|---|---|---|
| F(16) A(0) | write table word at pointer, pointer + 1 | original |
| F(0) A(0) | read table word at pointer, pointer + 1 | original |
| F(17) / F(1) A(0) | write / read the 12-bit table pointer {row, channel} | original |
| F(17) / F(1) A(1) | write / read the mode of the channel at the pointer | original |
| F(19) A(8–11) | write PIR1, PIR2, PIR3, slot counter | original |
| F(1) A(8–11) | read them back | this design |
| F(1) A(2) | status {int. clock, outputs on, busy, fiducial missing, fiducial seen} | this design |
| F(9) A(2) | clear the two latched status bits | this design |
| F(25) A(0) | generate a fiducial (for standalone tests) | function original, code this design |
| F(26) / F(24) A(0) | select / deselect the internal 8 MHz clock | function original, code this design |

The low 4 bits of the table pointer are the same register as the channel
pointer of the data-flow diagram. This is why the programming cycle, which
steps that register through 0 … 15, has to restore it afterwards. Writing a
whole table row is 16 consecutive F(16) commands. The pointer carries into the
row byte after channel 15.

After reset (`rst`: power-up or CAMAC Z) the table fills itself with all ones,
one word per clock, for 4096 clocks. An all-ones delay lies past the counter's
timeout, so an unprogrammed channel never fires.

## Ports of the top, `pdu_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | module clock: the 119 MHz FIDO clock, or the 8 MHz internal clock chosen by the board |
| `rst` | in | 1 | synchronous reset: power-up or CAMAC Z |
| `fido`, `fido_dly_n` | in | 1, 1 | pulse train, and its inverted 7 ns-delayed copy |
| `cmd_valid`, `cmd` | in | 1, 33 | CAMAC command |
| `rsp_valid`, `rsp` | out | 1, 26 | CAMAC reply |
| `candh`, `test` | in | 2, 2×4 | counter test inputs of each ECAC |
| `oclk`, `oclk_n` | out | 2, 2 | buffered clock from each ECAC for the backplane |
| `out`, `out_n` | out | 16, 16 | the delayed pulses; channels 0–7 from ECAC 0, 8–15 from ECAC 1 |
| `int_clk_sel` | out | 1 | to the board's clock selector |
| `fid_seen`, `fid_missing`, `busy` | out | 1 each | status |

The sizes are in `rtl/pdu_pkg.sv` and as module parameters. All defaults are
the original module's: 16 channels, 20-bit delays, 4K × 20 table, 16 × 3 mode
RAM, 7 × 8 pattern RAM, slot counter modulo 36.

## Where this RTL departs from the original

- **No gated clocks.** The original uses gated clocks, in the ECAC
  output flip-flop and the counter's ripple sections. This design uses clock
  enables on `clk`: rising edges everywhere, except the ECAC output flip-flops,
  which take the falling edge.
- **Registers for latches.** The ECAC's 20-bit delay latches are registers
  loaded on a clock edge.
- **Synchronous resets.** The ECAC's RESET and the module reset are
  synchronous.
- **Latch lines.** The original data-flow diagram shows a 3-bit address going
  to each ECAC. The chip description says each channel has its own latch line.
  This design follows the chip description. The 3-bit channel number is decoded
  into eight latch lines outside the ECAC, in the controller.
- **Table initial value.** The original module is described as filling its
  table with `FFFF` hex, but its words are 20 bits wide. This design fills
  them with all ones (`FFFFF`), so that an unprogrammed channel never fires.
- **Not built.** The 7 ns delay line, the 8 MHz oscillator and the clock
  selector, and the ECL line drivers and receivers are analog or board parts.
  Their signals appear as ports.
- **Simplified CAMAC.** CAMAC is reduced to the strobe interface above; there
  is no LAM.
- **This design's choices.** The pattern RAM word layout, the spare word, the
  reset values of the pattern RAM (pointer 0, pattern registers FF, slot
  counter 0) and the two-clock-per-channel sequencer.

## Files

| file | contents |
|---|---|
| `rtl/pdu_pkg.sv` | sizes, pattern RAM word enum, CAMAC codes, command/reply structs |
| `rtl/pdu_top.sv` | the module: wires everything as in the data-flow diagram |
| `rtl/pdu_controller.sv` | CAMAC decoding, pointer, programming sequencer, status |
| `rtl/mode_select_ram.sv`, `rtl/pattern_ram.sv`, `rtl/pattern_timing_table.sv` | the three memories |
| `rtl/ecac.sv`, `rtl/ecac_channel.sv`, `rtl/ecac_counter.sv` | the alarm clock chip |
| `rtl/fiducial_detect.sv` | missing-pulse detector |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_pdu_beam_matrix.sv` | whole-table run: all 256 rows, all 36 time slots |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Each also has a
watchdog that counts a failure if the run hangs. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl \
          rtl/pdu_pkg.sv tb/tb_pdu_top.sv --top-module tb_pdu_top -o sim
./obj_dir/sim
```

Replace `tb_pdu_top` with any other testbench name. The top-level test runs the
module at full size, with about 400 000 clocks including the wait for the
missing-fiducial timeout, in under a second. It checks the following:

- every channel's pulse position, to the clock, and its width, for three
  fiducials (two from the pulse train, one from CAMAC);
- the row each mode selects;
- the resetting of the pattern registers and the slot counter's wrap from 35
  to 0;
- pointer auto-increment, carry and restore;
- command rejection while busy;
- the `candh`/`test` counter controls;
- the timeout status;
- that each of these mechanisms actually occurred.

`tb_pdu_beam_matrix` exercises the full table. It writes and reads back all
4096 words and fires 123 fiducials. Over these fiducials the slot counter
steps through all 36 slots, and the pattern registers walk all 256 rows. Every
pulse is checked against the formula that filled the table.

The block testbenches compare against independent models: an integer counter
model, the pulse rule, an array model of each memory, and a recorder in place
of the ECACs.

## How far to trust it

- **Tested.** Every block passes its own testbench, and the module passes the
  end-to-end test at full size. For every testbench, a deliberately broken copy
  of its block was run to confirm that the checks catch a real fault.
- **Not tested.** Timing on real silicon or an FPGA, and the analog front end.
  The testbenches drive the FIDO train only with ideal edges.
- **Not from the original.** The CAMAC reply timing and the codes marked "this
  design" are inventions. Check them against the real crate controller before
  reuse.
