# FLATS run-time watermark controller

Someone who can edit an FPGA's configuration after synthesis can leave the
bitstream's format intact and still change what it does. They can rewrite a
LUT's truth table, re-route a switch matrix, or hide extra logic in LUTs the
design does not use. Checking the configuration with a hash does not help if
that check can itself be tampered with. FLATS ("filling logic and testing
spatially") answers with a physical check. Every LUT, used or not, gives up one
input and one output. These are wired together into a loop, so that the LUT can
become a small ring oscillator. An on-chip controller switches one such
oscillator on and off at a slow, exactly known rate, such as 1 Hz. An infrared
camera looking at the back of the die, followed by lock-in analysis, finds the
warm spot that blinks at that rate. Its distance to a few reference
oscillators ("beacons") is then compared with the distance expected from
place and route.

The oscillator's truth table is chosen so that it can only run in a given
state of the protected logic. So the camera shows three things at once: that
the LUT is where it should be, that it is still wired to the signals it
should see, and that its truth table has not been replaced.

This repository holds the on-chip side of that scheme as SystemVerilog, around
a three-LUT example design, `Z = (A & B & C) ^ D`. It also holds testbenches
that run everything with plain Verilator.

## How a LUT becomes an oscillator

`rtl/flats_lut42.sv` models a 4-input, 2-output LUT with run-time loadable
truth tables. Each output is one bit of a 16-bit table, indexed by
`{I4, I3, I2, I1}`. It is a behavioural model with a propagation delay
(`DELAY_PS`, default 1667 ps). In silicon the LUT is a fabric primitive, not
logic to synthesize.

In every protected LUT, O1 is wired back to I1. Take the truth table 0x0400.
Only bit 10 (`4'b1010`) is set, so:

    O1 = !I1 & I2 & !I3 & I4

Suppose I4, I3, I2 are 1, 0, 1. Then O1 = !I1: the loop inverts and
oscillates. With two LUT delays per period, that is about 300 MHz. For any
other input value, O1 rests at 0. Loading 0x0000 turns the oscillator off
whatever the inputs are. That is the state of every idle oscillator LUT.

In general a table makes the loop oscillate at the current inputs when the
two table bits that differ only in I1 are `1` (for I1 = 0) and `0` (for
I1 = 1). If both bits are equal, O1 is a constant. If the pattern is
reversed, O1 is a latch. The design's own function lives on O2. It never
depends on I1, so loading any table into O1 cannot disturb it.

## The sequence

Which LUT to use, which truth table to load, and how fast to blink are
packed into a 24-bit *sequence* (`flats_pkg::seq_t`):

| bits  | field  | meaning                                                      |
|-------|--------|--------------------------------------------------------------|
| 23:20 | `lut`  | LUT number (the example uses 1 = LUTA, 2 = LUTB, 3 = LUTN)    |
| 19:4  | `init` | O1 truth table loaded while the oscillator is on              |
| 3:0   | `div`  | pulsing at 16 Hz / `div`; 0 means 16, which gives 1 Hz        |

In this layout, 0x104008 means LUT 1, table 0x0400, 16/8 = 2 Hz.

The sequence is not supplied directly. `flats_lfsr_seq` computes it from the
chip identifier (`ecid`, 16 bits) and a 16-bit user input:

* the LFSR is seeded with `{ecid, user_in[15:8]}`;
* it then runs for `user_in[7:0]` clocks;
* its frozen state is the sequence.

The LFSR uses the polynomial x^24+x^23+x^22+x^17+1 in Fibonacci form, shifting
toward the MSB. An all-zero seed is replaced by 1. `seq_valid` rises
`user_in[7:0] + 1` cycles after the start pulse.

Because the chip identifier enters the seed, the same user input selects
different oscillators on different chips. An observer therefore cannot learn
which user input drives which LUT. Registering a chip means searching, off
line, for user inputs whose sequences select the wanted beacons and
authenticators. It is the same LFSR run in software. The testbenches do this
search in their `find_user` / search loops.

## Pulsing by rewriting truth tables

The controller has no separate enable wire into the LUTs. Configuration
writes through the FPGA's internal configuration access port (ICAP) are the
only path from the controller to the LUTs. So the controller turns the
oscillator on by loading the sequence's truth table, and off by loading
0x0000. `flats_ctrl` runs one activation:

1. **start** (in IDLE): the protected design is paused and the sequencer is
   started (`lfsr_start`).
2. **sequence valid**: the sequence is latched, and `flats_pulse_div` starts
   with the sequence's divisor.
3. **each phase change**: the divider's phase starts at 1 (on) and toggles
   every `div` ticks of 32 Hz. At each change the controller has
   `flats_icap_writer` load either `init` or 0x0000 into LUT `lut`. If the
   phase changes during a write, the new value is written right after it.
   The controller only compares the wanted state with the state last written.
4. **stop**: pulsing ends. If the LUT is still on, it is cleared. The design
   is then released and the controller returns to IDLE.

Every on and off phase lasts exactly `div × CLK_HZ/32` cycles. The ICAP write
adds the same 12-cycle delay to both edges, so the duty cycle stays exactly
50 %. Lock-in analysis relies on this exact frequency. Unlike the
oscillator's own frequency, it does not drift with voltage or temperature.

The ICAP packet (12 words, one per clock, `icap_csib` low, `icap_rdwrb` low)
uses the 7-series Type-1 packet headers:

    FFFFFFFF  AA995566  20000000  30008001 00000001 (WCFG)
    30002001 FAR_BASE+lut  30004001 {16'h0,init}  30008001 0000000D (DESYNC)  20000000

**This packet is a stand-in.** A real device writes whole configuration frames.
It must read, modify and write back the frame that holds the LUT, because
neighbouring LUTs share that frame. It must put the 16 (or 64) INIT bits at
device-specific positions, and bit-swap each byte for ICAP. That mapping is
device data and is not modelled. `FAR_BASE + lut` stands in for the real frame
address. The writer's interface (LUT number, INIT value, start, busy, done)
is what a real frame writer would need, so it can be swapped in.

## Pausing the design

Whether the chosen oscillator may run depends on the protected logic's
state. That state must not move while the camera integrates. `flats_clk_gate`
is a latch-plus-AND clock gate. The enable passes the latch while `clk` is low,
so the gated clock never has a short pulse. Lint tools report that latch; it
is intended. The controller holds `design_en` low from the start pulse until
the LUT has been cleared after stop. On an FPGA, a global clock buffer with
enable would do the same job.

## The example design

`flats_example_design` is the three-LUT example after insertion:

| LUT          | I4 | I3 | I2      | I1     | O2 (design)        | O1                   |
|--------------|----|----|---------|--------|--------------------|----------------------|
| LUTA (1)     | C  | B  | A       | O1     | I2&I3&I4 (0xC000)  | oscillator           |
| LUTB (2)     | 1  | 1  | own O2  | O1     | loaded table (0x0) | oscillator (filler)  |
| LUTN (3)     | 1  | D  | LUTA.O2 | O1     | I2^I3 (0x3C3C) = Z | oscillator           |

LUTB is a LUT the design did not use. It was filled so that nothing can be
hidden in it. Both its outputs loop back, and its spare inputs are tied to 1.

The design's state is a register stage on A..D, clocked by the gated clock.
With the table 0x0400 loaded into LUTA, LUTA blinks only if the paused design
holds A, B, C = 1, 0, 1. A changed table, a re-routed input or a moved LUT
changes whether, and where, the spot appears.

`osc_probe = {LUTN.O1, LUTB.O2, LUTB.O1, LUTA.O1}` brings the oscillator nodes
out for simulation and for measuring with a scope.

## Top level: `flats_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | system clock; asynchronous active-low reset |
| `ecid` | in | 16 | chip identifier (from the device's ID primitive) |
| `user_in` | in | 16 | user input selecting the sequence |
| `start`, `stop` | in | 1 | one-cycle commands |
| `a`,`b`,`c`,`d` / `z` | in/out | 1 | the example design |
| `icap_csib`, `icap_rdwrb`, `icap_i` | out | 1,1,32 | ICAP write port |
| `cfg_init_o1` | in | 3×16 | O1 tables of LUTA/B/N, as held in configuration memory |
| `cfg_init_o2b` | in | 16 | O2 table of LUTB |
| `seq`, `seq_valid` | out | 24,1 | current sequence |
| `osc_phase`, `osc_toggle` | out | 1 | pulsing waveform and its change pulse |
| `icap_done`, `lut_on`, `paused`, `active` | out | 1 | status |
| `osc_probe` | out | 4 | oscillator nodes |

The ICAP primitive and the configuration memory belong to the FPGA. So the
write port leaves the top, and the truth tables come back in on
`cfg_init_o1` / `cfg_init_o2b`. In the testbenches,
`tb/tb_icap_cfg_model.sv` closes that loop: it decodes the packets and holds
the tables.

Parameters:

* `CLK_HZ` (default 100 MHz, a chosen value);
* `BASE_HZ` (16);
* `LUT_DELAY_PS` (1667).

With other clocks the prescaler is `CLK_HZ/(2·BASE_HZ)`. Keep it at least 13
cycles, so that a truth-table write finishes within one phase.

## Simulation

All testbenches are self-checking. Each ends with a line
`TB_RESULT checks=N failures=M`. Build and run any of them with:

    verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
        --top-module tb_flats_top rtl/flats_pkg.sv tb/tb_flats_top.sv
    ./obj_dir/Vtb_flats_top

Delays use explicit units, so the timescale only sets the default.

| testbench | what it shows |
|-----------|---------------|
| `tb_flats_lfsr_seq` | sequences against a reference LFSR; latency `user_in[7:0]+1`; zero-seed guard |
| `tb_flats_pulse_div` | on and off phases of exactly `div`×tick cycles for all 16 divisors; stop clears |
| `tb_flats_clk_gate` | gated edges exactly where enabled; no pulse while clk is low; glitches on en filtered |
| `tb_flats_icap_writer` | the 12-word packet, its timing, `done`; start while busy ignored |
| `tb_flats_ctrl` | controller against models of its neighbours; phase changes during writes; stop while idle, computing and pulsing |
| `tb_flats_lut42` | LUT delay; the 0x0400 oscillator runs only at I4..I2 = 101, at 300 MHz |
| `tb_flats_example_design` | Z correct whatever tables are loaded; pause holds state; each oscillator's dependence on design state |
| `tb_flats_top` | end to end at a 3200 Hz clock: 24 activations over all three LUTs, counting each mechanism |
| `tb_flats_top_full` | one activation at default parameters: 16 Hz pulsing, 18.75 million oscillator edges in the 1/32 s on phase |
| `tb_flats_pulse_1hz` | default parameters, divisor 0: one full 1 Hz period (100 million cycles), about a minute of run time |

`tb_flats_top` counts each mechanism: sequences computed, pauses, ICAP
packets, on phases with oscillation, on phases in which the design state
blocked it, off phases, and resumes. It fails if any count stays at zero.

## Where this departs from the published scheme, and what is missing

* **Chosen here; not given by the scheme:**
  * the LFSR polynomial;
  * how the user input is split (upper byte to the seed, lower byte as the
    run length);
  * the reading of divisor 0 as 16;
  * the 50 % enable duty cycle;
  * the controller's states;
  * the 100 MHz system clock;
  * the reset style;
  * the LUT numbers 2 and 3;
  * the example design's input registers.

  Because the polynomial is chosen here, the published example sequence
  0x104008 does not follow from identifier 0xA32F and user input 0x92CD in
  this design. The field layout is the same.
* **One LUT per sequence.** The scheme speaks of selecting one or more
  oscillators, and its slice experiment enabled four LUTs of a slice
  together. Here a sequence names exactly one LUT, and the 4-bit field
  limits the choice to 16 LUT numbers. Covering every LUT of a
  several-hundred-LUT design would need a wider field, and so a longer
  sequence.
* **ICAP frames.** As above, the packet carries one word instead of a
  read-modify-written frame.
* **LUT size.** The model is a 4-input, 2-output LUT. Current devices use
  6-input, 2-output LUTs with 64-bit tables.
* **Not on chip, so not here:**
  * the infrared camera;
  * lock-in analysis (multiplying each frame by sine and cosine references at
    the pulsing frequency and summing);
  * blob detection;
  * the distance comparison;
  * the place-and-route flow that reserves the LUT pins and fills unused LUTs;
  * the device's identifier and ICAP primitives.

  The larger benchmark designs the scheme was tried on are not included,
  because their netlists are external.
