# VFE-PCB readout interface for a silicon-pad calorimeter prototype

A layer of this calorimeter prototype is a 3×3 array of silicon wafers,
each a 6×6 array of diode pads: 324 channels per layer, 9720 over 30 layers.
The wafers sit on very-front-end cards (VFE-PCBs). Front-end chips on each
card read 18 channels apiece. A readout board then has to hold every
channel, clock the channels out one at a time and digitise them.

This RTL implements both ends of that interface:

* the **readout side**: a sequencer that generates the control lines
  (HOLD, RESET, SRIN, CLOCK, TCALIB1-2, ENABLE1-6) and the ADC sample
  strobes, plus connector logic that routes twelve multiplexed chip outputs
  per cable pair to twelve ADC inputs;
* the **card side**: a model of a VFE-PCB in each of its three flavours.
  Each card model contains behavioural models of its front-end chips.

With both ends in one top level, a whole readout cycle can be simulated
from the trigger to the last ADC sample, and the results checked channel
by channel.

## The readout cycle

Every chip has one analogue output line, so its 18 channels are sent in
turn:

1. **Start.** A physics cycle starts on the rising edge of the `trigger`
   input. A calibration cycle starts on `cal_start` and pulses the TCALIB
   line of one bank or both (`cal_bank`).
2. **HOLD.** After a programmable delay (`hold_delay`, in 10 ns steps),
   HOLD rises. Every chip freezes the shaped signal of all 18 channels.
   This delay is the one timing figure that must be accurate: it sets where
   on the shaped pulse the sample is taken.
3. **RESET** pulses and clears the token shift register in every chip.
4. **SRIN** rises. It is still high at the first CLOCK rising edge, so
   every chip loads a token into stage 1. SRIN falls with the first CLOCK
   falling edge, before the first ADC sample.
5. **18 CLOCK periods at 5 MHz.** On each rising edge the token moves one
   stage, and the selected channel's held level appears on the chip's output
   line. Late in each period the sequencer pulses `adc_sample`, and
   `adc_chan` says which channel is on the lines. The same channel of all
   chips on the board is sampled at once: 96 ADC inputs per strobe with
   eight full cables.
6. **HOLD falls** shortly after the last period, and `done` pulses.

The chips' SROUT outputs go high only while the token sits in the last
stage. The card ANDs the SROUTs of each bank of six chips. The top level
ANDs everything that comes back. The sequencer checks that this AND is low
at samples 0-16 and high at sample 17. Otherwise it sets `seq_error`,
which shows a chip that missed a clock, a broken SRIN chain or a missing
card.

Default timing, in cycles of the 100 MHz `clk` (all durations are
parameters of `vfe_sequencer`):

| step | cycles |
|---|---|
| start → HOLD | `hold_delay`+1 after TCALIB rises; `hold_delay`+3 after the first edge that sees `trigger` (two synchroniser stages) |
| HOLD → RESET | 10 (`HOLD_TO_RST`) |
| RESET width | 10 (`RST_W`) |
| RESET → SRIN | 10 (`RST_TO_SRIN`) |
| SRIN → first CLOCK | 10 (`SRIN_LEAD`) |
| CLOCK period | 20 = 10 high + 10 low (`CLK_HIGH`, `CLK_LOW`) → 5 MHz |
| CLOCK edge → ADC sample | 18 (`SAMPLE_AT`) |
| last period → HOLD low, `done` | 10 (`TAIL`) |

A physics cycle therefore takes `hold_delay` + 413 cycles (about 4.1 µs)
from the trigger to `done`. A calibration cycle takes `hold_delay` + 411
cycles. A start that arrives while a cycle is in progress is ignored.
ENABLE1-6 are latched at the start and stay constant through the cycle.

The interface fixes several things: the order of the lines, the rule that
SRIN overlaps the first clock and is gone before the first sample, the 18
clocks, the 5 MHz ceiling and a delay adjustable in steps of at most 10 ns.
Every duration in the table is this design's own choice, and so is the
100 MHz system clock.

## Calibration

Each chip's 18 channels form six groups of three. `enable_groups[g]`
selects group g for injection, and the same selection applies to every
chip. Channels 3(g-1) to 3(g-1)+2 make up group g; that choice of
consecutive triplets is this design's own. The two TCALIB lines cover the
two banks of six chips: bank 1 is chips 1-6 and bank 2 is chips 7-12. Those
are exactly the chips of a left and a right half card. On the rising edge
of its bank's TCALIB, a chip arms the channels of the enabled groups
(`vfe_calib_select`). The sample taken on HOLD then holds the channel
signal plus the calibration level `vcalib`, saturated at full scale. The
next RESET clears the armed marks. The start-to-HOLD delay of a
calibration cycle is counted from the rising edge of TCALIB.

## Cards, banks and connector pairs

A card comes in one of three flavours (`flavour_e`):

| flavour | wafers | chips | OUTPUT lines | TCALIB | SROUT driven |
|---|---|---|---|---|---|
| `FLAV_FULL` | 6 | 1-12 | 1-12 | 1, 2 | 1, 2 |
| `FLAV_LEFT` | 3 | 1-6 | 1-6 | 1 | 1 |
| `FLAV_RIGHT` | 3 | 7-12 | 7-12 | 2 | 2 |

Each card has one 68-pin connector, used as 34 differential pairs. Pair k
is pins (k+34, k), and the higher-numbered pin is the positive leg.
`ecal_pkg::full_pair_signal()` holds the assignment:

| pair | signal | pair | signal | pair | signal |
|---|---|---|---|---|---|
| 1 | OUTPUT1 | 12 | ENABLE3 | 25 | TCALIB1 |
| 2 | OUTPUT7 | 13 | CLOCK | 26 | TCALIB2 |
| 4 | OUTPUT2 | 14 | OUTPUT3 | 30 | OUTPUT5 |
| 5 | OUTPUT8 | 15 | OUTPUT9 | 31 | OUTPUT11 |
| 6 | HOLD | 16 | ENABLE4 | 33 | OUTPUT6 |
| 7 | VCALIB | 17 | ENABLE5 | 34 | OUTPUT12 |
| 8 | SRIN | 18 | ENABLE6 | | |
| 9 | RESET | 20 | OUTPUT4 | | |
| 10 | ENABLE1 | 21 | OUTPUT10 | | |
| 11 | ENABLE2 | | | | |

Pairs 3, 19, 22-24, 27-29 and 32 are unused. On a half card, the OUTPUT
and TCALIB pairs of the missing bank are left floating
(`pair_signal()`). The SROUT and identification lines have no pairs in
this assignment, so they are separate ports. The model uses two SROUT lines
and six ID lines.

The readout board has eight connector pairs, A and B. A pair takes either
one full card on A, or a left card on A and a right card on B.
`readout_pair_merge` drives the same control levels onto both connectors.
It takes OUTPUT1-6 and SROUT1 from A. It takes OUTPUT7-12 and SROUT2 from
A in full mode and from B in half mode. In the top level, each pair's mode
is set by the parameter bit `PAIR_HALF[i]`, which also decides which card
models are built behind the pair.

## How analogue parts are represented

The channel outputs and the calibration level are analogue. Here they are
unsigned 14-bit numbers (`ecal_pkg::ana_t`). 14 bits is the dynamic range
the channel outputs have to be digitised with. A differential digital line
is represented by the level of its positive leg. Floating pairs read 0.
`vfe_chip` is a behavioural model of the front-end chip with the chip's
own pins: sample-and-hold on the HOLD rising edge, additive calibration
injection, and an analogue multiplexer that outputs 0 when no channel is
selected. The model settles at once; a real output rings after each CLOCK
edge, and that ringing is why the ADC samples late in the period. The
model is written in synthesisable style. The token shift register
(`vfe_shift_mux`) and the calibration selection (`vfe_calib_select`) are
digital logic in their own right.

The ADCs, the calibration level source, the LVDS drivers and receivers,
the sensors and the cable are not modelled. Their signals are ports of the
top level: `charge` for the sensor signals, `vcalib`, and
`adc_in`/`adc_sample`/`adc_chan`.

## Modules

| file | role |
|---|---|
| `rtl/ecal_pkg.sv` | counts, `ana_t`, `vfe_ctrl_t` control bundle, connector structs, connector map functions |
| `rtl/vfe_shift_mux.sv` | 18-stage token shift register: CLOCK, RESET (asynchronous), SRIN → one-hot select, SROUT |
| `rtl/vfe_calib_select.sv` | group decode, armed on TCALIB, cleared on RESET |
| `rtl/vfe_chip.sv` | behavioural model of one 18-channel front-end chip |
| `rtl/vfe_pcb.sv` | card: connector decode, 6 or 12 chips, bank SROUT ANDs, ID lines (`FLAVOUR`, `BOARD_ID`) |
| `rtl/readout_pair_merge.sv` | readout side of one connector pair |
| `rtl/vfe_sequencer.sv` | readout cycle state machine, ADC strobes, SROUT check |
| `rtl/ecal_readout_system.sv` | top: sequencer, `N_PAIRS` (8) connector pairs and their cards |

In the top level, card IDs are 2i+1 for connector A and 2i+2 for connector
B of pair i. A full pair reads 0 on its B ID lines.

## Simulating

Each testbench in `tb/` is self-checking. It ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/ecal_pkg.sv \
        tb/tb_ecal_full.sv --top-module tb_ecal_full -Mdir obj -o sim
    ./obj/sim

`tb_ecal_full` runs the top level at its defaults: eight full cards and
1728 channels. It runs one physics cycle and calibration cycles of bank 1,
bank 2 and both banks, and compares all 96 ADC inputs at every strobe.
`tb_ecal_readout_system` uses three pairs with a half pair in the middle.
It also counts each mechanism (physics cycle, each calibration bank, half
and full pairs, saturation, ignored start, two delays) and fails if any of
them never happened. Both testbenches change the charges right after HOLD
rises, so only genuinely held levels pass. They also check the
start-to-done latency given above. Each module has its own testbench:
`tb_vfe_shift_mux`, `tb_vfe_calib_select`, `tb_vfe_chip`, `tb_vfe_pcb`,
`tb_readout_pair_merge` and `tb_vfe_sequencer`. The sequencer testbench
checks every edge time in the timing table and drives a deliberately wrong
SROUT once to trigger `seq_error`. All of them finish in well under a
second.

## Scale

With its defaults, one instance is one readout board: eight pairs, up to
1728 channels. Each layer has one full card and one half card, and the
half cards of neighbouring layers alternate between left and right. Two
adjacent layers therefore fill three pairs: two full pairs and one pair
with a left and a right card. That is exactly the configuration of
`tb_ecal_readout_system`. The full prototype has 30 full cards and 15 each
of left and right cards. It needs 45 pairs, i.e. six boards. A half pair
with only one card is not supported: the missing card's SROUT would read
0 and set `seq_error`.

## Limits and own choices to keep in mind

* The assignment of SROUT and ID lines to pins is not defined. The number
  of ID lines (6) and of SROUT lines (2) is provisional.
* The card-ID values, and the use of SROUT as an end-of-chain check, are
  this design's own choices.
* One sequencer drives all eight pairs of a board at once.
* The model has no 14-bit ADC with 10-bit precision (4 bits at the low end
  rising to 10 bits at the high end). The ADC inputs are handed out as ideal
  14-bit levels.
* The `disable iff (!rst_n)` on the sequencer's two SRIN assertions makes
  Verilator report `rst_n` as used both synchronously and asynchronously.
  The warning concerns the assertions only, not the logic.
