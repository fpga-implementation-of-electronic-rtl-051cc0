# Electronic voting machine in SystemVerilog

This is a small synchronous circuit that replaces a paper ballot box on an
FPGA. A polling officer enables voting and the voter closes one of five
switches: four parties and "None of the Above" (NOTA). The machine counts the
vote in that option's register, confirms it with an LED and rejects switch
combinations that name no single option. When voting is closed it declares
the party with the most votes. The five counts and their total are always
available as outputs, and one count at a time can be shown in decimal on three
seven-segment digits.

The design targets a 100 MHz Artix-7 class board but uses nothing
vendor-specific. It is written as a small set of synthesizable modules with a
self-checking testbench for each, and end-to-end tests of the whole machine.

## Top level: `evm_top`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | system clock; everything is synchronous to its rising edge |
| `rst_n` | in | 1 | synchronous reset, active low; clears every count |
| `vo_en` | in | 1 | voting enable, driven by the polling officer |
| `vo_sw` | in | 5 | voter switches: bit 0..3 = Party1..Party4, bit 4 = NOTA |
| `disp_sel` | in | 3 | count to display: 0..3 = Party1..Party4, 4 = NOTA, 5..7 = blank |
| `setup_we` | in | 1 | load `cfg_voters` and `cfg_parties` (taken only while `vo_en` is low) |
| `cfg_voters` | in | 11 | number of registered voters |
| `cfg_parties` | in | 3 | number of contesting parties, 1..4 |
| `Party1`..`Party4`, `Nota` | out | 8 each | vote counts |
| `Dout` | out | 11 | total of the five counts |
| `Pled` | out | 5 | confirmation LEDs, one per option, same bit order as `vo_sw` |
| `invalid` | out | 1 | the last input was not accepted (see below) |
| `poll_complete` | out | 1 | `Dout` has reached the number of registered voters |
| `winner` | out | 2 | winning party, 0..3 = Party1..Party4 |
| `win_count` | out | 8 | the winner's count |
| `win_valid` | out | 1 | a winner is declared (voting closed, one clear leader) |
| `tie` | out | 1 | voting closed and the highest count is shared |
| `seg_n` | out | 7 | segments g..a, active low |
| `an_n` | out | 3 | digit anodes An2..An0, active low |

`invalid` is meant to drive a sixth LED that tells the voter an input was
rejected, next to the five confirmation LEDs of `Pled`.

All inputs are assumed synchronous to `clk`. On a real board, debounce and
synchronise the switches before `vo_sw`; there is no synchroniser inside.

## Election setup

Before voting opens, the officer fixes two numbers: how many voters are
registered and how many of the four parties contest. They are loaded on a
clock edge with `setup_we` high and `vo_en` low. A load attempt while voting
is open is ignored. During voting, a vote for a party numbered above
`cfg_parties` is refused. So is any vote once `Dout` has reached
`cfg_voters`, which guarantees that the total never exceeds the number of
registered voters. `poll_complete` then goes high. NOTA is always
available. Reset restores the defaults: all four parties contest and the
voter number is 2047, which is no practical limit because five full counts
total 1275. Without a setup, the machine therefore counts freely.

## How a switch becomes a vote

This is the part of the design that most needs explaining, because three
rules interact.

**One switch per option.** A valid selection has exactly one bit of `vo_sw`
set. Code 0 means no switch is closed and is simply ignored. Any other
code, with two or more switches closed, is a *bad code*.

**A vote is a change.** The decoder keeps the code of the previous clock. A
valid code counts only on the clock where it first appears. Holding a
switch closed for many clocks therefore gives one vote. Moving directly from
one switch to another (1 → 2) gives a second vote. A switch that was already
closed when `vo_en` went high does not count until it changes. The previous
code is tracked whether or not voting is enabled.

**The enable window (`SINGLE_VOTE`).** Two uses of `vo_en` are supported:

* `SINGLE_VOTE = 0` (default): while `vo_en` is high, every new valid code is
  a vote. The officer opens the machine and leaves it open. This is what
  the reference simulation of the machine does: ten votes while the enable
  stays high.
* `SINGLE_VOTE = 1`: each high period of `vo_en` admits exactly one vote. The
  officer lowers and raises the enable between voters. A second new valid
  code in the same window is a *repeated vote*: it is not counted and is
  flagged invalid.

Per clock edge, with `vo_en` high:

| Input at the edge | Counts | `Pled` | `invalid` |
|---|---|---|---|
| 0 | unchanged | keeps counting down | 0 |
| new one-hot code, count < 255, window unused | +1 for that option | that LED only, timer reloaded | 0 |
| same one-hot code as last clock | unchanged | keeps counting down | 0 |
| bad code (2+ switches) | unchanged | all off | 1 while present |
| new one-hot code, count already 255 | unchanged | all off | 1 for that clock |
| new one-hot code, window used (`SINGLE_VOTE = 1`) | unchanged | all off | 1 for that clock |
| new one-hot code for a non-contesting party, or `Dout` = registered voters | unchanged | all off | 1 for that clock |

With `vo_en` low, nothing is counted and `invalid` stays low.

Counts, `Pled` and `invalid` change on the rising edge that samples the code.
`Dout` is combinational from the counts, so it changes on the same edge. A
count that reaches 255 stays there. Further votes for that option are
refused rather than wrapped, so `Dout` always equals the number of accepted
votes.

## Confirmation LED

When a vote is accepted, the LED of that option, and only that one, lights.
A down-counter is loaded with `LED_TIMER_MAX`. The LED goes dark on the
edge where the counter reaches zero, so it is lit for exactly
`LED_TIMER_MAX` clocks (default 100,000,000, one second at 100 MHz). A new
vote restarts the timer with its own LED. Any rejected input turns the LEDs
off at once, so a lit LED always refers to an accepted vote.

## Result declaration

While `vo_en` is high, `win_valid` and `tie` are 0. With `vo_en` low the
four party counts are compared; NOTA cannot win. If one party holds the
highest count, `win_valid` is 1 and `winner`/`win_count` name it. If
two or more share it, `tie` is 1 and nothing is declared. With no party
vote at all, neither flag is set. These outputs are registered and follow
the counts one clock later. They simply report the current counts, so
reopening the machine withdraws the declaration.

## Seven-segment readout

The count chosen by `disp_sel` (0..255) is converted to three decimal digits
by shift-and-add-3. The digits are driven in turn on one shared segment bus.
An0 shows the units, An1 the tens and An2 the hundreds. Each digit is driven
for `REFRESH_CYCLES` clocks (default 100,000, 1 ms at 100 MHz, so each digit
refreshes at about 333 Hz). Anodes and segments are active low. Segment bit
0..6 = a..g. Leading zeros are shown. `disp_sel` values 5..7 blank the
display.

## Modules

| File | Module | Role |
|---|---|---|
| `rtl/evm_pkg.sv` | `evm_pkg` | sizes (5 options, 4 parties, 8-bit counts, 3 digits), option enum, default timings |
| `rtl/evm_vote_decoder.sv` | `evm_vote_decoder` | one-hot check, change detection, enable window; gives `cast`, `bad_code`, `repeat_vote` |
| `rtl/evm_voter_setup.sv` | `evm_voter_setup` | registered-voter and contestant numbers; admits or denies each vote |
| `rtl/evm_vote_tally.sv` | `evm_vote_tally` | the five count registers, refusal of full counts |
| `rtl/evm_led_ctrl.sv` | `evm_led_ctrl` | `Pled` and its hold timer |
| `rtl/evm_vote_total.sv` | `evm_vote_total` | `Dout` adder |
| `rtl/evm_winner.sv` | `evm_winner` | highest count, tie detection, declaration when voting is closed |
| `rtl/evm_seg7_display.sv` | `evm_seg7_display` | binary to decimal and digit multiplexing |
| `rtl/evm_top.sv` | `evm_top` | wiring and the registered `invalid` flag |

Data flow: `vo_sw` → decoder (`cast`, `cand`) → setup screen (`admit`/`deny`,
using `Dout`) → tally (`accept`/`reject`) → counts → total, winner and
display. `accept` drives the LED. A bad code, a repeated vote or any refusal
clears the LED and sets `invalid`.

Parameters of `evm_top`:

| Parameter | Default | Meaning |
|---|---|---|
| `LED_TIMER_MAX` | 100_000_000 | clocks the confirmation LED stays lit (at least 1) |
| `REFRESH_CYCLES` | 100_000 | clocks per displayed digit |
| `CNT_W` | 8 | bits per count (at most 9 because of the 3-digit display); `Dout` is `CNT_W + 3` bits |
| `SINGLE_VOTE` | 0 | 1 = one vote per enable window |

Coarse synthesis of `evm_top` gives 133 flip-flops. They are:

* 40 count bits;
* 5 previous-switch bits;
* 5 LED bits and a 27-bit LED timer;
* 1 invalid bit;
* 12 result bits;
* 29 display bits;
* 14 setup bits.

The single-vote window flag adds one more with `SINGLE_VOTE = 1`. The
segment decoder becomes a small ROM.

## Simulation

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.
With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_evm_top -y rtl -y tb -Irtl \
  rtl/evm_pkg.sv tb/tb_evm_model_pkg.sv tb/tb_evm_top.sv
./obj_dir/Vtb_evm_top
```

Put `tb/tb_evm_model_pkg.sv` on the command line for the three top-level
tests; the block tests need only `rtl/evm_pkg.sv` and their own file.

| Testbench | What it covers |
|---|---|
| `tb_evm_voter_setup` | defaults, loading, ignored load during voting, random votes against random limits |
| `tb_evm_vote_decoder` | every code with enable on and off, held codes, random sequences; a second instance checks `SINGLE_VOTE = 1` |
| `tb_evm_vote_tally` | random votes until counts reach 255, refusal, reset |
| `tb_evm_led_ctrl` | exact hold time per LED, restart, clear, priority of a vote over clear (`LED_TIMER_MAX = 7`) |
| `tb_evm_vote_total` | corner and random sums |
| `tb_evm_winner` | clear winners in each position, ties, empty election, voting open |
| `tb_evm_seg7_display` | decoded digits per anode, hold time per digit, blanking (`REFRESH_CYCLES = 4`) |
| `tb_evm_top` | whole machine, short LED and display timings. It replays the reference sweep (all 32 codes twice, giving 2 votes per option and `Dout` = 10), then held switches, disabled voting, LED timeout, a full count, 3000 random clocks, the result, a tie and the display. Last comes an election set up for 2 parties and 12 voters. It counts each of these events and fails if one never happened. |
| `tb_evm_top_single` | whole machine with `SINGLE_VOTE = 1`: 600 voters, each with several switch moves |
| `tb_evm_top_full` | one election with every parameter at its default, including the full 1 s LED hold (10^8 clocks, about 45 s of simulation) and a 1 ms/digit display read-back |

The top-level tests use `tb_evm_model_pkg`, a cycle reference model written
from the rules above. It compares counts, `Dout`, `Pled` and `invalid` after
every clock. The full-size test passes in about 45 s.

## Where this design makes its own choices

The machine follows a published description of an FPGA voting machine. That
description fixes the following:

* the five options;
* the 5-bit switch input;
* the 8-bit count registers named Party1..Party4 and Nota;
* `Dout` as their sum;
* the 5-bit `Pled` with a down-counting `led_timer` and its `LED_TIMER_MAX`;
* an `invalid` flag for inputs that name no valid option;
* the registered-voter and contestant numbers fixed at the start;
* a total that cannot exceed the number of participants;
* winner declaration after voting;
* three seven-segment digits with active-low anodes An0..An2.

Its reference simulation shows a one-hot switch coding, a reset that is
high during operation, and counting while the enable stays high. Everything
else was chosen here:

* **Vote on change.** The description says votes are registered once, but
  not how. The change rule above is this design's choice.
* **Enable semantics.** The description says the enable authorises each
  voter to cast a single vote, and lists a repeated vote as invalid. Its own
  simulation counts ten votes under one enable. The default follows the
  simulation; `SINGLE_VOTE = 1` gives the one-vote-per-window rule.
* **Setup.** How the voter and contestant numbers are entered is not
  described. The load strobe and the refusal of extra votes are this
  design's choice.
* **Full counts.** These are refused and flagged. Overflow is not addressed
  in the description.
* **LED timing.** The hold time value (1 s) is assumed. Clearing the LED on
  a rejected input matches the reference waveform, where the LED is dark
  during an invalid code.
* **Result rules.** Ties, the empty election and NOTA's exclusion from
  winning are not covered by the description.
* **Display.** What the three digits show is not specified. Here they show
  one selected count in decimal, with `disp_sel` as the selector. The
  segment polarity and refresh rate are also assumed.
* **Widths and reset.** `Dout` is 11 bits and the reset is synchronous.
* **Number of candidates.** The description once speaks of three
  candidates. This design follows the four parties plus NOTA used
  everywhere else in it.

The published implementation reports 68 LUTs, 47 registers and 44 I/O pins
on an Artix-7. This design has 133 flip-flops and 106 I/O bits. The
difference comes from parts that the published design does not size or does
not show among its ports: the 27-bit one-second LED timer, the display
multiplexer, the setup registers and the winner outputs.

Not implemented: vote encryption, tamper sensors, an audit trail with
timestamps and hashes, and password or biometric voter verification. The
description mentions these only as capabilities of FPGA-based machines in
general, not as parts of this machine. Their function is not specified
closely enough to build.
