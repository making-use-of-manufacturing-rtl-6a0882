# Hybrid oscillator arbiter PUF

A physical unclonable function (PUF) gets a secret key from an integrated
circuit without storing it anywhere. The key comes from small random
differences between transistors that were drawn identical. This design takes
those differences from ring oscillators. It races pairs of nominally
identical rings into a D flip-flop. One ring drives the flop's data input
and the other drives its clock. When the rings are stopped, the flop holds
the level the data ring had at the clock ring's last rising edge. That level
depends on the two rings' exact frequencies, so it is a bit that differs from
die to die. Sixty-four rings in two sets of 32 give a 32-bit key.

This is the "hybrid oscillator arbiter" structure from *Making Use of
Manufacturing Process Variations: A Dopingless Transistor Based-PUF for
Hardware-Assisted Security*. A classic ring-oscillator PUF compares two rings
with counters and a comparator. An arbiter PUF races one edge through long
chains of multiplexers. The hybrid keeps the rings and uses a single
flip-flop as the arbiter.

It comes in two variants, and `hoa_puf_top` holds both side by side:

| | speed-optimised | power-optimised |
|---|---|---|
| arbiter flops | 32, one per key bit | 1 |
| multiplexers | none | MUX1 (data ring), MUX2 (clock ring), 32:1 each |
| challenge | none: a die has exactly one key | the multiplexer selects |
| rings running | all 64 at once | the selected pair only |
| time per key | 50 ns (50 cycles) | 160 ns (32 x 5 cycles) |
| core / controller | `hoa_puf_speed_core` / `speed_key_ctrl` | `hoa_puf_power_core` / `power_key_seq` |

The variants are alternatives for different products: fast key generation
for network equipment, and low power for battery devices. In the top they
share only the clock and reset. Each variant has its own rings, with its own
die seed.

## How a bit is decided

The bit does not come from which ring is faster. It comes from the phase of
the data ring at the last rising edge of the clock ring before the rings are
stopped. Both rings start low at the same instant, when the enable rises.
Let `Ha` and `Hb` be the half periods of the data ring and the clock ring.
The clock ring rises at `Hb, 3Hb, 5Hb, ...`. The data ring's level at time
`t` is the parity of `floor(t / Ha)`. For a run of length `W`, the key bit is

    t_last = largest odd multiple of Hb below W
    bit    = floor(t_last / Ha) mod 2        (0 if the clock ring never rose)

The testbenches predict every bit with this formula (`puf_tb_pkg::ref_bit`).
They do not use the RTL to get the expected value.

Two things follow, and they matter to anyone using the key:

* **The run length is part of the key.** With a 27 ps half period, a 50 ns
  run holds about 900 clock edges. Changing the run by a fraction of a ring
  period changes many bits. The controllers therefore take the run length
  from the system clock, as a fixed number of cycles. Do not change
  `SPEED_RUN_CYCLES`, `POWER_RUN_CYCLES` or the clock period once keys are
  enrolled.
* **Common-mode speed changes have the same effect.** A change of
  temperature or supply voltage that slows every ring by 1 % works like a 1 %
  shorter run. The current-starved inverters and their shared tuning voltage
  are meant to keep this small. The model here has no temperature or supply
  dependence, so it says nothing about reliability (see *Limits*).

## Key generation

**Speed-optimised** (`speed_key_ctrl`, 1 ns clock):

1. A `start` pulse in idle begins a key generation and raises `busy`.
2. One cycle clears all arbiter flops.
3. `ro_enable` then runs every ring for `RUN_CYCLES` = 50 cycles.
4. One settle cycle follows.
5. The 32 flop outputs are copied into `key`. `key_valid` rises 52 cycles
   after the start edge and stays high until the next `start`.

**Power-optimised** (`power_key_seq`, 1 ns clock). For each bit `k`:

| step | cycles | what happens |
|---|---|---|
| SELECT | 1 | set the MUX1/MUX2 selects, clear the flop |
| RUN | `RUN_CYCLES` = 3 | run the selected pair |
| HOLD | 1 | stop the pair, then store the flop output in `key[k]` |

That is 5 cycles per bit, so `key_valid` rises 160 cycles after `start`.
Only the two selected rings are enabled, and the selects change only while
the rings are stopped. The assertion `a_sel_stable` checks this, because a
select that moved during a run could put a glitch on the flop clock.

The challenge is two 5-bit numbers, `power_challenge_d` and
`power_challenge_clk`, sampled on `start`. Bit `k` uses data ring
`(challenge_d + k) mod 32` and clock ring `32 + (challenge_clk + k) mod 32`.
Challenge 0/0 pairs the same rings as the speed-optimised variant.

## The ring oscillator model

The rings are analog circuits. `current_starved_ro` is a behavioural model
of one ring, for simulation with delays. It stays low while `enable` is low.
After `enable` rises it rises once a half period has passed, and it then
toggles every half period. It drops low as soon as `enable` falls, so a
stopped ring never produces a false rising edge on a flop clock.

Internally the model is one gated inversion whose output feeds back to its
own input through a delay. Synthesis sees that loop without the delay and
warns about a combinational loop. The warning is expected: the loop is the
oscillator. The controllers and multiplexers are ordinary synthesizable
logic.

Manufacturing variation comes from `puf_pkg`, which works as a deterministic
"virtual fab":

* Each ring has 13 inverter stages.
* Each stage delay is `2.115 ps x (1 + 0.10 x g)`. Here `g` is an
  approximately normal number, computed by an integer hash of the die seed,
  the ring index and the stage number.
* A ring's half period is the sum of its 13 stage delays. That gives about
  27.5 ps, a period of about 55 ps, with a spread of a few percent.

A given die seed always gives the same die, and two seeds give two different
dies. Change the die with the top's `SPEED_DIE_SEED` and `POWER_DIE_SEED`.
Change the process spread with `SIGMA_PCT`, and the nominal speed with
`NOMINAL_STAGE_DELAY_FS`.

## Source fidelity

Taken from the publication:

* 64 rings for a 32-bit key, in two sets of 32.
* 13-stage current-starved rings, each with an enable.
* The speed-optimised variant has one D flip-flop per pair: one ring on D,
  the other on the clock.
* The power-optimised variant has MUX1 and MUX2 in front of one D flip-flop,
  and the multiplexer selects are the challenge.
* The key is recorded after a fixed 50 ns run, and the serial variant leaves
  a gap between selections.
* The 10 % spread used in its device Monte Carlo.

This design's own choices:

* The 1 ns system clock.
* The start / busy / key_valid handshake.
* The clear cycle before each run, and the settle and gap cycles.
* The rising-edge flop with an asynchronous clear.
* The pairing of ring `i` with ring `32 + i`.
* The challenge format.
* Enabling only the selected pair in the power-optimised variant.
* The binary multiplexer select.
* The ring delay values and the way variation is applied to stage delays.

Departures and gaps:

* The publication gives 150 ns per key for the power-optimised variant in
  one place and "more than 150 ns" in another. This design takes 160 ns.
* The publication suggests also using the tuning voltage as a challenge
  input. The tuning voltage is analog, so it is not modelled. It is a
  constant folded into the nominal stage delay.
* The baseline ring-oscillator PUF and arbiter PUF it compares against are
  not included.

## Limits

* **No environment model.** The reliability evaluation varies temperature and
  supply. The ring model cannot reproduce that. Keys here repeat exactly
  under fixed conditions, which is tested, but that is no evidence of
  reliability on silicon.
* **No power model.** Average power (about 121 uW and 151 uW reported for the
  two variants) is a technology figure that RTL cannot give.
* **Uniqueness was simulated over 16 dies**, not the 100 Monte Carlo runs of
  the original evaluation. Simulation time grows with the square of the
  number of dies. The mean inter-die Hamming distance was 50.1 %
  (speed-optimised) and 49.8 % (power-optimised), against the published 50 %
  and 48 %. This only shows that the variation model and the arbitration
  spread bits well. It says nothing about real devices.
* The arbiter flop output is read by the system clock only after the rings
  have stopped. Metastability at the last ring edge is not modelled, because
  a two-state simulator cannot show it.

## Files

| file | contents |
|---|---|
| `rtl/puf_pkg.sv` | sizes, defaults, variation model (hash and stage delays) |
| `rtl/current_starved_ro.sv` | behavioural ring oscillator |
| `rtl/arbiter_dff.sv` | the arbiter D flip-flop |
| `rtl/ro_mux.sv` | MUX1 / MUX2 |
| `rtl/puf_bit_cell.sv` | two rings and a flop: one bit of the speed-optimised PUF |
| `rtl/hoa_puf_speed_core.sv` | 32 bit cells |
| `rtl/hoa_puf_power_core.sv` | 64 rings, MUX1, MUX2, one flop, enable decode |
| `rtl/speed_key_ctrl.sv`, `rtl/power_key_seq.sv` | the two controllers |
| `rtl/hoa_puf_top.sv` | both variants side by side |
| `tb/puf_tb_pkg.sv` | reference bit formula for the testbenches |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_puf_uniqueness.sv` | 16-die uniqueness run |

Each testbench ends by printing `TB_RESULT checks=N failures=M`. Each has a
watchdog. `tb_hoa_puf_top` runs both variants end to end at the default size.
It generates keys, checks every bit, the 52- and 160-cycle latencies, key
repetition, key changes when the challenge changes, concurrent operation,
and a start while busy.

## Simulating

The rings need a simulator with delay support. With Verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps \
        --top-module tb_hoa_puf_top -y rtl -y tb +libext+.sv \
        rtl/puf_pkg.sv tb/puf_tb_pkg.sv tb/tb_hoa_puf_top.sv -o sim
    ./obj_dir/sim

Replace the top module and file name to run another testbench. The modules
declare `timeunit 1ps` / `timeprecision 1fs`, because ring edges are a few
picoseconds apart. A ring that is restarted must have been disabled for at
least one half period (about 27 ps). The controllers always leave two or more
clock cycles.
