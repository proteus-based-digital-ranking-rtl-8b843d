# Four-lane finish-order display

A small digital circuit that records the order in which objects cross a
line and shows it on a four-digit seven-segment display. Each of four lanes
has a sensor switch that gives one short high pulse when an object passes.
The display starts at `0000`. The first lane to cross appears on the right;
each later crossing moves the digits one place left and puts its lane
number on the right. After four crossings the display reads, from left to
right, the lanes in the order they finished. A reset switch clears it for
the next round.

The design is built from the functions of classic TTL parts: a 74LS148
priority encoder, JK flip-flops, a 74LS197 counter, a 74LS138 decoder,
74LS251 selectors and a 74LS48 seven-segment decoder. Each part is its own
module, and the modules are wired as the TTL circuit would be. The
difference is that everything runs on a single system clock. The TTL
original is clocked by the sensor switches themselves.

## Data path at a glance

```
trig_sw[3:0] --sync--> trig --inv--> 74LS148 --inv--> code (0..4)
                         |                               |
                         +--> OR --falling edge--> shift |
                                                   v     v
                                   4 x 3-bit shift register (JK flip-flops)
                                                   |
                                 rank_q: group1 (newest) ... group4 (oldest)
                                                   |
10 kHz tick -> 74LS197 count X -> 74LS251 x3 select group X -> 74LS48 -> seg[6:0]
                               -> 74LS138 Y[X]              -> digit_n[X-1]
reset_sw -> reset_control -> clear of all registers and the counter
```

| Module | Part it models | Role |
|---|---|---|
| `ranking_system` | whole circuit | top level |
| `signal_acquisition` | input inverters, 74LS148, output inverters | switch levels to a lane number |
| `ls148_encoder` | 74LS148 | 8-to-3 priority encoder, active low |
| `rank_register` | 4-input OR gate and 12 JK flip-flops | order memory |
| `jk_ff` | falling-edge JK flip-flop with set and clear | one register bit |
| `rank_display` | 74LS197, 74LS138, 3 x 74LS251, 74LS48 | scanned display driver |
| `scan_clock_divider` | 10 kHz oscillator | scan tick from the system clock |
| `ls197_counter`, `ls138_decoder`, `ls251_mux`, `ls48_seg_decoder` | the named parts | display building blocks |
| `reset_control` | reset switch to clear lines | clear all logic |
| `rank_pkg` | - | shared constants and types |

## Encoding a crossing

The four switch levels are synchronised to `clk` with two flip-flops each.
They are then inverted, because the 74LS148 has active-low inputs. Switch
*n* drives encoder input *n*. The remaining inputs (0 and 5..7) are held
inactive, and the enable is tied active. The encoder's inverted output is
inverted again, so `code` equals *n* while switch *n* is pressed and 0 when
none is. If two switches are pressed at once, the higher-numbered one wins.

## When the register shifts, and what it stores

This part needs the most care. The register is not clocked by the system
clock in the original design. Its clock is the OR of the four switch
levels, and it shifts on the **falling** edge of that OR, when the last
switch that was pressed is released. The value stored is the encoder output
just before the release, while the switch was still high. On release the
encoder output is already 0, so it cannot be the value stored.

Here the OR is sampled every cycle. `shift` is high for one cycle when the
OR has just gone from 1 to 0. The register then loads `code` as it was one
cycle earlier. Each of the 12 bits is a `jk_ff` with J = D and K = ~D,
which makes it a D flip-flop. Its falling-edge clock is replaced by the
`shift` enable. Group 1 takes the new lane number, and group *g*+1 takes
what group *g* held. A fifth crossing pushes the oldest number out of
group 4.

Consequences that the tests check:

* **Latency.** The register changes on the third rising `clk` edge after a
  switch is released: two synchroniser stages, then the shift.
* **Overlapping pulses.** If two switches are high at the same time, there
  is only one falling edge of the OR, so only one lane is recorded. That
  lane is the one released last. For example, lanes 1 and 2 pressed
  together with lane 2 released later record only "2". This is how the
  circuit is meant to behave, and it is a known weakness. The fix suggested
  for it is to keep sensor pulses as short as possible.
* **Switch pulses must be clean.** Each high pulse counts as one crossing.
  There is no debouncing, so a bouncing mechanical switch would register
  several crossings.

## Scanned display

Only one digit is lit at a time. `scan_clock_divider` produces a one-cycle
tick at `SCAN_HZ` (10 kHz), and the 74LS197 counts these ticks. Only its
three low bits, X = 0..7, are used:

* X = 1..4: decoder output Y*X* goes low and lights digit *X*, counted from
  the right. Each of the three 8-input selectors passes one bit of register
  group *X* to the 74LS48, whose fourth input is tied to 0.
* X = 0 and X = 5..7: no digit is lit. The selectors see their grounded
  inputs.

So each digit is lit for 1/8 of the time and refreshed at 1.25 kHz, and
persistence of vision makes the number look steady. Group 1, the latest
crossing, is on the right. Empty groups hold 0 and show `0`. Segment
outputs are active high (common-cathode tube). Digit selects are active
low.

The 74LS48 patterns are those of the real part: 6 has no top bar and 9 has
no bottom bar. Only 0..4 ever appear in this design.

## Reset

`reset_sw` is an active-high pulse from a self-resetting push button. While
it is high, every register, the synchronisers, the scan divider and the
counter are held clear asynchronously. The clear is released two `clk`
edges after the button is let go. After a reset the display reads `0000`.
There is no separate power-on reset, so press reset once after power-up.
The register and counter otherwise start at whatever value they hold.

## Top-level interface

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | system clock, `CLK_HZ` |
| `trig_sw` | in | `N_LANES` | lane switches, bit *i* = lane *i*+1, active high, asynchronous |
| `reset_sw` | in | 1 | reset button, active high, asynchronous |
| `seg` | out | 7 | segments {g,f,e,d,c,b,a}, active high |
| `digit_n` | out | `N_LANES` | digit selects, active low, bit 0 = rightmost |
| `rank_q` | out | `N_LANES*CODE_W` | register contents, bits [3g+2:3g] = group g+1 |

| Parameter | Default | Notes |
|---|---|---|
| `N_LANES` | 4 | lanes, register groups and digits. The encoder, decoder and selectors are 8-wide parts, so at most 7 lanes. The tube model in the testbenches has 4 digits. |
| `CODE_W` | 3 | bits per stored lane number |
| `CLK_HZ` | 50 000 000 | system clock. This value is this design's choice. |
| `SCAN_HZ` | 10 000 | scan step rate |

## Where this RTL follows the TTL circuit and where it departs

The following come from the original circuit:

* the encoder with its inverters and the lane-to-input mapping
* the OR gate as the register clock, shifting on its falling edge
* the value that gets stored
* the 4 x 3-bit register built from JK flip-flops
* the 10 kHz scan, the counter, decoder, selector and seven-segment
  decoder wiring
* the counter-to-digit mapping (count X shows group X on digit X from the
  right)
* the reset that clears everything
* the behaviour with overlapping pulses

This design's own choices:

* **One system clock.** The switch-driven clock becomes an edge-detect
  enable, and there are two-flop synchronisers on the switches.
* The scan tick is divided down from `clk` rather than taken from a
  separate oscillator.
* **Reset polarity.** The reset button is taken as an active-high pulse,
  like the lane switches, and inverted to the active-low clears.
* **Unused encoder inputs are held inactive.** The original ties them to
  ground, which on an active-low encoder would force code 7.
* **JK wiring.** J = D and K = ~D (the JK flip-flops stand in for D
  flip-flops). In the `jk_ff` model, simultaneous set and clear gives set.
* **74LS251 three-state outputs.** When disabled they drive Y = 0 and
  W = 1.
* **74LS48.** Ripple blanking is not modelled.
* **Behaviour past four crossings** follows from the shift register: the
  oldest entry is dropped.

Parts with no logic function are not modelled in `rtl/`: the sensors, the
switches and the display tube. `tb/tube_model.sv` is a behavioural model
of the tube for the testbenches. Each digit latches the segment pattern
while it is selected and decodes it back to a number.

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each ends
by printing `TB_RESULT checks=N failures=M`, and each has a watchdog.

* The combinational parts are checked exhaustively, or over random data
  and every select value, against reference functions written in the
  testbench. For the 74LS48 that reference is a table of segment letters.
* `jk_ff` and `ls197_counter` are compared each cycle with reference
  models under random stimulus.
* `tb_rank_register` compares the register with a queue model over
  single, overlapping (random release order) and more-than-four
  crossings. It checks the one-cycle `shift` pulse and the cycle in which
  the register changes.
* `tb_rank_display` (10-cycle scan step) checks on every cycle the lit
  digit, its segments and the blank steps, and that the scan advances
  once every 10 cycles. It also reads the result back through the tube
  model.
* `tb_ranking_system` runs the whole design at its default parameters
  (50 MHz, 10 kHz scan) and finishes in well under a second. It covers:
  * power-up reset to `0000`
  * lanes crossing in the order 2, 4, 1, 3, with the display read after
    every crossing
  * a fifth crossing
  * both overlap cases
  * a reset in the middle of a round
  * random rounds

  It counts each of the following and fails if any never happened: single
  crossing, full register, overflow, overlap, reset, blank scan step. It
  also checks the three-edge latency and that every digit is refreshed
  once per scan.

Two assertions in the RTL run during every simulation with `--assert`:
`shift` is never high two cycles in a row (`rank_register`), and at most
one digit is lit at a time (`rank_display`).

Run any of them with Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_ranking_system rtl/rank_pkg.sv tb/tb_ranking_system.sv
./obj_dir/Vtb_ranking_system
```

Lint: `verilator --lint-only -Wall -Irtl rtl/rank_pkg.sv rtl/ranking_system.sv`.
The remaining warnings are unused outputs of the TTL-style parts: GS'/EO'
of the encoder, QD of the counter, Y0 and Y5..Y7 of the decoder, and W of
the selectors. There is also Verilator's note on the reset synchroniser,
whose flip-flops are cleared asynchronously and shift synchronously, as
intended.

Yosys's synthesis flow rejects the `jk_ff` model, because its flip-flop
has both an asynchronous set and an asynchronous clear. In this design the
set is tied inactive. A synthesis target without such flip-flops can drop
the `sd_n` input.
