# Closed-loop supply scaling with falling-edge error detection

A digital block clocked at a fixed frequency usually runs at a supply voltage
chosen for the worst combination of process, voltage and temperature. Most
chips, most of the time, could run lower. This design finds the lower voltage
while it runs. An 8x8 two-dimensional DCT, the transform at the heart of JPEG
and video coders, processes image data at one pixel per clock (200 MHz in the
target FPGA). Eight *error-detection sequentials* (EDS) watch a few adder
output bits. They check whether those bits have settled by the **falling**
clock edge, i.e. half a cycle early. When they have not, the supply is close
to the point where the datapath itself would fail, and a small controller
asks an external linear regulator for a higher voltage. When nothing has been
flagged for long enough, it asks for a lower one. The supply therefore tracks
the silicon's actual speed and temperature.

Two choices make this work in an FPGA without a second clock and without
padding paths with buffers:

* **Monitor busy, non-critical bits.** The watched bits are intermediate
  bits of the DCT's 14-bit and 12-bit adders. They switch on almost every
  clock with ordinary image data, so the monitor is exercised constantly. The
  true critical path (the carry into the top bits) is rarely exercised and is
  not monitored at all.
* **Sample early, on the opposite edge.** An EDS cell compares what the path
  showed at the falling edge with what it shows at the next rising edge. A
  path that is late by the falling edge has lost half a clock of slack. A
  long critical path that the rising edge samples can still be on time.
  During place and route, the falling edge is constrained as if it came
  later than it really does (61 % instead of 50 % of the period). This
  leaves the monitored paths a *relative margin* over the critical path:
  they report a slack deficit before the critical path runs out of slack.

The RTL here is the FPGA side of that loop: memories, DCT datapath, EDS
cells, and the voltage controller with its regulator pin decoder. The
regulator, bench supply and host link are external parts. They appear as
ports, and the regulator has a behavioural model in the testbenches.
Beside the loop, a timing model of two voltage-boosted synchronizers shows
how faster metastability resolution for such sampling latches can be
obtained at low supply voltages.

```
 host ──► input store ──► tile sequencer ──► 2-D DCT ─────────────► output store ──► host
          (512x32 x 8b)                      │ row DA │ transpose │ column DA │   (512x32 x 12b)
                                             └─ 4 EDS ┘           └─ 4 EDS ───┘
                                                    └──── OR ─── final_error
                                                                     │
             sw[4:0] ──► DVS: window counters ─ comparator ─ level counter ─ mux ─ decoder ──► 5 tri-state pins ──► regulator ──► VCCint
```

## The EDS cell and what an error means

`rtl/eds_cell.sv` consists of two flip-flops and an XOR.

```
         ┌──────┐ d_fall
 d ──┬──►│ DFF1 ├───┐
     │   └─▲────┘   ├─XOR──►┌──────┐
     │   ~clk       │       │ DFF2 ├──► error
     └──────────────┘       └─▲────┘
                              clk
```

Take a rising edge R0, the falling edge F half a period later, and the next
rising edge R1:

| when `d` last changed | DFF1 (at F) | d at R1 | `error` after R1 |
|---|---|---|---|
| between R0 and F (normal) | new value | new value | 0 |
| between F and R1 (slack deficit) | old value | new value | **1** |

An error is not a failure. The ordinary data register on the same bit
captures it at R1 and still gets the right value. The flag only says that
this path has used up more than half a clock, i.e. more than the margin the
duty-cycle constraint set aside. The cells' flags are ORed into
`final_error`. Without a reference or a second clock, a cell cannot tell a
late transition from a path that was simply quiet. A monitored bit that does
not switch therefore reports nothing (see *Data dependence* below).

Metastability: when `d` changes right at F, DFF1 may resolve slowly. Its
output goes only to DFF2, a full half-cycle later, and the loop reacts only
after thousands of cycles. So an occasional wrong flag shifts a decision by
one window at most. The cells here use ordinary flip-flops. Faster latches
for this role are described below under *Boosted synchronizers*; they are
modelled, not wired into the cells.

## The DCT datapath and where the cells sit

`dct2d_eds` chains a row stage, a transposition memory and a column stage:

1. **Level shift.** An 8-bit pixel p becomes the signed value p - 128.
2. **Row stage (`dct_1d`, 8-bit in, 14-bit out).** Eight samples are
   collected. Then the even/odd butterflies are formed:
   `e[n] = x[n] + x[7-n]` and `o[n] = x[n] - x[7-n]` for n = 0..3. The even
   outputs X0, X2, X4, X6 depend only on `e`; the odd outputs only on `o`.
   Each output is computed by **distributed arithmetic**. For every bit
   position b of the four butterfly words, the four bits at position b form
   a 4-bit address. That address selects a precomputed sum of coefficients
   (16 words per output, from `eds_dvs_pkg::da_rom`). The selected words are
   added with weights 2^b, and the sign bit's word is subtracted. All bit
   positions are looked up in parallel, so one coefficient comes out per
   clock. The coefficients are c(k)/2·cos((2n+1)kπ/16) scaled by 2^11. The
   row result keeps 4 fraction bits in 14 bits.
3. **Transposition (`dct_transpose_ram`).** Two banks of 64 words. A block is
   written row by row into one bank while the other bank is read out column
   by column.
4. **Column stage (`dct_1d`, 14-bit in, 12-bit out).** The same structure,
   rounded to integers. This gives the orthonormal 2-D DCT. A full-scale
   block gives |DC| = 1024.

Coefficients leave in column-major order, `coef_idx = 8*u + v`, where u is
the horizontal and v the vertical frequency. Throughput is one pixel per
clock, sustained. The first coefficient of a block appears 21 clocks after
the block's last pixel.

**EDS placement.** Each stage's combinational distributed-arithmetic sum
(`sum_d`, the input of its sum register) is tapped at four bits. These are
raw-sum bits 12..15 of the row stage (bits 5..8 of its 14-bit output) and
bits 19..22 of the column stage (bits 4..7 of its 12-bit output). The
parameters `ROW_EDS_LSB`, `COL_EDS_LSB` and `EDS_PER_STAGE` move them. Which
bits make good monitors depends on placement and routing. It should be
re-checked after every fit: a monitored path is useful only if its slack
relative to the falling edge is smaller than the critical path's slack
scaled to the falling edge plus the margin that the 61 % constraint adds.

## The voltage loop

`dvs_controller` (inside `dvs`) holds a 4-bit level `vlevel` and decides
once per window:

* Two window counters run together: a short window of `PHI_UP` = 4096
  clocks (20.48 µs at 200 MHz) and a long one of `PHI_DN` = 12288 clocks.
* A single sticky bit records whether any error occurred since the last
  decision. The reference rate is "one error per window", so the comparator
  is only a test of that bit.
* At the end of a short window with an error recorded, the level goes up
  one step. At the end of a long window with none recorded, it goes down one
  step. Every decision restarts both windows and clears the bit. The level
  saturates at 0 and 15.

The loop therefore raises the supply quickly and lowers it cautiously. The
ratio (step up / step down)·(`PHI_DN`/`PHI_UP`) = 3 measures how
conservative it is. The short window must exceed the regulator's settling
time (about 13 µs), or one slack deficit triggers several rises.

In closed loop the level does not sit still; it cycles. It falls to the
first level at which the monitored bits are late, and errors push it back
up. Errors that occur while the regulator is still settling also count
towards the next short window, so the level often overshoots by one step.
With the bench's delay model the level cycles over 1.089 / 1.100 / 1.133 V.
That is three adjacent table entries, the same kind of toggling between
neighbouring levels that was seen on the hardware. After reset the level
starts at 0 (0.950 V) and climbs, so the first short windows are full of
errors. The datapath must tolerate the lowest voltage without functional
failure for long enough to climb.

`dvs` puts a multiplexer in front of the decoder. With `sw[4] = 1` the
controller's level drives the regulator (automatic mode). With `sw[4] = 0`
the manual level `sw[3:0]` does; `4'hF` is the nominal 1.20 V. The
controller keeps running in manual mode.

### Regulator pins

`vctrl_decoder` drives the regulator's five three-level pins. Each is an
enable/value pair, and a pin with enable 0 floats (Z). From bit 4 to bit 0
they are Vo2, Vo1, Vo0, MARGSEL and MARGTOL:

| level | pins | V | level | pins | V |
|---|---|---|---|---|---|
| 0 | 0Z0ZZ | 0.950 | 8 | 0Z1ZZ | 1.050 |
| 1 | 0ZZ0Z | 0.970 | 9 | 0Z110 | 1.061 |
| 2 | 0ZZ00 | 0.990 | A | 0Z11Z | 1.082 |
| 3 | 0ZZZZ | 1.000 | B | 01000 | 1.089 |
| 4 | 0ZZ10 | 1.010 | C | 010ZZ | 1.100 |
| 5 | 0Z10Z | 1.019 | D | 0101Z | 1.133 |
| 6 | 0ZZ1Z | 1.030 | E | 01ZZZ | 1.150 |
| 7 | 0Z100 | 1.040 | F | 011ZZ | 1.200 |

Vo2 is always driven low, so three decoder output bits are constant. At the
FPGA pads each pin needs a tri-state buffer:
`assign pad[i] = vctrl_oe[i] ? vctrl_val[i] : 1'bz;`.

## Around the core

* `image_ram`: a two-port, single-clock memory with synchronous reads. The
  top has an 8-bit input store and a 12-bit output store, each holding one
  512x32 block (16384 words). Together they take 327,680 bits, roughly
  three quarters of the memory in a small Cyclone III. A 512x512 picture is
  processed as 16 such blocks, one at a time.
* `dct_sequencer`: while `run` is high it reads the input store in 8x8
  tiles, one pixel per clock. Tiles go left to right, then the next band of
  8 lines. It writes coefficients to the output store at
  `64*tile + 8*u + v`. At the end of the block it wraps around and processes
  the block again; `pass_done` marks each completed pass.
* `eds_dvs_top`: wires everything together. The host port is
  `in_we/in_addr/in_wdata` for pixels and `out_addr -> out_rdata` (one clock
  later) for coefficients. It also brings out `run`, `sw[4:0]`, the
  regulator pins `vctrl_oe/vctrl_val`, and the status signals `final_error`,
  `eds_errors`, `vlevel`, `step_up`, `step_down` and `pass_done`.
  The two synchronizer models sit beside the loop, unconnected to it, on
  their own pins `sync_phi/sync_s/sync_r -> sync_q/sync_meta/sync_boost`
  (index 0 continuous, index 1 monitored). They are simulation models. To
  synthesize the loop for an FPGA, remove the two `vbs_sync` instances and
  their ports; nothing else depends on them.

All registers use an asynchronous active-low reset `rst_n`, except memory
arrays and data-only pipeline registers. Everything runs on one clock; only
the EDS cells' DFF1 use its falling edge.

## Boosted synchronizers

A sampling latch that sees its input change right at the sampling edge can
hang between 0 and 1. How long it hangs falls off exponentially with the
drive of its cross-coupled inverters. If tau is the time constant of that
regeneration, the chance that a sample is still undecided after a time t_r
is proportional to exp(-t_r / tau). A reliability target is therefore a
number of tau to wait, N_r (35 here), and the synchronizer's delay is
t_d = t_n + N_r * tau. Here t_n is the ordinary setup-plus-clock-to-output
time. At low supply voltages tau grows quickly, and t_d becomes the limit.

The boosted synchronizer is a Jamb latch: S with the clock sets it, R
clears it. Its inverters draw their supply from a one-capacitor charge
pump. While the clock is high the latch is transparent and the capacitor
charges to VDD. While the clock is low the latch holds, and the pump stacks
the capacitor on top of the supply, so the inverters run from more than VDD
and regenerate faster. Two flavours:

* **continuous** (`MONITORED = 0`): the pump boosts in every holding phase.
  It is the fastest, and spends pump energy even when nothing is
  metastable.
* **monitored** (`MONITORED = 1`): a detector compares the two latch nodes
  and fires the pump only while they are still close. The energy goes only
  where it is needed. The detector's own delay costs speed.

`vbs_sync` is a timing model of these circuits at their pins, for
simulation only. Behaviour:

* It measures how long S and the clock overlapped before the falling edge.
* An overlap more than `T_W` away from the balance point `T_BAL` is a
  clean decision. `q` settles t_n after the edge.
* An overlap closer than that raises `meta`. The latch stays undecided for
  tau * ln(T_W / |overlap - T_BAL|), and `q` then settles t_n later.
* `boost` is high in every low phase for the continuous flavour. For the
  monitored one it is high only while `meta` is high.
* R clears the latch at once and cancels a decision still in flight.

tau and t_n come from transistor-level simulations of the two circuits at
0.4 to 0.7 V:

| VDD | continuous: 35·tau / t_n (ps) | monitored: 35·tau / t_n (ps) |
|---|---|---|
| 0.7 V | 147 / 85 | 477 / 126 |
| 0.6 V | 218 / 151 | 961 / 225 |
| 0.5 V | 423 / 357 | 2498 / 534 |
| 0.4 V | 1667 / 1163 | 8229 / 1882 |

`VDD_MV` picks a row. The monitored flavour's tau is an average over the
resolution, detector delay included.

The window `T_W` (10 ps) and the balance point `T_BAL` (20 ps) are this
model's own choices. The exact logarithmic law and the treatment of an
exactly balanced latch are its own choices too: it resolves to 0 after
70·tau. The transparent phase is not modelled; outputs are referred to the
falling edge. Layout-level variants of these circuits are not modelled.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `eds_dvs_top` | `IMG_W`, `IMG_H` | 512, 32 | stored block size (multiples of 8; at least 16 wide) |
| | `PHI_UP`, `PHI_DN` | 4096, 12288 | DVS windows in clocks |
| | `VLEVEL_INIT` | 0 | level after reset |
| | `VBS_VDD_MV` | 700 | supply row used by the two synchronizer models |
| `vbs_sync` | `MONITORED` | 0 | 0 continuous boost, 1 boost only while metastable |
| | `VDD_MV`, `NR_SPEC` | 700, 35 | table row; N_r the table's resolution times refer to |
| | `T_W`, `T_BAL` | 10 ps, 20 ps | metastability window and balance point of the S/clock overlap |
| `dct2d_eds` | `ROW_EDS_LSB`, `COL_EDS_LSB`, `EDS_PER_STAGE` | 12, 19, 4 | monitored bits |
| `dvs_controller` | `DV_UP`, `DV_DN` | 1, 1 | level steps per decision |
| `eds_dvs_pkg` | `COEF_FRAC`, `VLEVEL_W` | 11, 4 | coefficient scaling, level width |

## Simulating

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb \
    rtl/eds_dvs_pkg.sv tb/tb_eds_dvs_top.sv --top-module tb_eds_dvs_top
./obj_dir/Vtb_eds_dvs_top
```

Substitute any other `tb_*.sv`. All of them finish within seconds.

| testbench | what it checks |
|---|---|
| `tb_eds_cell`, `tb_eds_array` | random early and late transitions against the expected flags and their OR |
| `tb_dct_1d` | every coefficient against a direct 8x8 matrix product built from cosines, and the 2 + k clock latency |
| `tb_dct_transpose_ram` | column-order readout and back-to-back blocks |
| `tb_dct2d_eds` | 24 blocks against a two-stage reference and a floating-point DCT (±2); 21-clock latency; no errors at zero delay; every monitored bit switches |
| `tb_image_ram`, `tb_dct_sequencer` | both memory ports; tile addressing, wrap-around, `pass_done` |
| `tb_dvs_controller` | decisions against a reference model; exact 4096/12288-clock timing at the defaults |
| `tb_vctrl_decoder`, `tb_dvs` | the pin table parsed from its Z/0/1 strings; manual and automatic modes |
| `tb_vbs_sync` | both synchronizer flavours at 0.7 V and 0.4 V: clean and metastable samples, resolution and output times within 2 ps, boost activity, clear during resolution |
| `tb_eds_dvs_top` | the whole system at full size in closed loop (see below) |
| `tb_workloads` | natural, ruler-like and uniform-gray blocks in closed loop: settled level, idle time of each monitored bit, PSNR of the reconstructed output |

The closed-loop benches need two things RTL cannot provide:

* `tb/lt3070_model.sv`, a regulator model. It maps the pin pattern to a
  voltage and applies it 13 µs later.
* A delay model for the monitored bits. Their transitions are delivered to
  the EDS inputs K/(V - 0.5 V) ns after the rising edge, by forcing
  `u_dct.u_eds.d` with delayed copies. K = 1.49 ns·V at 25 °C and rises by
  0.067 %/°C. The constants were chosen so that the loop settles near
  1.10 V at room temperature and near 1.13 V when heated, which is how the
  hardware behaved. The datapath registers see no delay, so results are
  exact at every voltage.

`tb_eds_dvs_top` loads a synthetic picture and checks all 16384
coefficients of a pass in manual mode at 1.20 V. It then switches to
automatic mode and checks the level band at 25 °C, after heating to 85 °C
(the band and the average move up one level) and after cooling. Finally it
re-checks all coefficients. It counts EDS errors, rises, falls, passes,
regulator steps and the mode switch, and fails if any of them never
happened. Alongside, it gives the synchronizer pair a clean sample, a
metastable one and a clear, and checks their timing.

## Data dependence

The loop only lowers the supply safely when the monitored bits keep
switching. `tb_workloads` shows both sides:

* With natural-looking data and with a ruler-like picture the loop settles
  at 1.089–1.133 V. No monitored bit goes unchanged for long: the longest
  idle stretch is about 30 clocks on the natural block and 800 on the
  ruler. A down-decision needs 12,288 error-free clocks, so every monitored
  path is exercised many times within each down-window.
  The bench also reads back the whole output store, inverts the transform
  in floating point and compares with the source block. The PSNR is
  58.8 dB for the natural block and 73.1 dB for the ruler, well above the
  40 dB usually taken as acceptable for 8-bit pictures.
* With a uniform gray field (all pixels 128) every level-shifted sample is
  0. The adders never switch, no error is ever raised, and the loop walks
  the supply down to 0.950 V. This is over-scaling: the monitors have
  nothing to observe.

More monitored bits, bits with shorter logic depth, or a longer down-window
make this less likely but never impossible. For a path of N stages, each
passing a transition on with probability p, and input activity p_in, the
chance that it stays untested for M clocks is (1 - p_in * p^N)^M. Short
paths therefore matter more than many paths. A system that must survive
flat input needs a floor on the level or a periodic activity source.

## How far to trust it, and where it departs

Follows the published design:

* the EDS cell (falling-edge sample, XOR, rising-edge hold) and the OR of
  eight cells on intermediate adder bits of the 14- and 12-bit stages;
* the DVS structure: error bit, E_ref = 1, 4096/12288 windows, one-level
  steps, the 4-bit level, the switch multiplexer and the 16-entry pin table;
* a fully pipelined distributed-arithmetic DCT with 8-bit input and 12-bit
  output;
* one 512x32 block per download, processed repeatedly.
* the two boosted-synchronizer flavours, their phases, and their
  tabulated resolution and nominal delays.

This implementation's own choices:

* all DCT internals: coefficient precision, rounding, the 4 fraction bits
  between the stages, the transposition scheme and the output order. The
  published system reused an existing DCT core whose details are not
  reproduced here, so numerical results differ from it in the last bit;
* the exact monitored bits;
* the reset level, saturation and the window rule when a short window ends
  without error (the long window keeps counting);
* the switch polarity and the host port.

Outside RTL:

* **The timing margin.** The relative margin that makes the scheme safe
  comes from the duty-cycle constraint and from iterating placement until
  enough monitored paths satisfy it. RTL cannot check this. After fitting,
  a timing report must show that the monitored paths' slack to the falling
  edge is below the critical path's slack scaled to the falling edge plus
  the constraint's extra margin.
* **Circuit-level synchronizers.** The boosted synchronizers are
  transistor circuits. `vbs_sync` reproduces their tabulated timing, not
  their electrical behaviour. Pump charge, leakage and energy are not
  modelled. The model does not synthesize.
* **The regulator model and the delay model.** They are bench constructs
  tuned to reproduce the reported operating points, not characterisations
  of real parts.

No synthesis timing, area or power figures for an FPGA are claimed.
