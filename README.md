# Remote fault injection on a shared FPGA: victim AES and calibrated power wasters

Two tenants share one FPGA. Neither can reach the other's logic, but both
draw current from the same power distribution network. The attacker fills its
part of the fabric with logic that draws a lot of current when switched: ring
oscillators, AES cores encrypting their own output, or copies of an ordinary
benchmark circuit. It switches all of it with one global **toggle** signal.
A well-timed burst of toggling lowers the supply long enough for the victim's
AES-128 core to latch one wrong byte just before round 9. That one fault is
enough for differential fault analysis (DFA) to recover the key.

The hard part is timing, and it is what this RTL implements. A **calibration
controller** in the attacker's partition looks only at ciphertexts that the
victim returns through its public interface. It adjusts three settings until
the fault lands in the right round:

* the toggle frequency,
* the duty cycle,
* the delay between the encryption request and the start of toggling.

The repository contains:

* the victim core,
* the calibration and toggle logic,
* the three kinds of power waster,
* a top level that places both partitions side by side,
* self-checking testbenches, including an end-to-end run at full size.

The analog coupling between the partitions is not RTL. The end-to-end
testbench replaces it with a behavioural droop model.

## Why only the ciphertext is needed: fault position

AES stores its 16-byte state column by column: byte *i* is in row *i mod 4*,
column *i div 4*. Suppose one state byte is wrong at the input of round 9:

1. Round 9's SubBytes keeps the fault in that one byte.
2. Round 9's ShiftRows moves it into some column *c*.
3. Round 9's MixColumns spreads it over all four bytes of column *c*.
4. Round 10's ShiftRows moves row *r* of that column to column *(c − r) mod 4*.

So exactly four ciphertext bytes differ, on one "diagonal":

| column c | faulty ciphertext bytes |
|---|---|
| 0 | 0, 7, 10, 13 |
| 1 | 1, 4, 11, 14 |
| 2 | 2, 5, 8, 15 |
| 3 | 3, 6, 9, 12 |

Other fault times leave other patterns:

* A fault before round 8's MixColumns spreads to all 16 bytes.
* A fault after round 9's MixColumns changes only 1–3 bytes.

`fault_classifier` turns the XOR of the correct and the faulty ciphertext
into a 16-bit byte mask and sorts it into one of four classes:

| class | byte mask | meaning for the calibration |
|---|---|---|
| `FC_NONE` | no byte differs | droop too weak |
| `FC_USABLE` | exactly one diagonal | hit: fault before round 9; `col` gives c |
| `FC_EARLY` | more than 4 bytes | too early, or several bytes hit at once |
| `FC_LATE` | 1–3 bytes, or 4 bytes not on a diagonal | too late |

The published method only says "too early or too late". Splitting the two by
byte count is this design's reading of it.

## The calibration loop (`calib_ctrl`)

The host (the attacker's software) drives the loop:

1. **`cal_start`** loads the initial period and duty cycle and sets the delay
   to 0. The wasters stay disarmed (`CS_REF`).
2. The host has the victim encrypt a random plaintext. It passes the result in
   as the correct ciphertext (`ref_valid`, `ref_ct`). The controller arms
   (`CS_ARMED`).
3. The host requests encryptions of the same plaintext. It raises `enc_trig`
   in the same cycle as the victim's `enc_start`, and returns each ciphertext
   on `res_valid` / `res_ct`. Each result is classified and reported on
   `rep_valid`, `rep_cls`, `rep_mask` and `rep_col` one cycle later. The
   settings then change as follows:

| outcome | change |
|---|---|
| no fault | period + `P_STEP` (lower frequency) **and** duty + 1/16 |
| too early | delay + `D_STEP` |
| too late | delay − `D_STEP`, not below 0 |
| usable | calibrated: `CS_DONE` |

4. In `CS_DONE` the settings are frozen. The wasters stay armed and every
   further result is still reported, so usable faulty ciphertexts can be
   collected for the DFA. To collect faults for a new plaintext, the host
   loads that plaintext's correct ciphertext with `ref_valid`. The calibrated
   settings stay as they are. The reference encryption itself is requested
   without `enc_trig`, so no toggling happens during it.
5. After `INJ_MAX` attempts without success the controller disarms
   (`CS_GIVE_UP`). The host may then start again with a new plaintext.
   `cal_stop` disarms from any state.

The duty cycle is kept as a 4-bit fraction `duty/16`. The high time per period
is `high = (period × duty) >> 4` cycles.

**Behaviour to know about.** The delay moves in single cycles, but the droop
crosses its critical level in whichever toggle period first drives it high
enough. So the fault time can jump by a whole toggle period when the delay
changes by one cycle. If the usable window is skipped, the controller can swing
between "early" and "late" until it gives up. The droop model in the testbench
shows this swing when the waster bank is weak, so that the droop crosses only in
a later toggle period. The RTL does not correct for this; the remedy is to
choose the initial period and duty so that the first high phase already causes
the droop.

## Toggle generation (`toggle_gen`)

`enc_trig` starts a burst if the controller is armed. Count cycles *k* from
the cycle after the trigger edge. The toggle is then

    toggle(k) = k ≥ delay  ∧  k − delay < window  ∧  (k − delay) mod period < high

It is registered. A new trigger restarts the burst, and dropping `arm` stops it
at once. The burst length `window` is a host setting of this design. The
method itself only specifies frequency, duty cycle and delay.

## The victim: `aes128_core`

An unprotected iterative AES-128 encryptor that takes 50 cycles per block:

* **Edge 0:** `start` is sampled and the initial AddRoundKey is applied.
* **Each round (5 cycles):**
  * Phases 0–3 run SubBytes on one state column each, using four S-boxes.
  * Phase 4 uses the same four S-boxes for the key schedule's
    SubWord(RotWord). The next round key, ShiftRows, MixColumns (not in
    round 10) and AddRoundKey are all applied in this one cycle.
* **Edge 50:** `done` pulses and `ct` is valid. `ct` holds until the next
  start.

The five-cycle split is this design's own choice. Only the 50-cycle total is
fixed by the original attack setup. The result has 401 flip-flops, in line
with the 300–400 registers reported for the attacked module.

The same core is reused as a power waster. Its `ce` input freezes every
register, which is how a waster is switched off. For the victim, `ce` is tied
high.

Fault timing in terms of edges after the start edge:

| edge | effect of a faulty state byte |
|---|---|
| ≤ 39 | early |
| 40–44 | usable |
| 45–49 | late |

The S-box is not a typed table. `aes_pkg::gen_sbox()` computes it at
elaboration: the inverse in GF(2⁸) as a²⁵⁴, followed by the affine map
b ⊕ rotl(b,1..4) ⊕ 0x63. Synthesis turns it into a ROM.

## Power wasters

All three banks sit in `attacker_top`. `waster_sel` (`WS_OFF`, `WS_RO`,
`WS_AES`, `WS_S1238`) routes the toggle to exactly one bank; the original
experiments also used one kind at a time.

* **`ro_grid`: behavioural model, not synthesizable as a working circuit.**
  Each oscillator is one LUT computing `~(node & en)` and feeding itself.
  The model writes that loop with an intra-assignment LUT delay, so an
  event-driven simulator can run it. Synthesis drops the delay and sees the
  intended combinational loops; the loop warnings are expected.
  * A disabled node rests at 1.
  * Nodes are simulated in slices of 64, and all of them switch in phase.
  * The nodes are top-level outputs, because on an FPGA they must be kept
    (as virtual pins) or synthesis removes them.
* **`aes_waster`:** an `aes128_core` clocked by the fast waster clock
  (750 MHz from a PLL in the original setup). It encrypts its own previous
  ciphertext under a fixed key, one block every 51 enabled cycles. While the
  toggle is low its clock enable is low and it does not switch.
* **`s1238_driver`:** input generator for one ISCAS'89 s1238 benchmark
  instance. The input starts at 0 and then follows
  `in_n = in_{n−1} ⊕ (out_{n−1} << 1)`: it flips many bits but still follows
  the circuit's response. The s1238 netlist is not included. Its 14 inputs
  and 14 outputs per instance are top-level ports (`s1238_in`, `s1238_out`),
  and `s1238_ce` is its clock enable.

The toggle reaches the fast-clock banks through two-flop synchronisers
(`sync2`), two fast cycles late.

## Top level: `mt_fpga_top`

The victim runs on `clk_victim` and has a plain request/response interface:
`enc_start`, `enc_pt`, `enc_key` in, and `enc_busy`, `enc_done`, `enc_ct` out.
The attacker partition (`attacker_top`) runs on:

* `clk`, for calibration and toggle timing;
* `clk_waste`, for the fast banks.

There is deliberately no wire between the two partitions. Everything that
links them goes through the host: the trigger and the relayed ciphertexts.

Default sizes:

| parameter | default | origin |
|---|---|---|
| `N_AES` | 60 | AES wasters needed on a Cyclone V |
| `N_S1238` | 280 | s1238 instances needed on a Cyclone V |
| `N_RO` | 3840 | half of an iCE40-HX8K's 7680 LUTs; no count was published for the Cyclone V board |
| `S_W` | 14 | published I/O count of s1238 |
| `INJ_MAX` | 1000 | own choice |
| `CW` | 16 | own choice (counter width) |
| `DW` | 4 | own choice (duty resolution) |

At these defaults, coarse synthesis gives about 28.7k flip-flops and 10.5k
word-level cells, almost all of them in the 60 AES wasters.

## Files

| file | content |
|---|---|
| `rtl/aes_pkg.sv` | AES arithmetic, computed S-box, diagonal masks |
| `rtl/attack_pkg.sv` | fault classes, waster selection, calibration states |
| `rtl/aes128_core.sv` | victim / waster AES-128 core |
| `rtl/fault_classifier.sv` | byte-mask fault classification |
| `rtl/toggle_gen.sv` | toggle burst generator |
| `rtl/calib_ctrl.sv` | calibration controller |
| `rtl/ro_grid.sv` | ring-oscillator grid (behavioural) |
| `rtl/aes_waster.sv` | AES power waster |
| `rtl/s1238_driver.sv` | s1238 input generator |
| `rtl/sync2.sv` | two-flop synchroniser |
| `rtl/attacker_top.sv` | adversary partition |
| `rtl/mt_fpga_top.sv` | top level |
| `tb/aes_ref_pkg.sv` | independent AES reference model with single-byte fault injection |
| `tb/tb_*.sv` | one self-checking testbench per block |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself,
including through a watchdog. With Verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps \
      -y rtl -y tb +libext+.sv -Irtl -Itb \
      rtl/aes_pkg.sv rtl/attack_pkg.sv tb/aes_ref_pkg.sv tb/tb_mt_fpga_top.sv \
      --top-module tb_mt_fpga_top -o sim
    ./obj_dir/sim

For another testbench, replace the last file and the top module name
(`tb_aes128_core`, `tb_fault_classifier`, `tb_toggle_gen`, `tb_calib_ctrl`,
`tb_ro_grid`, `tb_aes_waster`, `tb_s1238_driver`, `tb_attacker_top`,
`tb_dfa_collect`).

### The end-to-end testbench `tb_mt_fpga_top`

It runs the top at its default sizes and takes a few seconds. It acts as the
host software, and it also models the supply.

**Droop model.** Every cycle, `droop += GAIN[bank]` while the toggle drives a
bank, and `droop -= droop/8` as leakage. The first victim edge after the droop
crosses a threshold takes a fault, optionally `LAG` cycles later. The fault is
applied by forcing the victim's next-state value (`u_victim.st_d`) for one
edge, with one byte flipped, or two bytes in different columns when the droop
is very high.

**Independent check.** From the edge index of the strike, the testbench knows
which class the hardware must report. A strike at edge 40 must also reproduce
the reference model's round-9 faulty ciphertext exactly.

**Scenarios:**

1. The RO grid calibrates, and then three more usable faults are collected.
2. The AES wasters calibrate.
3. The s1238 bank, with a droop that always arrives late, gives up after
   1000 attempts.

**Coverage.** The testbench counts every mechanism and fails if any of them
never happened:

* each fault class,
* success and give-up,
* toggle bursts,
* RO oscillation, AES waster blocks, s1238 enable.

The droop model is a stand-in chosen only to exercise the control loop. Its
gains, threshold and lags have no physical calibration.

### The collection testbench `tb_dfa_collect`

This testbench runs the data-collection phase of the key recovery on the
full-size top, with the same droop model:

1. Calibrate once with the RO grid.
2. For fresh random plaintexts under one key, get the correct ciphertext,
   load it as the new reference, and request one attacked encryption.
3. Stop when every diagonal has at least two usable faulty ciphertexts. That
   is the minimum the DFA needs for all 16 last-round-key bytes.

Each report is checked:

* The class must match the model's strike edge.
* The column must match the model's strike byte: state byte *b* lands in
  column (*b* div 4 − *b* mod 4) mod 4.
* Faults at edge 40 must match the reference model bit for bit.

The sweep of fault-injection rate against the amount of attacker logic is
not simulated. That curve is a property of the silicon and its supply, and a
droop model would only reproduce its own assumptions.

With this idealised droop every attacked request yields a usable fault. A
real device yields far fewer per request; the published average was 22 usable
faults out of about 18 000 requests.

## How far to trust it, and where it departs from the original attack

**Checked in simulation:**

* The AES core against the FIPS-197 vectors and an independently written
  reference model.
* The classifier against real faulted encryptions from that model.
* The toggle waveform, cycle by cycle, against its closed form.
* The calibration state machine, step by step, against a software model.
* The whole loop, end to end, with the behavioural droop.

**This design's own choices**, where the original describes only the
behaviour:

* the internal architecture of the 50-cycle AES core;
* the step sizes and the duty-cycle encoding;
* applying the no-fault step to both frequency and duty at once;
* `INJ_MAX`;
* the toggle `window`;
* the early/late rule;
* the frozen-and-armed state after success;
* the clock-domain crossing;
* run-time selection between the three waster banks.

**Not in this RTL:**

* the PLL that makes the fast waster clock;
* the s1238 netlist;
* the power distribution network and the timing fault itself;
* the host software and its bridge to the fabric (serial port or SoC bus);
* the DFA key recovery, which is offline software that needs two usable
  faulty ciphertexts per diagonal (eight in all) to determine the last round
  key.

**The RO grid is only a model.** A real grid's effect depends on placement,
routing and the board's supply. Its size must be scaled to the device:

* 30–50 % of the LUTs on a Cyclone V;
* 115 000 ROs on a Stratix 10.
