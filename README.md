# SAPIENS associative memory in SystemVerilog

SAPIENS is a non-volatile associative memory used as the back end of a
memory-augmented neural network. A neural network turns each image into a short
feature vector. To learn a new class from a single example ("one-shot"), the
memory stores that example's vector. To classify a new image, the memory
compares the image's vector with every stored vector at once and returns the
class whose vector is closest in L1 distance. This RTL models the published 64-kbit
chip. The chip stores the vectors in a 256 x 256 RRAM array. It computes
the distances in the array with sense amplifiers, not by reading the data out.
It holds 8 copies of a 32-class support set and lets the copies vote.

The digital logic is synthesizable SystemVerilog: the word-line and bit-line
decoders, the bit-line multiplexers, counters, comparator tree, voter and both
controllers. The RRAM array and the sense amplifiers are analog in silicon.
Here they are behavioural models that keep the device-level behaviour the rest of
the design depends on.

## Encoding: why counting matching bits gives L1 distance

A feature vector has 32 elements. Each element is quantized to one of 5 levels
(0..4) and written as a 4-bit thermometer code: level *q* sets the *q* low bits
(1 → `0001`, 3 → `0111`). Element *e* occupies bits `[4e+3:4e]` of the 128-bit
vector. Between two thermometer codes the number of differing bits equals the
difference of the levels. So across the whole vector:

    matching bits = 128 − L1(query, feature)

The largest match count therefore marks the nearest class. `therm_encoder`
does this conversion at both level inputs of the top.

Each stored bit is a **complementary 2T-2R cell**: two RRAM devices on the same
bit line (BL), selected by the word lines WL[2i] and WL[2i+1].

| stored bit | device on WL[2i] | device on WL[2i+1] |
|-----------|------------------|--------------------|
| 1         | LRS (≈10 kΩ)     | HRS (≈200 kΩ)      |
| 0         | HRS              | LRS                |

A query bit turns on one device of the pair: `0` drives WL[2i], `1` drives
WL[2i+1]. When the query bit equals the stored bit, the driven device is the
high-resistance one. A match therefore pulls the BL down weakly and a mismatch
pulls it down strongly.

## Array organisation and the sub-AM banks

* 256 BLs × 256 WLs = 65 536 devices = 256 stored vectors of 128 bits. One BL
  holds one vector.
* 32 sense amplifiers (SAs). SA *j* serves BLs `8j … 8j+7` through an 8:1 mux.
* **Sub-AM bank *k*** is mux input *k*, i.e. the 32 BLs `{k, 8+k, 16+k, …}`.
  BL `8c + k` holds class *c* of bank *k* (`sapiens_pkg::row_of`).
* One bank is sensed at a time, and all 32 classes of that bank are compared in
  parallel, one per SA. The 8 banks are sensed one after the other.

A WRITE command carries a bank mask. The same feature is written into class *c*
of every bank in the mask. This is how the support set is copied into all 8 banks.

## Sensing (`sense_amp`, `match_accum`)

The SA charger pulls the BL up while the selected cells pull it down. The BL
settles at

    V_BL = R_BL / (R_BL + R_charge) · SA_VDD

Here R_BL is the parallel combination of the selected devices. The SA has two
inverter buffers with a low and a high trip point. Their outputs form a
thermometer code of the BL level:

| cells selected | matches | V_BL (VDD 1.0 V, R_charge 7 kΩ) | out_h out_l |
|----------------|---------|---------------------------------|-------------|
| 2 (2-bit mode) | 0       | 417 mV                          | 0 0         |
| 2              | 1       | 576 mV                          | 0 1         |
| 2              | 2       | 935 mV                          | 1 1         |
| 1 (1-bit mode) | 0       | 588 mV                          | 0 1         |
| 1              | 1       | 966 mV                          | 1 1         |

* **2-bit mode**: each cycle drives 4 WLs (query bits 2s and 2s+1). The counter
  adds `out_l + out_h` (0..2). A vector takes 64 cycles.
* **1-bit mode**: each cycle drives 2 WLs (query bit s). The counter adds
  `out_h`. A vector takes 128 cycles, 640 ns at 200 MHz.

The SA supply (`sa_vdd_mv`) and the charger strength (`sa_rchg_ohm`, the
resistance the SA Bias voltage sets) are top-level inputs. They move the BL
voltage windows against the fixed trip points. This is the knob used to
recover accuracy lost to device variation. For example, a 30 kΩ charger
turns the 1-match level in 2-bit mode into a 0 reading.

## One inference, cycle by cycle (`sense_ctrl`)

For each bank in the inference mask, lowest bank first:

| phase | cycles | what happens |
|-------|--------|--------------|
| CLEAR | 1      | the match counters are zeroed |
| SENSE | N (64 or 128) | step *s* drives query slice *s* on the WLs. At the clock edge the array model records, for every BL, the selected devices in HRS, in LRS and relaxed |
| DRAIN | 2      | the SA outputs are registered, then added to the counters |
| CMP   | 1      | the comparator tree's winner (most matches, lower index on a tie) is stored as this bank's answer and cast as a vote |

One FINAL cycle then takes the class with the most votes. A lower class index
wins a tie. `inf_done` pulses in the next cycle. If the request is accepted at
edge 0, `inf_done` is high in cycle **2 + B·(N + 4)** for B banks. This is 546
cycles (2.7 µs at 200 MHz) for all 8 banks in 2-bit mode. The per-bank winners
and best scores are on `inf_bank_class` / `inf_bank_score`.

## Learning: forming and write-verify (`prog_ctrl`)

Devices are handled one at a time, WL 0 first, on BL `8c+b` of each bank *b*
in the mask.

* **CMD_FORM**: a device that does not read LRS gets forming pulses (BL 3.3 V,
  SL 0 V, 1 ms). The WL voltage starts at 1.3 V and rises 50 mV per pulse. The
  ramp stops when the device reads LRS or the next step would pass 2.5 V. In
  the second case `prog_fail` is set.
* **CMD_WRITE**: the device is read with BL 0.2 V and WL 2.5 V. An LRS target
  must read LRS. An HRS target must read above the HRS verify level, so a
  relaxed device fails. If it already holds its target, nothing is done. Otherwise it gets a SET pulse (BL 3.3 V,
  1 µs) or a RESET pulse (SL 3.5 V, 100 µs) and is read again, for up to
  `MAX_PULSES` pulses.
* **Verification passes.** Issue WRITE again for every BL after the whole
  support set is programmed, typically twice. A device that has relaxed is
  re-programmed and the others are left alone.

A pulse is followed by one cycle with the bias held and no pulse, then a read.
Pulse widths are parameters in clock cycles. The defaults are for a 200 MHz
clock: `SET_CYCLES` 200, `RESET_CYCLES` 20 000, `FORM_CYCLES` 200 000.
`prog_pulses` and `prog_form_steps` count the pulses applied since reset.

## Top-level interface (`sapiens_top`)

| port | dir | meaning |
|------|-----|---------|
| `prog_valid`/`prog_ready` | in/out | programming handshake; the command is taken in a cycle where both are high |
| `prog_cmd` | in | `CMD_FORM` or `CMD_WRITE` |
| `prog_class`, `prog_bank_mask` | in | class (BL within each bank) and banks to broadcast to |
| `prog_levels[32][3]` | in | feature levels 0..4 (higher values clip to 4, `prog_clipped`) |
| `prog_done`, `prog_fail` | out | end-of-command pulse; some device missed its target |
| `inf_valid`/`inf_ready` | in/out | inference handshake |
| `inf_levels`, `inf_bank_mask`, `inf_mode_2b` | in | query, voting banks, 2-bit or 1-bit sensing |
| `inf_done`, `inf_class` | out | result pulse and voted class |
| `inf_bank_class`, `inf_bank_score` | out | per-bank winner and its match count |
| `sa_vdd_mv`, `sa_rchg_ohm` | in | sense-amplifier calibration |

Programming and inference share the array and never overlap. If both request in
the same cycle, programming goes first and the inference waits with `inf_ready`
low.

## Files

| file | contents |
|------|----------|
| `rtl/sapiens_pkg.sv` | geometry, bias voltages, pulse widths, operation and command enums |
| `rtl/therm_encoder.sv` | levels → 128-bit thermometer vector |
| `rtl/wl_driver.sv` | WL decoder: query slices in sensing, one WL in programming |
| `rtl/bl_sl_driver.sv` | BL/SL decoder and bias selection per operation |
| `rtl/rram_array.sv` | behavioural model of the 64-kbit 1T1R array |
| `rtl/bl_mux.sv` | the 32 8:1 BL multiplexers (bank select) |
| `rtl/sense_amp.sv` | behavioural model of one sense amplifier |
| `rtl/match_accum.sv` | SA output registers and per-class match counters |
| `rtl/comparator_tree.sv` | arg-max tree |
| `rtl/bank_voter.sv` | majority vote over banks |
| `rtl/sense_ctrl.sv` | inference sequencer |
| `rtl/prog_ctrl.sv` | forming and write-verify sequencer |
| `rtl/sapiens_top.sv` | everything wired together |

## How far to trust it

Everything below is this design's own choice, not taken from the published chip:

* **Sensing time.** The chip is described as driving 4 WLs per cycle at 200 MHz
  and finishing a 128-bit search in 640 ns. Those two statements do not agree:
  4 WLs per cycle needs 64 cycles, which is 320 ns. Here 2-bit mode drives
  4 WLs per cycle (64 cycles) and 1-bit mode drives 2 WLs per cycle (128
  cycles, 640 ns). How the 1-bit mode drives the WLs is an assumption.
* **Bank mapping.** Bank *k* is taken to be mux input *k* (BLs 8j+k). This is
  the reading under which 32 SAs each shared by 8 BLs give 32 rows per bank.
* **Controllers.** The chip's programming and search sequencing is modelled as
  on-chip controllers. The real chip was driven from an FPGA board, and the
  split between chip and board is not known. Both controllers, the
  one-device-at-a-time programming order, `MAX_PULSES` = 8, reading before
  pulsing, and the 2.5 V end of the forming ramp are choices made here.
* **Voltages not given.** The WL level during SET/RESET (2.5 V) and during
  sensing (0.9 V) are not given. They are constants in `sapiens_pkg`. The
  drivers output them as mV codes; the level shifters are not modelled.
* **Array model.** Each device has four states: unformed, LRS, HRS or relaxed.
  A relaxed device is an HRS device that has fallen into the low-resistance
  tail. The backdoor task `relax_hrs` relaxes a chosen share of the HRS
  devices at once, as a stand-in for relaxation after programming.
  Each device's forming voltage is drawn at random between 1.3 V and 2.5 V,
  weighted toward the low end. A pulse changes the device only if it lasted
  the full width. `PULSE_FAIL_PERMILLE` makes a chosen share of pulses fail.
  This stands in for programming variation. Neither is a physical model:
  there is no resistance spread, no gradual drift and no read disturb.
* **SA model.** The resistances are fixed: 10 kΩ for LRS, 200 kΩ for HRS and
  60 kΩ for a relaxed device. A relaxed device narrows the window: with a
  30 kΩ charger a double match that includes one reads as a single match.
  The 500 mV and 750 mV trip points were picked to separate 0, 1 and 2
  matches at 1.0 V and 7 kΩ. The model does not reproduce mismatch, IR drop or
  the chip's measured accuracy.
* **SA clock.** The chip's SA clock has a pre-sensing phase and an evaluate
  phase. Here both are folded into one clock cycle per sensing step. The array
  model samples the BLs at the end of the cycle, and the SA register captures
  the result one cycle later.
* **Tie rules.** On equal scores the lower class wins, both in the comparator
  tree and in the vote.
* **Outside the RTL.** The CNN feature extractor and the floating-point
  quantizer run on the host and are not included. The same goes for the test
  board.

## Simulating

Every file starts with a comment on its function, interface and timing. The
package must be read first. For example, with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/sapiens_pkg.sv tb/tb_sapiens_top.sv --top-module tb_sapiens_top
    ./obj_dir/Vtb_sapiens_top

Each testbench prints `TB_RESULT checks=N failures=M` and stops on a watchdog
if it hangs.

* `tb/tb_<module>.sv` tests each module alone against values worked out
  independently.
* `tb/tb_sapiens_top.sv` uses short pulses and 15 % pulse failures. It forms
  BLs, embeds 32 classes into all 8 banks and checks all 64 kbit. It also runs
  a verification pass on one drifted device, relaxes 2 % of the HRS devices
  and repairs them with a whole-chip verification pass, and runs 2-bit and
  1-bit inferences over all banks and over subsets, a bank that disagrees, a weakened SA charger, simultaneous requests
  and a write that gives up. It counts each of these mechanisms and fails if
  one never occurred.
* `tb/tb_oneshot_workload.sv` runs a 32-way one-shot task on synthetic data.
  It loads closely spaced classes into 8 banks, each bank with its own flipped
  cells, then sends 128 noisy queries with 3 to 8 voting banks in both modes.
  Every bank's answer and every vote is checked against a reference, and the
  testbench prints the accuracy per bank count.
* `tb/tb_sapiens_full.sv` runs the top with all defaults. The array is
  preloaded through the model's backdoor tasks, one class is written with the
  real 100 µs RESET pulses (about 2.6 M cycles), and then an 8-bank inference
  is checked.

The array model provides the testbench tasks `form_all`, `write_row`, `set_dev`
and `get_dev`. Through them a test can preload or disturb the array without
millisecond-long forming pulses.
