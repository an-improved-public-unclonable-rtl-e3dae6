# Glitch-PUF licensed divider IP

An IP vendor wants to hand out an evaluation copy of a core that stops working after a set time and can then be re-enabled only on the chip it was licensed to. This design does that for a small 4-bit divider core:

* an **FSM hardware trojan** inside the core counts out an evaluation period (4 minutes at 24 MHz) and then triggers a **payload** that forces the divider's quotient and remainder to zero;
* a **physical unclonable function (PUF)** on the same FPGA gives a chip-specific 90-bit signature. Nothing is stored for it: the bits come from random delay differences inside the fabric;
* an **authentication unit** applies a challenge to the PUF. If the response matches the challenge-response pair enrolled for this chip (`0001 -> 0011`), the trojan moves to its unlocked state and the divider works again.

The PUF is an improved form of the Anderson glitch PUF for Xilinx FPGAs (J. H. Anderson, ASP-DAC 2010). Two LUTs in shift-register mode race through a carry chain. The improvement is an active-low glitch that clears the bit flip-flop, instead of an active-high glitch that presets it, plus a "one-shot" evaluation from a freshly re-initialised state with an extended carry chain. The rest of this file spends most of its room on how a bit is made, because that is the part that is not ordinary logic.

```
            go, dividend, divisor                        auth_req, challenge
                    |                                            |
             +------v------+   lock   +------------+  pass  +----v-----+
quotient <---| divider4_ip |<---------| trojan_fsm |<-------| puf_auth |---> auth_done,
remainder <--|  (payload)  |          +------------+        +----+-----+     auth_pass,
             +-------------+                         start |     ^ done,    auth_response
                                                           v     | signature
                                              +------------------+-+
                                              |  puf_oneshot_ctrl  |
                                              +--+-----------------+
                                   load/init/shift |     ^ sig_q (90)
                                              +----v-----+--+
                                              |  puf_array  |  90 x puf_bit
                                              +-------------+
```

## How one PUF bit is made

Each `puf_bit` contains three LUTs used as 16-bit shift registers (`lut_srl16`), a short carry chain (`carry_glitch_chain`) and one flip-flop.

* **LUT A (top)** holds `16'h5555` and **LUT B (bottom)** holds `16'hAAAA`. The output is bit 15 and is fed back into bit 0, so the pattern repeats every 16 shifts. Right after loading, A = 0 and B = 1. One shift later A = 1 and B = 0. The two LUTs always switch in opposite directions on the same clock edge.
* The LUT outputs drive the **select inputs of carry-chain multiplexers**. The constants on the data inputs are chosen so that the chain output N2 is 1 whenever A and B are complementary:

  ```
  bottom mux (select B):       N1  = B ? 0 : 1
  extra mux  (select X = 1):   N1X = X ? N1 : 1
  top mux    (select A):       N2  = A ? N1X : 1
  ```

* **The race.** On the edge where A rises and B falls, the outcome depends on which path is faster:
  * If the bottom path (LUT B, its multiplexer and the extra stage) is faster, N1X is already 1 when A arrives, and N2 stays at 1.
  * If the top path is faster, A = 1 arrives while N1X is still 0. N2 then dips to 0 for the difference of the two path delays. This is an active-low glitch.

  Nominally the paths are equal, so the sign of the difference comes from process variation and differs from bit to bit and from chip to chip.
* **The flip-flop** is set to 1 before the race. N2 drives its **asynchronous clear**. A glitch that reaches the clear pin leaves a 0. Without one, the bit stays 1. So **bit = 1 means the bottom path won, and bit = 0 means the top path won** by enough margin.
* **The routing low-pass.** The wire from the carry chain to the clear pin swallows short pulses. In the model, a pulse shorter than `T_FILTER_PS` never arrives. A longer pulse arrives shortened by `T_FILTER_PS`. This is why the original active-high/preset version was unreliable: near-threshold glitches sometimes got through and sometimes did not.
* **The extra carry stage.** A third LUT, loaded with all ones, selects an additional carry multiplexer between the bottom and the top stage. This lengthens the bottom path and makes the glitches long enough to survive the routing.

### Why "one-shot"

If the LUTs keep rotating, the race repeats on every edge, in both directions. On the opposite edge (A falls, B rises), a bit whose bottom path is faster produces the glitch instead: N2 = 0 while A is still 1 and B is already 1. A free-running bit therefore drifts towards 0 over time. That is the saturation the original design suffers from. The one-shot evaluation (`puf_oneshot_ctrl`) avoids it: it samples exactly one race from a known start.

| state   | cycles   | action |
|---------|----------|--------|
| LOAD    | 1        | `lut_load`: LUTs back to their INIT values (A = 0, B = 1) |
| INIT    | 1        | `ff_init`: every bit flip-flop set to 1. This also overwrites any glitch caused by the reload itself |
| SHIFT   | `SHOTS` (1)  | `lut_shift`: one step, A 0->1, B 1->0. This is the race |
| SETTLE  | `SETTLE` (2) | glitches (sub-nanosecond) reach the clear pins |
| CAPTURE | 1        | the 90 flip-flops are copied to `signature`, `done` pulses on the next cycle |

From the clock edge that samples `start` to `done` takes `3 + SHOTS + SETTLE` = 6 cycles. Setting `SHOTS` above 1 reproduces the free-running behaviour; `tb_puf_bit` shows the drift.

### The delay model

Silicon delay variation cannot be written in RTL. `carry_glitch_chain` is therefore a **behavioural model** with `#` delays and is not synthesizable as a PUF. On an FPGA it is replaced by the real LUTs and the placed carry chain. The rest of `puf_bit` (shift registers and flip-flop) is ordinary synthesizable logic.

`puf_array` gives every bit its own delays:

```
path A = T_LUT_PS + T_EXT_PS + vA        path B = T_LUT_PS + vB   (+ T_EXT_PS in the chain)
vA, vB = (xorshift32(xorshift32(seed ^ (i+1)*0x9E3779B9 ^ K_path)) mod 201) - 100    [ps]
K_path = 0x27D4EB2F for path A, 0x85EBCA6B for path B
bit i  = 0  if  vB - vA >= T_FILTER_PS (25 ps),  else 1
```

`DEVICE_SEED` selects the simulated chip. The default, 10, is a chip whose bits 7..4 are `0011`. It therefore answers the enrolled challenge `0001` correctly. It has 61 ones and 29 zeros. Four seeds (10, 20, 30, 40) differ pairwise by 35 to 54 bits, with a mean of 45.5 of 90. That matches the ideal of half the bits and is close to the 43 bits measured between four regions of a Virtex-5 in the reference experiment. The model has no noise, so repeated evaluations of one chip are identical. Real intra-chip variation (about 5 % reported for this PUF, against 30 % for the original) is not modelled.

All delay numbers (`T_LUT_PS` = 400, `T_EXT_PS` = 60, `VAR_PS` = 100, `T_FILTER_PS` = 25) are this design's own illustrative values, not measurements.

## The trojan and its payload

`trojan_fsm` has three states (`puf_pkg::trojan_state_t`):

* `TJ_EVAL`: the IP works. A prescaler counts `PRESCALE` cycles (24,000,000 = one second at 24 MHz). A tick counter counts `EVAL_TICKS` ticks (240 = 4 minutes). The trigger is the rare condition in which both counters reach their last value together, 5.76e9 cycles after reset.
* `TJ_LOCKED`: `lock` is high. In `divider4_ip` it gates the quotient and remainder to zero, which is the payload. The divider core keeps running underneath.
* `TJ_UNLOCKED`: entered on a passing authentication, from either other state, and kept until reset. The counters stop.

An obfuscation metric for trojans of this kind is M_D = F * 2^f * 2^sqrt(f * log10 f) + S_N!. Here F is the number of modified (payload) nodes, f their average fan-in cone size and S_N the number of trojan state elements. For this design F = 2 (quotient and remainder), S_N = 2 (the state register) and f = 7, which gives M_D ~ 1384. That is a moderate level, and it rises with more payload nodes and more state bits.

The general method behind this trojan recommends many more states and counters to hide it (about 20 states with an expected activation time of around 2e16 cycles). This design builds the three-state demonstration version.

## Authentication

`puf_auth` latches the 4-bit challenge on `auth_req` and starts a one-shot PUF evaluation. It then takes the response as `signature[4*challenge +: 4]`, one of 22 four-bit groups. The check passes only when the challenge is the enrolled `AUTH_CHALLENGE` and the measured response equals `AUTH_RESPONSE`. There is no error correction: a real device with noisy bits would need helper data or a fuzzy extractor. Which PUF bits a challenge selects is this design's choice.

## Top-level interface and timing (`puf_locked_divider_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock, 24 MHz on the reference board |
| `rst_n` | in | 1 | asynchronous active-low reset |
| `go`, `dividend`, `divisor` | in | 1, 4, 4 | start a division. `go` is sampled when the divider is idle |
| `quotient`, `remainder` | out | 4, 4 | result, valid from `div_done` on. Zero while locked |
| `div_done` | out | 1 | one-cycle pulse 4 cycles after the edge that samples `go` |
| `auth_req`, `challenge` | in | 1, 4 | start an authentication |
| `auth_done` | out | 1 | one-cycle pulse 8 cycles after the edge that samples `auth_req` |
| `auth_pass`, `auth_response` | out | 1, 4 | result and measured response of the last authentication |

The trojan takes a pass on the clock edge that ends the `auth_done` cycle, so the divider is unlocked from the following cycle on. The signature itself never leaves the chip.

| parameter | default | meaning |
|-----------|---------|---------|
| `PUF_BITS` | 90 | PUF instances |
| `DEVICE_SEED` | 10 | simulated chip |
| `PRESCALE` | 24,000,000 | cycles per evaluation tick |
| `EVAL_TICKS` | 240 | ticks in the evaluation period |
| `AUTH_CHALLENGE` / `AUTH_RESPONSE` | `4'b0001` / `4'b0011` | enrolled pair |

Divider details, all this design's choices: restoring division with one bit per cycle. A zero divisor returns quotient 15 and remainder = dividend.

## What follows the reference design and what does not

Taken from the reference design:
* the 90-bit size;
* the `5555`/`AAAA` LUT patterns and the carry-multiplexer race;
* the swapped multiplexer constants, the active-low glitch and the clear (not preset) pin;
* the extra carry stage with its extra LUT;
* the one-shot evaluation with LUT re-initialisation;
* the three-state counter-triggered trojan with a 4-minute period at 24 MHz;
* zeroed divider results as the payload;
* PUF authentication with `0001 -> 0011`.

Choices of this design where the reference is silent:
* the delay model and its numbers;
* where the extra carry stage sits (between the bottom and the top multiplexer);
* the controller's state sequence and lengths;
* the challenge-to-bit mapping;
* the prescaler/tick split of the counters;
* unlocking that lasts until reset;
* unlocking during the evaluation period;
* all handshakes and the reset behaviour;
* the divider algorithm.

Not built:
* the logic-analyser link (ChipScope) that read results out on the board. It is replaced by the top's output ports;
* the clock source;
* the placement constraints that put the PUF in four regions of the FPGA. Different seeds stand in for these regions;
* the board-level trick of hard-wiring three operand bits to save pins.

## Files

`rtl/`:
* `puf_pkg.sv`: trojan state type, widths, and the delay-model hash;
* `lut_srl16.sv`, `carry_glitch_chain.sv` (behavioural model), `puf_bit.sv`, `puf_array.sv`: the PUF;
* `puf_oneshot_ctrl.sv`, `puf_auth.sv`, `trojan_fsm.sv`, `divider4_ip.sv`;
* `puf_locked_divider_top.sv`: the top.

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), plus:
* `tb_full_size.sv`: the top at its defaults. It runs one division (15 / 3 = 5 r 0), one failing authentication and one passing authentication;
* `tb_region_distance.sv`: the four-placement uniqueness experiment.
* `tb_saturation.sv`: the same chip sampled one-shot (61 ones, stable) and free-running over 2 or 16 edges (28 ones, only near-balanced bits survive).

`tb_puf_locked_divider_top.sv` runs the whole licensing sequence with a 40-cycle evaluation period: correct results, trigger, zeroed results, failing and passing authentications, and correct results again. It counts each of these events. The 5.76e9-cycle default period is not simulated. Every testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

Verilator 5 with timing support is needed because of the delays in the behavioural model. Every file has `` `timescale 1ns/1ps ``. For example:

```
verilator --binary --timing --assert -Irtl rtl/puf_pkg.sv tb/tb_puf_locked_divider_top.sv \
          --top-module tb_puf_locked_divider_top -o sim
./obj_dir/sim
```

Replace the testbench name to run any other. `-Irtl` lets Verilator find each module in `rtl/<name>.sv`. To synthesize for a real FPGA, replace `carry_glitch_chain` with hand-placed LUT/carry primitives of the target family, and lock the placement of each bit.
