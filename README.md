# Carry-chain TRNG with automatic clock-phase calibration

A true random number generator for FPGAs built from nothing but a clock
manager, a four-stage carry chain and a few registers. It produces one raw
random bit per clock cycle and delivers 64-bit words (32-bit as an option).

The entropy source is a timing violation. A flip-flop clocked by `clk_in`
samples a second clock, `clk_out`, which has the same frequency but a phase
that can be moved at run time. When the `clk_out` edge arrives inside the
flip-flop's setup/hold window, the sampled value is unpredictable. Jitter
and metastability decide it, not logic. Two things make this usable:

* **A carry chain as a fine delay line.** `clk_out` enters the carry input
  of a four-stage carry chain. The four chain outputs are copies of the clock
  edge, each one multiplexer delay later than the one before. Four
  flip-flops sample them, so the clock edge only needs to land somewhere
  inside a window about four multiplexer delays wide, not exactly on one
  flip-flop's setup time.
* **Automatic calibration.** Routing delays differ on every device and
  placement, so no fixed phase works everywhere. A small controller steps
  the clock manager's phase until the sampled bit actually behaves randomly.
  Then it locks.

A post-processing stage of one adder and one conditional inverter whitens
the words at full speed.

## Structure

```
             clk_in ──────────────┬───────────────────────────────────────────┐
                                  │                                           │
  ┌─────────────┐  clk_out  ┌─────▼───────────── trng_sampler ───────────┐    │
  │ clock       ├──────────►│ CYINIT  trng_carry4   O[3:0]  4 FFs  XOR   │    │
  │ manager     │           │ S[3:0] ◄─ en ? 1111 : taps    ──► FF_XOR ──┼─T──┤
  │ (external)  │◄─psen─────┼──────────────┐                             │    │
  │             │◄─psincdec─┤              │                             │    │
  │             ├─psdone───►│ trng_cal_fsm ◄──────────── T ──────────────┘    │
  └─────────────┘           │   en, ce, locked                                │
                            └─────┬──────────┐                                │
                                  │ce        │en (to sampler)                 │
                 ┌────────────────▼──┐    ┌──▼───────────────┐                │
     T ─────────►│ trng_shift_reg    ├─P─►│ trng_postproc    ├──► p_pp, valid │
                 │ (WIDTH bits)      │    │ accumulate, flip │                │
                 └───────────────────┘    └──────────────────┘                │
```

| Module | Role |
|---|---|
| `trng_top` | Wires the blocks together. The clock-manager signals are ports. |
| `trng_sampler` | Selector mux, carry chain, four sampling flip-flops, XOR, FF_XOR → raw bit `T`. |
| `trng_carry4` | Four-stage carry chain (a model of the FPGA's CARRY4 primitive, with delays). |
| `trng_cal_fsm` | Phase search, lock, and the word strobe `ce`. |
| `trng_shift_reg` | Collects `T` into a `WIDTH`-bit word `P`. |
| `trng_postproc` | Accumulation (`P_ACC += P` on `ce`) and bit-flipping → `p_pp`. |
| `trng_pkg` | Shared width, tap count and controller state type. |

Everything runs in the `clk_in` domain. `clk_out` is only ever used as data.

## How the sampler turns a clock edge into a bit

Each carry-chain stage is a multiplexer and an XOR:
`carry[i+1] = S[i] ? carry[i] : D[i]` and `O[i] = S[i] ^ carry[i]`, with
`carry[0] = clk_out`. All `D[i]` are 1.

**During calibration** (`en = 1`) the selectors are forced to `1111`. The
chain then only propagates the carry, and `O[i]` is `~clk_out` delayed by
`XOR_DELAY + i·MUX_DELAY`. On each `clk_in` edge the four flip-flops capture
`O[3:0]`, and FF_XOR registers their XOR as `T`.

* If the `clk_out` edge is far from the `clk_in` edge, all four taps hold the
  same value. Their XOR is 0, so `T` is stuck at 0.
* If the edge lands among the taps, some taps show the old level and some
  the new one. Which taps do depends on jitter, and in hardware one or more
  flip-flops go metastable. `T` is the parity of how many taps switched, so
  it changes from cycle to cycle.

**After calibration** (`en = 0`) the selectors are driven by the sampled
taps themselves. A tap that sampled 0 turns its stage from "propagate" into
"generate a constant 1", which changes which chain outputs carry the clock
edge in the next cycle. This feedback stirs the sampling pattern every
cycle. The selectors come from the registered taps, not straight from
`O[3:0]`, so there is no combinational loop through the chain.

Latency: a change of the `clk_out` phase shows in `T` two `clk_in` edges
later (tap register, then FF_XOR).

## Phase calibration (`trng_cal_fsm`)

After reset the controller repeats this loop:

1. **STEP:** pulse `psen` for one cycle. `psincdec` gives the direction
   (1 = later).
2. **WAIT:** wait for the clock manager's one-cycle `psdone`.
3. **OBSERVE:** skip `SETTLE_CYCLES` (2) cycles, because the pipeline still
   shows the old phase. Then count the ones of `T` over `OBS_CYCLES` (32)
   cycles.
4. If the count lies in `[MIN_ONES, MAX_ONES]` (`[4, 28]`), go to **RUN**.
   Otherwise go back to STEP.

A stuck `T` (0 ones, or all ones) is rejected in either case. After
`MAX_STEPS` (255) steps in one direction the sweep reverses, so the search
stays inside the clock manager's phase range.

One step costs `1 + psdone latency + SETTLE_CYCLES + OBS_CYCLES` cycles.
That is about 40 cycles with a 4-cycle `psdone`. The total calibration time
depends on where the phase starts. The reference figure for this kind of
generator is about 160 cycles on average. In the testbench's clock model,
lock takes 14 steps, about 565 cycles.

In RUN the controller holds `en = 0` and `locked = 1`, and never touches the
phase again. It pulses `ce` in every `WIDTH`-th cycle, the first one in the
`WIDTH`-th locked cycle. Each accumulated word therefore holds `WIDTH` raw
bits that were not used before.

## Word assembly and post-processing

`trng_shift_reg` shifts `T` in at bit 0 on every cycle. `P` always holds the
last `WIDTH` raw bits.

`trng_postproc` has two register stages:

* **Accumulation:** on `ce`, `P_ACC <= P_ACC + P` (modulo 2^WIDTH).
* **Bit-flipping:** every cycle, `p_pp <= {P_ACC[W-1], P_ACC[W-1] ? ~P_ACC[W-2:0] : P_ACC[W-2:0]}`.
  The top bit of the accumulator decides whether the lower bits are
  inverted.

`valid` is high for one cycle, two edges after `ce`, when `p_pp` first shows
the new word. The sequence is: `ce` high in cycle n, `P_ACC` updated at the
end of n, `p_pp` updated at the end of n+1, and `valid` high during n+2.
Words arrive exactly every `WIDTH` cycles, so the output rate equals the raw
bit rate: post-processing adds latency but never throttles the stream.

## Interface (`trng_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk_in` | in | 1 | System clock. Also feed it to the clock manager's input and phase-shift clock. |
| `rst_n` | in | 1 | Synchronous reset, active low. Restarts calibration. |
| `clk_out` | in | 1 | Phase-shifted copy of `clk_in` from the clock manager. |
| `psdone` | in | 1 | Clock manager finished a phase step (one-cycle pulse). |
| `psen` | out | 1 | Request one phase step (one-cycle pulse). |
| `psincdec` | out | 1 | Step direction, 1 = increase. Valid with `psen`. |
| `p_pp` | out | WIDTH | Post-processed random word. |
| `valid` | out | 1 | `p_pp` holds a new word this cycle. |
| `locked` | out | 1 | Calibration finished. |
| `t_raw` | out | 1 | Raw bit `T`, for external health tests. |

The phase-shift ports follow the usual dynamic-phase-shift handshake of FPGA
clock managers (enable, increment/decrement, done), clocked by `clk_in`.

Parameter: `WIDTH` (default 64; 32 is the other intended size). The
controller's window and thresholds are parameters of `trng_cal_fsm`.

## Building it for a real FPGA

`trng_carry4` is a **simulation model**. Its per-stage delays
(`MUX_DELAY` = 40 ps, `XOR_DELAY` = 20 ps) exist only in simulation.
Synthesis ignores them and maps the file to ordinary logic, which loses the
delay line. For hardware:

* Replace `trng_carry4` with the device's carry-chain primitive.
* Add the clock manager with variable phase shift.
* Keep the chain and its four flip-flops together with placement
  constraints.
* Tell timing analysis that the `clk_out` → tap paths are intentionally
  unconstrained.

No entropy claim can be made from simulation. Randomness there comes from
the jitter of the testbench's clock model.

## Design choices beyond the original description

The block structure follows the original description. That covers the
selector mux forcing `1111` during calibration, the carry chain fed by
`clk_out` on CYINIT, the four flip-flops, XOR and FF_XOR, the FSM driving
the phase shift, En and CE, the 64-bit shift register, the CE-gated 64-bit
accumulator, and the top-bit-controlled inverter. The following details were
not specified and are this implementation's own:

* The controller's step/wait/observe algorithm, the ones-count lock window,
  the sweep reversal, and all of its parameter values.
* When `ce` fires: once per `WIDTH` raw bits after lock.
* The tap feedback is taken from the registered taps rather than the raw
  chain outputs.
* Bit `W-1` passes through the bit-flipping stage unchanged. Bits `W-2:0`
  are inverted when it is 1, not when it is 0.
* The bit-flipping register loads every cycle. Only the accumulator is
  clock-enabled.
* The synchronous reset, the `valid`/`locked`/`t_raw` outputs, and the
  `psdone` handshake.
* The adder is plain RTL. A single DSP block is the suggested mapping.

A recalibration path (going back to the search if `T` later gets stuck) is
not part of the design. Monitor `t_raw` externally if that is needed.

## Verification

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| Testbench | What it checks |
|---|---|
| `tb_trng_carry4` | Stage equations for random inputs. The tapped-delay timing: tap i switches `XOR_DELAY + i·MUX_DELAY` after the carry input. |
| `tb_trng_sampler` | Sweeps the `clk_out` edge across the sampling point in 10 ps steps and checks each tap. `T` = XOR of the previous taps. `T = 0` far from the edge. Feedback-mode selector behaviour. |
| `tb_trng_cal_fsm` | Against a scripted clock manager: step count and directions, sweep reversal, rejection of stuck-0 and stuck-1 bits, observation-window length, no step after lock, `ce` spacing. |
| `tb_trng_shift_reg` | Against a reference window. |
| `tb_trng_postproc` | Against a reference accumulator and flip. Covers wrap-around, both flip polarities, and `valid` latency. |
| `tb_trng_top` | Whole design at default parameters, with `tb/dcm_model.sv`. Checks calibration and lock. Rebuilds every 64-bit word independently from `t_raw` and compares it. Checks word spacing of 64 cycles, latency from lock to the first word, and that each mechanism occurs (phase steps, lock, both raw-bit values, accumulator wrap, both flip polarities). |
| `tb_trng_top_w32` | The same at `WIDTH = 32`. |
| `tb_trng_stream` | Ten million raw bits after lock, at default parameters. Ones fraction of `T` and of the output words within 0.2 % of one half. No gap in the word stream. About a minute of simulation. |

`tb/dcm_model.sv` is a behavioural clock manager. It starts with `clk_out`
9.5 ns late in a 10 ns period, steps 25 ps per `psen`, answers `psdone` after
4 cycles, and adds ±30 ps of random jitter per edge. In that model the
generator locks after 14 steps. The raw bit comes out at 50.04 % ones, and
50.006 % after post-processing.

Run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/trng_pkg.sv tb/tb_trng_top.sv --top-module tb_trng_top
./obj_dir/Vtb_trng_top
```

Substitute any testbench name. `-Wno-fatal` is needed only because of the
clock model's variable delays. `--timing` is required: the carry-chain model
and the clock model use delays.

## Size

After generic synthesis the 64-bit top has 231 flip-flop bits: 64 in the
shift register, 64 in the accumulator, 64 in the output register, 4 taps,
`T`, 32 in the controller, and 2 in the `valid` pipeline. It has no memories. The reference 64-bit
implementation on a Cyclone II EP2C35 reported 293 registers and 326 logic
elements, under 1 % of the device.
