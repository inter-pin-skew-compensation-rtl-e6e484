# Inter-pin skew compensation for a 3.2 Gb/s/pin parallel interface

On a wide parallel bus such as a DDR4 data bus, the DQ (data) and DQS (strobe) traces on the board
differ in length and loading. Their edges therefore reach the receiver at different times. At
3.2 Gb/s a bit lasts only 312.5 ps, so a few hundred picoseconds of inter-pin skew close the
common data eye. Matching every trace length makes board routing hard.

This design removes the skew at the receiver. It does not give each pin its own sampling clock
phase, which would need a retiming stage after the samplers. Instead it **delays each input so
that all data eyes line up with the strobe**. Every pin can then be sampled by the same clock.
Every DQ and the DQS pass through a delay line set by an 8-bit code. Those codes are found once,
at power-up, with a clock-like 400 MHz training pattern on every pin. The samplers used in normal
operation act as phase detectors during this calibration, so the extra hardware is small: the
delay lines and one small digital estimator.

The RTL models one byte lane: 8 DQ pins and 1 DQS. A full 64-bit bus with 8 strobes uses eight
copies.

## The two-step algorithm

The reference for alignment is the **most lagging input**, because a delay line can only add delay.

1. **Lock DQS to the latest DQ.** DQS is delayed until it lags every DQ. The eight samplers,
   clocked by the delayed DQS, each read LOW while DQS still leads their DQ. Their NAND is HIGH
   while *any* DQ is still later than DQS, so one binary search on the DQS code finds the latest
   DQ at once. There is no need to compare the pins one by one. If DQS already lags every DQ,
   its code stays at 0.
2. **Lock each DQ to DQS.** With DQS now the latest input, the DQs are calibrated one after
   another. Each DQ's delay grows while its sampler still reads HIGH, that is, while the DQ edge
   still comes before the DQS edge.

Afterwards every DQ edge lies within the sampler's uncertainty window (about 24 ps) plus one code
step of the DQS edge.

## Block map

```
 dq_p/dq_n[i] ──► rcdl (code reg_code[1+i]) ──► saff ──► s_dq[i] ───────────┐
                                                  ▲ clk                      │
 dqs_p/dqs_n ──► rcdl (code reg_code[0]) ──► pulse_gen ── sample_clk        │
                                                  │                          ▼
                                              clk_div2 ── sar_clk ──► skew_estimator ──► reg_code[0..8]
                                                                       │  NAND + 9:1 mux
 cal_start ─► cdc_dll_ctrl ── cdc_ctrl ─► (bias of all rcdl)           │  sar8, sar_repeater
 dll_pd_slow_needed ─┘      └─ lock_pulse ─► start ──────────────────► │  channel_selector
 skew_comp_start ───────────────────────────────────────────────────► │  register_matrix
```

| file | kind | role |
|---|---|---|
| `rtl/skew_pkg.sv` | package | lane size (8 DQ, 9 channels), 8-bit code type |
| `rtl/skew_comp_top.sv` | top | one byte lane, wires everything below |
| `rtl/skew_estimator.sv` | RTL | shared-SAR skew measurement and code storage |
| `rtl/sar8.sv` | RTL | 8-bit successive approximation register |
| `rtl/sar_repeater.sv` | RTL | restarts the SAR for each channel |
| `rtl/channel_selector.sv` | RTL | one-hot channel pointer CH[9:0] |
| `rtl/register_matrix.sv` | RTL | 9 × 8-bit code registers that drive the delay lines |
| `rtl/clk_div2.sv` | RTL | SAR_CLK = sampling clock / 2 |
| `rtl/cdc_dll_ctrl.sv` | RTL | SAR loop that sets the coarse delay cell bias |
| `rtl/rcdl.sv` | behavioural model | register-controlled delay line |
| `rtl/saff.sv` | behavioural model | sense-amplifier flip-flop with uncertainty window |
| `rtl/pulse_gen.sv` | behavioural model | low-swing to full-swing pulse clock |

The delay line, the sampler and the pulse generator are analog circuits in silicon. Here they
are timing models with `#` delays. They simulate, but they do not synthesize. Everything else is
synthesizable RTL.

## The skew estimator in detail

The estimator runs on SAR_CLK, which is the 400 MHz sampling pulse divided by two (200 MHz). It
serves nine channels with one SAR:

| channel | CH bit | comparator input | meaning of comparator = 1 |
|---|---|---|---|
| 0: DQS | CH[0] | NAND(s_dq[7:0]) | some DQ still later than DQS: delay DQS more |
| 1+i: DQ[i] | CH[1+i] | s_dq[i] | DQ[i] still earlier than DQS: delay DQ[i] more |

**SAR.** `sar8` searches MSB first. On `start` it presents 0x80. Each bit then takes two SAR_CLK
cycles. In the first cycle the trial code reaches the delay line through the register matrix,
and a sampling pulse falls halfway through that cycle. In the second cycle the comparator is
read: a 1 keeps the bit, a 0 clears it. The next lower bit then becomes the trial. After bit 0,
`stop` pulses for one cycle.

**Closed loop through the register matrix.** While the SAR is busy, and in its stop cycle, the
selected column of `register_matrix` is rewritten with the SAR output on every SAR_CLK edge. The
selected delay line therefore follows each trial code. When the SAR stops, the final code stays
in that column.

**Repeat.** `sar_repeater` turns each `stop` into a new `start` one cycle later.
`channel_selector` shifts its one-hot pointer to the next channel at the same time. After DQ[7],
the pointer reaches CH[9]. `complete` then rises and the estimator's clock enable drops. This
enable stands in for the gated SAR_CLK of the original circuit. All codes stay frozen until the
next start.

**Timing per run.** One cycle for the start, 8 × 2 cycles for the bits and one stop cycle give
18 SAR_CLK cycles per channel. Nine channels take **162 SAR_CLK cycles = 324 cycles of the
400 MHz strobe**. `complete` rises exactly 162 SAR_CLK cycles after the clock edge that takes
the start request. The published scheme quotes the 324-cycle total. The split into two cycles
per bit is this implementation's reading of it, and it is a parameter (`BIT_CYCLES`).

**Starting a run.** A rising edge of `skew_comp_start` does three things: it loads CH[0], clears
`complete` and clears all nine codes. Clearing the codes means that step 1 always sees the DQs at
minimum delay. In the top, the DLL's lock pulse raises this start by itself.

**Search result.** The SAR ends on the largest code whose comparator answer was 1. A DQ therefore
ends just *before* the DQS edge, by less than one step (about 2.4 ps), unless the sampler window
made a near-edge decision random. The most lagging DQ keeps code 0.

## Delay line, sampler and pulse generator models

**`rcdl`** stands for ten CML coarse delay cells followed by a multiplexer and a phase
interpolator. The code selects tap `code*10/256`, and the remainder interpolates to the next tap.
The resulting delay is linear:

```
delay = T_FIXED_PS + t_cell * 10 * code / 256,    t_cell = T_CELL_MIN_PS + cdc_ctrl * T_CELL_STEP_PS
```

The defaults are 30 ps fixed delay and a cell delay of 40 ps + 0.2 ps × `cdc_ctrl`. At the
locked bias (`cdc_ctrl` = 112) a cell takes 62.4 ps. Codes 0–255 then span 621.6 ps, about two
3.2 Gb/s bits (the original circuit's range is 625 ps), and one code step is 2.44 ps. The
ten-cell structure, the 8-bit code and the two-bit range come from the original design. The
bias law and the absolute delays are this model's own.

**`saff`** samples its differential input on the rising edge of the pulse clock. Its output
appears 50 ps later and is held until the next edge. If the data changes within a 24 ps window
centred on the clock edge, the result is random. That window is what limits the final accuracy.

**`pulse_gen`** emits a 300 ps full-swing pulse 20 ps after each rising edge of the delayed DQS.
The 20 ps offset on the strobe path is absorbed by calibration, because the DQs are aligned to
the pulse itself.

## Coarse-cell DLL

Before skew compensation starts, the bias of the coarse delay cells is fixed by a delay-locked
loop. This keeps the cell delay, and so the delay-line range, independent of process, voltage,
temperature and data rate. In the original design the cells' −3 dB bandwidth is locked to
3.2 GHz.

`cdc_dll_ctrl` is the digital half of that loop: a dedicated 8-bit SAR with the same
two-cycles-per-bit timing, started by a rising edge of `cal_start`. The analog half (a replica
cell chain and its phase detector) is not modelled. Its decision enters on the top-level input
`dll_pd_slow_needed`, where 1 means the cells are still too fast. `lock_pulse` rises 16 SAR_CLK
cycles after the start edge, and `locked` follows one cycle later. The lock pulse starts the
skew estimator.

## Top-level interface (`skew_comp_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `rst_n` | in | 1 | asynchronous active-low reset. SAR_CLK stops during reset, so the reset needs a falling edge. |
| `dq_p`, `dq_n` | in | 8 | buffered differential DQ inputs (the input receivers are outside the model) |
| `dqs_p`, `dqs_n` | in | 1 | buffered differential DQS |
| `cal_start` | in | 1 | rising edge: DLL calibration, then skew compensation |
| `skew_comp_start` | in | 1 | rising edge: skew compensation alone. Must be synchronous to `sar_clk`. |
| `dll_pd_slow_needed` | in | 1 | replica phase-detector decision for the DLL |
| `s_dq` | out | 8 | sampler outputs: received data, and phase decisions during calibration |
| `sample_clk` | out | 1 | full-swing sampling pulse (delayed DQS) |
| `sar_clk` | out | 1 | `sample_clk` / 2 |
| `complete` | out | 1 | skew compensation finished. Codes are valid. |
| `dll_locked` | out | 1 | DLL finished |
| `cdc_ctrl` | out | 8 | coarse delay cell bias code |
| `reg_code` | out | 9 × 8 | delay codes: `[0]` DQS, `[1+i]` DQ[i] |
| `ch` | out | 10 | one-hot channel pointer. CH[9] = done. |
| `sar_busy` | out | 1 | SAR searching |

All SystemVerilog carries `timeunit 1ps; timeprecision 1fs;`.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and contains a watchdog.

| testbench | what it checks |
|---|---|
| `tb_sar8` | the search ends on a random target; `stop` comes 16 cycles after start and lasts one cycle; a clock-enable stall |
| `tb_sar_repeater`, `tb_channel_selector`, `tb_register_matrix`, `tb_clk_div2` | cycle-by-cycle comparison with reference models |
| `tb_skew_estimator` | abstract lane in code units against closed-form expected codes: DQS code = max(DQ skew) − DQS skew; DQ code = DQS skew + DQS code − DQ skew − 1, both clamped to 0…255. Also 162 cycles to `complete`, and frozen codes afterwards |
| `tb_cdc_dll_ctrl` | lock code against a brute-force search; lock timing |
| `tb_rcdl`, `tb_saff`, `tb_pulse_gen` | the timing models against their formulas |
| `tb_skew_comp_top` | the whole lane at default parameters (see below) |

`tb_skew_comp_top` runs the complete calibration nine times with per-pin input skews of 0–600 ps.
Those runs include the two 600 ps corners, and one run where DQS is the latest pin. It recomputes
each pin's delay from the final codes and the delay-line law. Each run must satisfy all of these:

- each DQ edge lies within (−24 ps, 24 ps + one step) of the DQS sampling edge;
- DQS is locked to the latest DQ, or left at 0;
- `complete` comes after exactly 162 SAR_CLK cycles and 324 sampling-clock cycles;
- the SAR makes nine passes.

The test also counts each mechanism (DLL lock, DQS delayed, DQS already latest, DQ delayed, SAR
restart, completion, re-run) and fails if any count is zero. Across seeds, the largest
DQ-to-DQ spread left after calibration is 25–29 ps. Each pin lands somewhere inside the sampler
window rather than all pins at its centre, so the spread can slightly exceed the 24 ps window.

To run one testbench with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
    rtl/skew_pkg.sv tb/tb_skew_comp_top.sv --top-module tb_skew_comp_top
./obj_dir/Vtb_skew_comp_top +verilator+rand+reset+2 +verilator+seed+7
```

The end-to-end run takes well under a second. The testbenches reset or initialise everything
they read, so they also pass when uninitialised state starts random.

## Choices made here, and limits

- **Clock gate as an enable.** The original circuit stops SAR_CLK with an AND gate driven by the
  completion flip-flop. Here that is a synchronous clock enable. The repeater also has a `last`
  input, so that no stray start is left behind after the ninth channel.
- **Start request.** `skew_comp_start` is edge-detected and must be synchronous to `sar_clk`.
  There is no synchronizer.
- **Codes cleared on restart.** A new run zeroes all codes.
- **Two SAR_CLK cycles per bit.** This is chosen to reproduce the 324-cycle total, and it leaves
  one full sampling pulse between a code change and its decision.
- **DLL.** Only the SAR controller is built. The replica detector, and the rule that maps
  bandwidth to delay, are outside the model. The lock target used by the testbenches (62.5 ps
  per cell, so ten cells span 625 ps) is an assumption.
- **Normal operation.** After calibration the samplers are clocked by the delayed DQS pulse. How
  the 3.2 Gb/s data are sampled in normal mode (strobe phase, both edges, deserialisation) is not
  part of this design.
- **Not modelled:** the input receivers (DQ against VREF, differential DQS), CML signal levels,
  and any wider bus than one byte lane.

## Changing it

- `BIT_CYCLES` on `skew_estimator`, `sar8` and `cdc_dll_ctrl` sets the settle-plus-decide cycles
  per bit. A channel then takes `2 + 8 * BIT_CYCLES` SAR_CLK cycles.
- The lane width and the code width live in `skew_pkg` (`N_DQ`, `SAR_BITS`).
- The analog models' delays (`T_*_PS` parameters) can be changed per instance to study range and
  accuracy. Keep the delay-line range above the largest expected skew plus the pulse-generator
  offset.
