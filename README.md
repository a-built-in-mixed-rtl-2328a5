# BIMBO: observing several analog pins at once through an 1149.4 TAP

On a board built for IEEE 1149.4, all AT2 pins share one wire, so only one
analog pin can be watched at a time. BIMBO (built-in mixed-signal block
observer) gets around this. Inside the component it puts a small bank of
first-order sigma-delta modulators on the internal analog test bus. Each
modulator turns one analog signal into a 1-bit stream. The streams are
interleaved onto the ordinary digital TDO pin, one bit per TCK, while the TAP
rests in Run-Test/Idle. The expensive part of a sigma-delta converter, the
decimation filter, stays off-chip in the test controller. The component
therefore pays only for the modulators, a multiplexer, a small FSM and one
4-bit register. Observation does not disturb the circuit: the pins stay in
mission mode, and the AT1/AT2 pins remain free for other use.

This repository holds SystemVerilog for the component's side of the
scheme:

- the 1149.1 TAP;
- the instruction and data registers that BIMBO needs;
- the modulator FSM and multiplexer;
- the TDO output stage;
- behavioural models of the analog parts: the ABM switches, the partitioned
  internal analog bus and the modulators.

The digital part (`bimbo_core`) is synthesizable. The analog parts are
models written with `real` arithmetic.

## Measuring: the access protocol

The controller sets up a measurement with three scans and then just clocks
TCK:

1. **SAMPLE/PRELOAD** (opcode `001`). Shift one 4-bit SBx word per analog pin
   into the ABM control register. Bit *x* of pin *p*'s word closes switch SBx
   of that pin, which connects the pin to internal bus line *x*. Line *x*
   feeds modulator *x*. The register is 16 bits long at the default size. It
   is shifted LSB first: pin 0 bit 0 leaves first, and the last bit shifted in
   is pin 3 bit 3.
2. **CHNSEL** (opcode `100`). Shift a 4-bit word into the CHNSEL register.
   Bit *m* enables modulator *m*. Any combination is allowed. Disabled
   modulators are skipped when the streams are interleaved.
3. **BIMBO** (opcode `101`). Load this instruction and go to Run-Test/Idle.
4. From then on, **every TCK cycle spent in Run-Test/Idle puts one modulator
   bit on TDO**.

The SBx words act on the switches only while the BIMBO instruction is
loaded. Under any other instruction every SBx is open. The SD switches, which
connect each pin to the core, are always closed, so the circuit keeps running
in mission mode throughout.

| opcode | instruction | register between TDI and TDO | effect |
|---|---|---|---|
| `001` | SAMPLE/PRELOAD | ABM control register (NPINS x 4 bits) | loads the SBx words |
| `100` | CHNSEL | CHNSEL (4 bits) | selects the modulators |
| `101` | BIMBO | bypass (1 bit) | applies SBx; streams onto TDO in Run-Test/Idle |
| `111` and all others | BYPASS | bypass | none |

The instruction register is 3 bits long. It captures `001` and resets to
BYPASS, either through TRST* or through Test-Logic-Reset. Test-Logic-Reset
also clears CHNSEL and the SBx words. Capture-DR on the CHNSEL or ABM
register loads the word currently in force, so a scan reads the setting back
while it writes the new one.

## The interleaved stream

This is the part an engineer using the block must get right.

**Frames.** Let N be the number of modulators enabled in CHNSEL. The stream
is a sequence of frames, each N TCK cycles long. A frame carries one bit from
each enabled modulator, in ascending modulator index. For example, with
CHNSEL = `0101` the TDO sequence is m0, m2, m0, m2, and so on.

**Sampling.** All modulators share TCK and one sampling strobe. The strobe is
high in the last slot of each frame, so every modulator takes one sample per
frame:

- the sample rate is TCK/N;
- all bits of a frame belong to the same sample instant;
- each sample reaches TDO exactly once.

Disabled modulators are clocked as well; their bits are simply not sent.

**Edges.**

- The FSM and all registers change on the rising edge of TCK.
- TDO and its enable change on the falling edge, as 1149.1 requires.
- The controller samples TDO on the rising edge that ends the slot.
- The first Run-Test/Idle cycle after Update-IR of the BIMBO instruction is
  slot 0 of the first frame. It carries the lowest enabled modulator.
- `tdo_en` is high in Shift-IR, in Shift-DR and while BIMBO streams.

**Starting and stopping.** Outside streaming, the FSM pointer rests on the
lowest enabled modulator, so every session starts on a frame boundary.

If Run-Test/Idle is left in the middle of a frame, that frame is cut short
and no sample is taken for it. The bits already sent belong to a sample that
will be sent again in full next time, and the controller must discard them.

Any Run-Test/Idle cycle spent under the BIMBO instruction counts as a slot.
This includes the idle cycles between two scans. To stop cleanly, leave
Run-Test/Idle at a frame end and load another instruction straight from
Select-DR-Scan. `tb/tb_bimbo_top.sv` does exactly this.

If CHNSEL is `0000`, TDO carries 0 and nothing is sampled.

**Rates.** The maximum signal bandwidth is TCK / (N x oversampling factor).
At TCK = 20 MHz and an oversampling factor of 500:

| pins observed | samples per modulator | decimated output rate |
|---|---|---|
| 1 | 20 MHz | 40 kHz |
| 2 | 10 MHz | 20 kHz |
| 4 | 5 MHz | 10 kHz |

## Decoding off-chip

The controller splits the stream by slot position and decimates each
modulator's bit stream. The test benches use the simplest filter, which
counts the ones over OSR samples:

    v = VREFN + (VREFP - VREFN) * ones / OSR

The modulator model is a first-order loop:

    bit = (v_int >= 0)
    v_int <= v_int + (ain - (bit ? VREFP : VREFN))

Its integrator stays within about two reference steps. The count of ones over
any window therefore equals the sum of the input samples to within 2 counts.
Sharper filters, such as sinc-k, are the controller's business. So are the
decision logic and any calibration against a direct AT2 measurement.

## Structure

    bimbo_top                     component: digital core + analog models
    ├── bimbo_core                synthesizable test logic
    │   ├── tap_controller        1149.1 16-state TAP, TRST* included
    │   ├── instruction_register  3-bit IR and decoder
    │   ├── bypass_register       1-bit bypass
    │   ├── abm_control_register  SBx words (SAMPLE/PRELOAD), gated by BIMBO
    │   ├── chnsel_register       modulator enables
    │   ├── modulator_fsm         slot pointer and common sampling strobe
    │   ├── modulator_mux         selects the slot's bit
    │   └── (TDO stage)           falling-edge retiming and output enable
    ├── abm_switch_network        behavioural: SBx switches + partitioned bus
    └── sigma_delta_modulator x4  behavioural: first-order modulator

`bimbo_pkg` holds the TAP state enum, the opcodes and the `dr_ctrl_t` bundle,
which carries the Capture/Shift/Update/Reset strobes that every data register
takes.

Parameters of `bimbo_top`:

| parameter | default | meaning |
|---|---|---|
| `NMOD` | 4 | modulators, bus lines and CHNSEL bits, as in the proposal |
| `NPINS` | 4 | analog pins with an ABM (own choice) |
| `VREFP`, `VREFN` | 1.0, 0.0 | modulator DAC levels (own choice, normalised) |

With `NMOD = 2` the design becomes the basic two-channel BIMBO. That version
needs only the two lines of the unpartitioned 1149.4 internal bus.

Top-level ports:

- the TAP pins `tck`, `tms`, `tdi` and `trst_n`;
- `tdo` and `tdo_en`;
- the analog pin voltages `pin_v[NPINS]` (`real`);
- the internal bus lines `line_v[NMOD]` and `line_driven`, brought out for the
  1149.4 bus interface circuit, which is not part of this design.

## Analog parts

The modulators, the switches and the bus are analog. They appear here as
behavioural models with the ports of the real parts:

- **`sigma_delta_modulator`** is a discrete-time model of the loop above. It
  steps once per sampling strobe. TRST* clears the integrator, so the first
  bit is a one.
- **`abm_switch_network`** treats every closed SBx as the same resistance and
  every pin as a stiff source. A line therefore takes the mean voltage of the
  pins connected to it. A line with no closed switch is flagged in
  `line_driven` and reads 0.0. Loading of the pin by the switches is ignored.

Neither model is synthesizable. `bimbo_core` is the part to take to silicon.

## What follows the proposal, and what is this design's own

These points follow the BIMBO proposal:

- a bank of four first-order modulators on one clock;
- one internal bus line per modulator;
- SBx words loaded with SAMPLE/PRELOAD;
- a 4-bit CHNSEL register selecting any combination of modulators;
- an FSM controlled by CHNSEL that drives the multiplexer onto TDO;
- streaming in Run-Test/Idle under an optional instruction;
- SD kept closed;
- an oversampling rate of TCK/N.

The proposal says both that samples are acquired once every four TCK cycles
and that the rate is TCK/N. This design follows TCK/N. With all four
modulators enabled, the two agree.

These are this design's own choices:

- the opcodes and the instruction register length;
- the register bit orders, capture values and reset values;
- ascending slot order;
- sampling at the end of each frame;
- dropping a cut-short frame;
- TDO driving 0 with no modulator enabled;
- using the bypass register for Shift-DR under the BIMBO instruction;
- the number of pins;
- the reference levels;
- the electrical model of the switches.

## Limitations

- **Transport across the board.** The proposal carries the streams to the
  controller through the bypass cells of the other components on the board,
  all in BYPASS. Those components are outside this design. Under plain
  1149.1 a bypass cell shifts only in Shift-DR, not in Run-Test/Idle. A board
  chain therefore needs the other components to do the same, or BIMBO to be
  the last component before the controller. The test benches read the
  component's TDO directly.
- Only the instructions BIMBO needs are built. EXTEST, PROBE, the digital
  boundary cells and the 1149.4 TBIC are not included. Only the SBx bits of
  each ABM are modelled.
- Update stages load on the rising TCK edge that leaves Update-DR or
  Update-IR, not on the falling edge inside it. The difference is invisible
  at the pins.
- No timing closure has been done. 20 MHz TCK is assumed to be easy for logic
  this small, but that has not been checked.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl rtl/bimbo_pkg.sv \
        tb/tb_bimbo_top.sv --top-module tb_bimbo_top -Mdir obj_top
    ./obj_top/Vtb_bimbo_top

Substitute any other testbench name. Add `-Wno-fatal` if lint warnings should
not stop the build.

| testbench | what it checks |
|---|---|
| `tb_bimbo_top` | the whole component at default size, driven through the TAP (see below) |
| `tb_bimbo_workload` | 20 MHz TCK, OSR 500, sine inputs (see below) |
| `tb_tap_controller` | fixed TMS paths, a 2000-step random walk against a state table, TRST* |
| `tb_instruction_register` | every opcode: captured `001`, decoded register and flags, reset to BYPASS |
| `tb_bypass_register` | capture of 0, one-cycle delay, hold when not selected |
| `tb_chnsel_register`, `tb_abm_control_register` | random words: read-back on capture, update only at Update-DR, SBx gated by the BIMBO instruction, reset |
| `tb_modulator_fsm` | all 16 CHNSEL words: slot order, one strobe per N cycles, frame restart |
| `tb_modulator_mux` | exhaustive check |
| `tb_sigma_delta_modulator` | bit-exact against a reference loop, ones density within 2/1000, hold without strobe |
| `tb_abm_switch_network` | random routings: line voltages and `line_driven` |

`tb_bimbo_top` drives the component through the TAP and compares every
streamed bit with reference loops computed in the testbench. It covers:

- 4, 2, 1 and 0 enabled modulators;
- crossed routings, two pins shorted on one line and an undriven line;
- a paused scan and reset by TMS;
- the one-sample-per-frame rate;
- a decimated-voltage check.

It counts each of these mechanisms and fails if one never occurs.

`tb_bimbo_workload` runs four pins at once, then one pin alone. It decimates
each stream with a 500-sample boxcar and checks each output against two
references: the sampled input, and the exact window average of the sine.
