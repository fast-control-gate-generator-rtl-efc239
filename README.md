# Fast Control Gate Generator

A fast control gate generator turns a few trigger signals into precisely timed
pulse trains for a timing system. It is a VME module. An FPGA on it runs
**eight programmable sequencers**. Each one waits for a trigger, either an edge
on its selected front-panel inputs or a "test fire" register write. It then
plays out a programmed series of **prompt pulses**, and after each one an
**echo pulse**. Register masks OR these sixteen pulse trains into:

- **4 external outputs**, and
- **10 partition inhibit outputs**, which can also be forced by **2 global
  inhibit inputs**.

Everything runs on the 59.5 MHz backplane system clock, and all times are
counted in its clocks. The host programs the module through 32-bit registers
over VME, at a base address set by dip switches.

This repository holds synthesizable SystemVerilog for the whole FPGA, plus
self-checking testbenches.

## The pulse series (prompt, echo, stagger)

This is the heart of the design and the part worth reading carefully. Each
sequencer is programmed by four registers:

| quantity      | field bits | meaning                                                   |
|---------------|------------|-----------------------------------------------------------|
| `delay`       | 20         | clocks from the trigger to the first prompt pulse         |
| `period`      | 20         | clocks from the start of one prompt pulse to the next     |
| `width`       | 10         | prompt pulse length in clocks                             |
| `nreps`       | 12         | number of prompt pulses in the series                     |
| `step`        | 16         | stagger step added to the delay for each new trigger      |
| `nsteps`      | 12         | number of successive triggers before the stagger restarts |
| `echo_delay`  | 10         | clocks from the start of a prompt pulse to its echo       |
| `echo_width`  | 10         | echo pulse length in clocks                               |

**Stagger.** Successive triggers do not all start their series at the same
delay. Each accepted trigger has a stagger index `k`. It is 0 for the first
trigger, 1 for the next, and so on up to `nsteps-1`, then back to 0. The
first prompt pulse is delayed by `delay + k*step`. A value of 0 or 1 in
`nsteps` turns the stagger off.

**Exact timing.** Let c0 be the clock cycle in which the sequencer sees its
trigger. Then prompt pulse `j` (`j = 0 .. nreps-1`) starts in clock

    s_j = c0 + delay + k*step + j*max(period,1)

and the `prompt` signal is high in clocks `s_j+1 .. s_j+width`. Echo `j` is
high in clocks `s_j+1+echo_delay .. s_j+echo_delay+echo_width`.

Example: delay 5, period 8, width 3, nreps 3, step 4, nsteps 2, echo delay 2
and echo width 4 give, counting from the trigger clock:

    trigger 1 (k=0): prompt rises at 6, 14, 22    echo rises at 8, 16, 24
    trigger 2 (k=1): prompt rises at 10, 18, 26   echo rises at 12, 20, 28
    trigger 3 (k=0): as trigger 1

**Rules for corner cases.** These are choices of this implementation:

- A trigger is ignored while a series still has a prompt pulse to start.
  `busy` is high in that time. An ignored trigger does not advance the
  stagger. A new series may begin while the last pulses of the old one are
  still high.
- `nreps = 0` produces nothing. `period = 0` behaves as 1. A `width` or
  `echo_width` of 0 suppresses that pulse.
- If a pulse starts while the previous one is still high (`width >= period`),
  the pulses merge into one longer pulse.
- The registers are read live. `step` is read when the trigger arrives,
  `width` when a prompt pulse begins and `echo_width` when an echo begins.
  Reprogram a sequencer only while it is quiet.

**How it is built** (`fcgg_sequencer`).

- A small state machine (idle / delay / run) drives three counters:
  - a delay down-counter, loaded with `delay + k*step - 1`;
  - a period down-counter, reloaded with `period-1` at each pulse start;
  - a count of pulses still to start.
- The cycle in which a pulse begins is marked by a one-cycle `start` strobe.
- A width counter stretches `start` into the prompt pulse.
- The echo uses no second set of counters. Every clock, the `start` strobe
  is written into a 1024-entry one-bit circular delay line. The entry from
  `echo_delay` clocks ago is read back, and a second width counter stretches
  it into the echo pulse. Because of this, an echo delay longer than the
  period, or echoes of one series overlapping the next series, need no
  special handling.
- The delay line is never cleared. An entry counts only if it was written
  after reset and after the last change of `echo_delay`. So changing the
  echo delay never replays old strobes, but it does drop echoes that were
  still pending.
- The stagger offset `k*step` is a 12 x 16-bit product computed at trigger
  time.

## Triggers (`fcgg_input_ctl`)

Each sequencer has an input control register with three fields:

- an enable bit;
- a write-only test-fire bit;
- a 4-bit mask of the front-panel inputs.

The sequencer's input signal is the OR of the masked inputs. A trigger is
generated on a **rising edge** of that signal, or by a test-fire write. The
trigger only happens while the sequencer is enabled, which applies to
external inputs and test fires alike. A write that sets the enable and test
fire bits together fires.

The front-panel inputs are asynchronous. The top passes them through a
two-flip-flop synchroniser (`fcgg_sync`) before the edge detectors, which
adds two clocks of latency.

## Combining the pulse trains

Let `seq = {echo[7:0], prompt[7:0]}` be the 16 pulse trains. Bit `n` is the
prompt of sequencer `n`, and bit `8+n` is its echo. The outputs are built as
follows:

    ext_out[i] = |(seq & outI_mask[15:0])                        i = 0..3

    incl       = |(seq & inhibit_mask_in[15:0])     "included" pulses
    excl       = |(seq & inhibit_mask_in[31:16])    "excluded" pulses
    inh_out[i] = gin[0] | gin[1] | (incl & ~excl & inhibit_mask_out[i])   i = 0..9

Timing of the combined outputs:

- Both `ext_out` and the sequencer term of `inh_out` are registered, so they
  follow the pulses by one clock. This keeps them free of glitches.
- The global inhibit inputs act on every inhibit output without a clock, so
  an external inhibit takes effect at once. This holds whatever
  `inhibit_mask_out` is set to.

## Register map

All registers are 32 bits. Byte offsets are within the module's 256-byte
window. Bits not listed read as 0. Unmapped offsets read 0 and ignore
writes. All registers reset to 0.

| offset          | register           | fields                                                   |
|-----------------|--------------------|----------------------------------------------------------|
| 0x10*n + 0x0    | `period_width`     | [19:0] period, [29:20] width, [31:30] spare (stored only) |
| 0x10*n + 0x4    | `delay_reps`       | [19:0] delay, [31:20] nreps                               |
| 0x10*n + 0x8    | `stagger_reg`      | [15:0] step, [27:16] nsteps                               |
| 0x10*n + 0xC    | `echo_reg`         | [9:0] echo delay, [19:10] echo width                      |
| 0x80 + 4*n      | `seqN_input_ctl`   | [0] enable, [1] test fire (write only, reads 0), [5:2] input mask |
| 0xA0 + 4*i      | `outI_mask`        | [7:0] prompt pulses, [15:8] echo pulses (i = 0..3)        |
| 0xB0            | `inhibit_mask_in`  | [7:0]/[15:8] prompt/echo included, [23:16]/[31:24] prompt/echo excluded |
| 0xB4            | `inhibit_mask_out` | [9:0] inhibit outputs driven                              |

Here n = 0..7 is the sequencer number. The two `period_width` spare bits have
no defined function and are kept only as storage.

## VME access (`fcgg_vme_slave`)

The module answers only 4-byte (D32) memory cycles at a base address set by
dip switches. The rest of the protocol is a plain single-cycle slave built
for this implementation:

- **Addressing.** A24 addressing, with address modifier 0x39 or 0x3D. The 16
  dip switches are compared with A23..A8, and A7..A2 select the register.
- **Cycles that get no answer.** Cycles that are not D32 (LWORD* high, A1
  set, or only one data strobe) and cycles with any other address modifier
  get no DTACK*.
- **Synchronisation.** AS*, DS0*, DS1* and WRITE* are synchronised with two
  flip-flops. An access starts on the falling edge of the synchronised data
  strobes. Starting on the edge rather than the level means a strobe left
  low from a previous cycle, or from a cycle for another board, can never
  start an access.
- **Timing.** DTACK* falls four clocks after the data strobes. DTACK* and the
  data drive are released once a data strobe rises.
- **Bidirectional data bus.** This appears as `vme_d_in`, `vme_d_out` and
  `vme_d_oe`. The board's bus transceivers are outside the FPGA.

Block transfers, bus error replies, other address spaces and interrupts are
not implemented.

## Structure and files

    ext_in --fcgg_sync--> fcgg_input_ctl[n] --trig--> fcgg_sequencer[n] --prompt/echo--+
                               ^ fire                      ^ cfg                        |
    VME <--> fcgg_vme_slave <--> fcgg_regs -----------------+                           |
                                      | masks                                           |
                                      +--> fcgg_output_logic  --> ext_out   <-----------+
                                      +--> fcgg_inhibit_logic --> inh_out   <-- gin ----+

| file (rtl/)              | contents                                                      |
|--------------------------|---------------------------------------------------------------|
| `fcgg_pkg.sv`            | counts, field widths, register offsets, `seq_cfg_t`, `in_ctl_t` |
| `fcgg_top.sv`            | the FPGA top level                                            |
| `fcgg_sequencer.sv`      | one pulse sequencer                                           |
| `fcgg_input_ctl.sv`      | one sequencer's trigger source                                |
| `fcgg_output_logic.sv`   | external outputs                                              |
| `fcgg_inhibit_logic.sv`  | partition inhibit outputs                                     |
| `fcgg_regs.sv`           | register file                                                 |
| `fcgg_vme_slave.sv`      | VME slave                                                     |
| `fcgg_sync.sv`           | two-flip-flop synchroniser                                    |

The reset `rst` is synchronous and active high.

Synthesised generically, the top is about 1,240 word-level cells and 2,200
flip-flops, plus eight 1024 x 1 delay-line memories. The memories suit
distributed RAM in an FPGA.

The top's only parameter is `DIP_W` (16). All other sizes come from the
register map and are fixed in `fcgg_pkg`. The following things are not part
of the RTL:

- the dip switches and the front-panel line drivers and receivers, which are
  analog or mechanical;
- the modules that consume the outputs.

### Total latency, front panel to front panel

An input edge in clock c makes `ext_out` rise at clock

    c + 4 + delay + k*step

This is made up of:

- 2 clocks in the synchroniser;
- 1 clock to the first prompt clock;
- `delay + k*step` clocks of programmed delay;
- 1 clock in the output register.

At 59.5 MHz the fixed part is 4 clocks, about 67 ns. A test fire takes
effect in the clock in which DTACK* goes low.

## Verification

Each testbench checks the hardware against values it works out on its own,
and prints `TB_RESULT checks=N failures=M`.

| testbench (tb/)            | what it checks |
|----------------------------|----------------|
| `tb_fcgg_sequencer`        | Compares prompt, echo and busy every clock against a reference model of the timing rules above. Directed cases: the example series, the exact first-pulse latency, merged pulses, echo delay longer than the period, echo delay 1023, `nreps = 0`, triggers while busy. Then 300 random configurations. |
| `tb_fcgg_input_ctl`        | Edge detection, masking, enable and test fire, against a model of the masked OR. |
| `tb_fcgg_output_logic`     | The output equation with random pulses and masks, including the one-clock latency. |
| `tb_fcgg_inhibit_logic`    | The inhibit equation. It requires included, excluded and global-inhibit cases to occur. |
| `tb_fcgg_regs`             | Every offset written in random order and read back against field masks; the decoded outputs; the test-fire strobe. |
| `tb_fcgg_vme_slave`        | A VME bus-functional master. Checks reads and writes, the DTACK* latency of 4 clocks, and that cycles for another board, other address modifiers or non-D32 cycles get no answer and change nothing. |
| `tb_fcgg_top`              | End to end, with the top at its default parameters. Programs all registers over VME for 40 random configurations, drives inputs, test fires and global inhibits at random, and checks `ext_out` and `inh_out` every clock against a model of the whole board. It fails unless each mechanism occurred: input trigger, test fire, disabled sequencer, trigger ignored while busy, stagger wrap, prompt and echo on an output, included and excluded inhibit, global inhibit, register read-back, and a cycle for another board. |
| `tb_fcgg_fig1_series`      | The example series above, through VME and the front panel. Compares output edges with hand-computed times (prompt at 9/17/25 and echo at 11/19/27 clocks after the input, then 13/21/29 and 15/23/31 with one stagger step). |

Each testbench was also run against a copy of its block with one deliberate
bug, and every one detected it. Examples of the bugs: the period counter off
by one, level instead of edge triggering, prompt and echo mask halves
swapped, excluded pulses ignored, a test-fire strobe that never clears, only
half the base address compared, and the synchroniser bypassed.

The RTL also contains assertions, which are checked when simulating with
`--assert`:

- the VME slave drives data only while DTACK* is low;
- the VME slave holds DTACK* until a data strobe is released;
- the VME slave makes one register write per cycle;
- a running sequencer always has a pulse left to start.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl \
        --top-module tb_fcgg_top rtl/fcgg_pkg.sv tb/tb_fcgg_top.sv
    ./obj_dir/Vtb_fcgg_top

To run another one, replace `tb_fcgg_top` with its name. Each testbench
finishes in well under a second.

## How far to trust it

The following are fully specified by the design, and the RTL implements them
directly:

- the block structure and counts;
- the register map and field widths;
- the masking of inputs into triggers;
- the enable and test-fire behaviour;
- the output and inhibit equations;
- the meaning of each sequencer quantity.

The following are this implementation's own choices:

- the exact clock-level reference points of the sequencer timing (trigger to
  first pulse, start-to-start period and echo delay);
- edge triggering;
- ignoring triggers while busy;
- the stagger index rule `k = 0 .. nsteps-1`;
- the corner cases (zero values, merged pulses);
- the output registers;
- reset values;
- the entire VME protocol beyond "D32 at a dip-switch address".

Anyone matching existing hardware bit for bit should check these first,
above all the VME slave and the one-clock offsets in the latency formula.
