# A run-time configurable debug overlay for HLS circuits

Debugging a circuit produced by high-level synthesis (HLS) on an FPGA works best
with record and replay. While the circuit runs at speed, an on-chip trace buffer
records the values of the C variables as they change. Afterwards a debugger
replays the recording against the source code. The usual approach chooses
what to record when the debug instrumentation is compiled. Tracing a
different variable then costs a full FPGA compile, which takes minutes.

This overlay moves that choice to run time. The instrumentation is compiled
once, together with the user circuit. It contains a small table with one
entry per FSM state of the circuit. Between debug runs the host rewrites that
table, and the freeze conditions, over a simple bus. A new debug turn then
takes a few hundred bus writes instead of a recompile. The overlay offers three
capabilities:

- **Selective variable tracing.** Only the parts of the trace that hold
  chosen variables are stored, which lengthens the recorded history (the
  *trace window*).
- **Selective function tracing.** All states of an uninteresting function
  are dropped.
- **Conditional buffer freeze.** A condition on a traced value, tested in a
  chosen state, stops recording. The buffer keeps the history that led up to
  the event.

The overlay only observes the user circuit. It never stalls it or changes
its values.

This RTL follows a published architecture exploration of such overlays:
Variant A and Variant B, the line-packer granularity `G`, and `C` freeze
units. Where that architecture leaves something open, this implementation
makes its own choice, and each choice is marked below. Those choices include
all widths and depths, the host bus, the register map, the stop rule and the
example trace schedule.

## Data path

Each user-circuit clock produces one trace record:

```
 current_func, recode_state_in[]          user_sig[]
        |                                    |
  state_recoder --- s (global state) --> trace_scheduler --> line (128 b)
        |                                    |
   config_ram (entry of s, 1-cycle read)     |
        |                                    |
        +-------- stage register: valid_q, state_q, line_q ----------+
        |                         |                                  |
   Variant B: line_packer    cond_freeze_unit x C --trigger--> stop_write_controller
   (num_words = entry)                                               |
   Variant A: write whole line if entry[0]                           |
        |                                                            |
        +--------------------> trace_buffer <--- trace_buffer_disable
                                    ^
   host_req ---> comm_ctrl ---------+  (config, freeze registers, read-back, status)
```

| Module | Role |
|---|---|
| `hlsd_pkg` | Default sizes, comparator enum, host bus struct, address map, default trace schedule |
| `state_recoder` | Selects the recoded state of the executing function. This gives one global state number `s`. |
| `trace_scheduler` | Builds the trace line for state `s` from the signals that change in that state |
| `config_ram` | One entry per state: `num_words` (Variant B) or `trace_enable` (Variant A). Synchronous read. |
| `line_packer` | Keeps the `num_words` low words of each line and packs them into full buffer lines |
| `cond_freeze_unit` | Masked compare of the trace line in one state. Sets a sticky trigger. |
| `stop_write_controller` | ORs the triggers and freezes the buffer at the right line |
| `trace_buffer` | Circular memory of `DEPTH` lines, with a host read port |
| `comm_ctrl` | Host bus decoder and status registers |
| `hlsd_overlay_top` | Wires the above together. `G = 0` builds Variant A. |

### States, the scheduler and the trace line

An HLS circuit is a set of FSMs, one per function. `state_recoder` gives
each state of each function a single global number. The default is four
functions of 64 states, 256 states in all. That number addresses the
configuration RAM and also selects the trace-scheduler input. The recoding
rule belongs to the instrumentation flow. Here the recoded states arrive as
inputs, one per function, and `current_func` selects between them.

`trace_scheduler` is specific to the circuit. In a state, only the registers
written in that state hold new values. The scheduler therefore places only
those registers in the line, starting at the least significant slot. A real
flow generates the scheduler per circuit. Here the schedule is the package
function `hlsd_pkg::sched_src(state, slot)`, which describes an example
circuit of eight state classes:

| state mod 8 | slots 0, 1, 2, … |
|---|---|
| 0, 5 | nothing |
| 1 | ctrl, r1, r3 |
| 2 | r4, mem (2 slots) |
| 3 | ctrl |
| 4 | ctrl, r10, r12, mem (2 slots) |
| 6 | r5, r6, r8 |
| 7 | r9 |

`user_sig[n]` carries `r(n+1)`, and `mem` is `user_sig[12]` and `[13]`. `ctrl`
is the state number itself. It lets the replay tool tell which state a
packed record came from. The line has `NUM_SLOTS = 8` slots of
`SLOT_W = 16` bits (128 bits). To trace a different circuit, replace
`sched_src`. No other file needs to change.

### Variant A and Variant B

- **Variant A (`G = 0`).** Each configuration entry is one bit. If the bit
  is set, the whole 128-bit line of that state is written. If it is clear,
  nothing is written. This drops untraced states and functions. It saves
  nothing for a state that holds only one short variable.
- **Variant B (`G ≥ 1`).** The line is cut into `G` words of `128/G` bits.
  Each configuration entry gives `num_words` (0..G): how many low words of
  that state's line are kept. The line packer then packs the kept words
  densely into buffer lines. Deselecting a variable near the top of a
  state's line shortens that state's record. Deselecting a whole function
  sets its states to 0.

The host (or the debug tool) computes the entries. For a set of selected
variables, a state needs the words up to the highest slot that holds a
selected variable. The ctrl slot sits at the bottom, so it comes along
automatically. With this layout, selective variable tracing and selective
function tracing are the same mechanism.

## The line packer (Variant B)

This is the part that takes the most care. Each cycle, the packer receives
the staged line `w0..w(G-1)` (`w0` is least significant) and a count
`num_words`. It keeps:

- a line register `f0..f(G-1)`, holding the line being assembled;
- an overflow register `f(G)..f(2G-2)`, holding the words that did not fit
  in the line;
- one count, `cnt`, of all words held. At most `2G-1` words can be held.

On each clock:

1. If the held words make a full line (`cnt ≥ G`), the line register is
   shown on `packed_data` with `lp_full = 1`. The trace buffer writes it in
   that cycle.
2. In the same cycle the overflow words move down to `f0..`, and the base
   count becomes `cnt - G`. If the line was not full, the base is `cnt`.
3. The new words `w0..w(num_words-1)` are written at the base position.
   Any that pass `f(G-1)` land in the overflow register.

Position `i` of the line can therefore receive `w0..wi`, or the overflow
word `f(i+G)`. That multiplexer grows roughly with `G²`. It is why a large
`G` packs better but costs area and clock speed. `lp_full` and
`packed_data` come straight from registers. A line completed by the record
of cycle *t* is written in cycle *t+1*.

Example with G = 4. A 3-word record `a` and then a 1-word record `b` share
one line: `[b0 | a2 a1 a0]`. Next come a 2-word record `c` and a 3-word
record `d`. `c` takes `f0..f1`, and `d` takes `f2..f3` plus one overflow
word. That line is written, and the overflow word `d2` starts the next one.
(At the defaults a word is 32 bits, so S1 keeps 2 words, S4 keeps 3 and S7
keeps 1.)

Choices made here:

- `num_words` above `G` is treated as `G`.
- `clear` (from the host) empties the packer. A line that is only partly
  filled when tracing stops is not flushed to the buffer. It is lost.

## Conditional buffer freeze

Each `cond_freeze_unit` holds four host-written fields:

| Field | Meaning |
|---|---|
| `op` | Comparison: EQ, NE, LT, LE, GT, GE (unsigned), or OFF |
| `state` | The global state in which the unit looks |
| `data_mask` | 128-bit mask applied to the trace line |
| `target_value` | 128-bit value to compare with |

When a valid record is in the chosen state, the unit compares
`line & data_mask` with `target_value`. A hit sets a flag. The flag stays
set until the host clears it. A test like "`a < 0` on line 94" becomes EQ on
the masked sign bit of `a`'s slot, in the state that writes `a`. The
operator set and the unsigned compare are this design's choices. The
sticky flag comes from the architecture.

`stop_write_controller` ORs the flags of all `C` units, so any one condition
freezes the buffer. The hard part is choosing which line to stop at:

- **With a packer (Variant B).** The triggering record may still sit in a
  partly filled packer line. The controller waits for the packer's next
  full line (`lp_full`), lets that line be written, and disables the buffer
  from the next cycle. The buffer then ends with the line that holds the
  triggering record, plus any records that shared that line.
- **Without a packer (Variant A).** The triggering line is written in the
  cycle its trigger is computed, so the disable follows the flag at once.

`trace_buffer_disable` (also the top's `frozen` output) stays high until the
host clears it. The stop rule is this design's reading of the
architecture's "OR trigger function" and its `lp_full` input.

## Timing through the overlay

| Cycle | What happens |
|---|---|
| t | The user circuit is in state `s`. The scheduler builds its line. The config RAM is read at `s`. |
| t+1 | Stage register: `valid_q`, `state_q`, `line_q` and the config entry line up. The freeze units compare. The packer takes the words, or Variant A writes the line. |
| t+2 (or later) | Variant B: the packer line holding the record is written when it fills. |

`valid_q` is `trace_on` delayed by one cycle. Records are taken only while
the host has tracing switched on.

## Host interface

`host_req` is a struct with fields `{we, re, addr[15:0], wdata[31:0]}`. It
carries one request per cycle. Read data arrives on `host_rdata` with
`host_rvalid` one cycle after `re`. An assertion flags a read and a write in
the same cycle. Word addresses:

| Address | Register |
|---|---|
| `0x0000` | Control. Bit 0 `trace_on`. Bit 1: write 1 to clear the buffer pointer, packer and freeze flags. Reads back `trace_on`. |
| `0x0001` | Status (read). Bit 0 frozen, bit 1 buffer wrapped, bit 2 any trigger, bits 31:16 write pointer. |
| `0x1000 + s` | Config RAM entry of state `s` |
| `0x2000 + 64·u + k` | Freeze unit `u`. `k`=0 op, 1 state, 2..5 mask words, 6..9 target words (least significant word first). |
| `0x8000 + 4·l + j` | Trace buffer line `l`, 32-bit word `j` |

A debug turn goes like this:

1. Write control = 2 (clear).
2. Write the config entries, and the freeze units if needed.
3. Write control = 1 (trace on) and run the user circuit.
4. Poll status until `frozen` is set, or stop with control = 0.
5. Read the buffer.

If `wrapped` is set, the oldest line is at the write pointer. Otherwise it
is at 0.

The link from this bus to the host PC (JTAG, UART or similar) is not part of
this RTL. The bus is a top-level port.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `G` | 4 | Packer granularity. 0 builds Variant A. 2, 8 and 16 also work. `128/G` must be an integer. |
| `C` | 1 | Number of freeze units (1..4 were evaluated). 0 builds the cheapest overlay, with selective tracing only. |
| `NUM_STATES` | 256 | Global states (config RAM depth) |
| `NUM_FUNCS` | 4 | `recode_state_in` inputs |
| `NUM_SIG` | 16 | User signals of `SLOT_W` bits |
| `SLOT_W`, `NUM_SLOTS` | 16, 8 | The trace line is 128 bits |
| `DEPTH` | 1024 | Trace buffer lines |

`G = 4` and `C = 1` follow the architecture's main drawings and figures.
The other sizes are this design's choices. At the defaults, yosys maps the
top to about 500 cells and 1450 flip-flop bits, plus the 128 Kibit trace
buffer.

## Simulating

Each testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/hlsd_pkg.sv tb/tb_hlsd_overlay_top.sv --top-module tb_hlsd_overlay_top
./obj_dir/Vtb_hlsd_overlay_top
```

Substitute any other bench name. The simulator works with two-state values,
so every register that is read is reset.

| Bench | What it checks |
|---|---|
| `tb_trace_scheduler`, `tb_state_recoder`, `tb_config_ram`, `tb_trace_buffer` | Each block against a small reference model, with random stimulus |
| `tb_line_packer` | G = 4 and G = 2 against a word-queue model. Every packed line and every `lp_full` cycle is compared. |
| `tb_cond_freeze_unit`, `tb_stop_write_controller` | All operators, masks and states. The freeze cycle with and without waiting for a line. |
| `tb_comm_ctrl` | Address decode, read latency, clear pulse, status word |
| `tb_hlsd_overlay_top` | The whole overlay at the default parameters, through `tb_overlay_env` |
| `tb_overlay_variant_a` | The same end-to-end test with G = 0, C = 2 and a 64-line buffer |
| `tb_overlay_g2_c4` | The same with G = 2, four freeze units (three idle) and a 256-line buffer |
| `tb_overlay_economy` | The same with G = 0 and no freeze units. The trigger value must not freeze the buffer. |
| `tb_trace_window` | Trace-window experiment (see below) |

`tb_overlay_env` runs a model user circuit of four functions and two debug
turns:

- **Turn 1.** Functions 0 to 2 are traced. One state class is shortened. A
  freeze on `r10 == 0xBEEF` in state 68 is armed. The run first wraps the
  buffer, then hits the condition.
- **Turn 2.** The buffer is cleared, only function 3 is traced, and there is
  no freeze.

After each turn it reads back the whole buffer and compares it with an
independent model of scheduler, packer and circular buffer. It also counts
packer spills, wraps, freezes, lines dropped after the freeze, untraced
records and reconfigurations, and fails if any of these never happened.

`tb_trace_window` places five overlays (G = 0, 2, 4, 8, 16) on the same
random run. For each, it measures how many cycles it takes to fill 1024
lines when 100, 50, 25 or 10 % of the 14 variables are selected. On the
example circuit:

| traced | Variant A | G=2 | G=4 | G=8 | G=16 |
|---|---|---|---|---|---|
| 100 % | 1635 | 2706 | 3240 | 4350 | 4350 |
| 50 % | 2005 | 3182 | 3967 | 4915 | 4915 |
| 25 % | 2688 | 5460 | 8103 | 8103 | 8103 |
| 10 % | 3879 | 7951 | 15865 | 21232 | 21232 |

The trend matches the architecture's evaluation: the window grows with `G`
and as fewer variables are traced. With 16-bit slots, G = 8 already cuts
lines at slot boundaries, so G = 16 gains nothing here. A circuit with
narrower variables would gain.

## Departures and limits

- **Example schedule.** The trace scheduler and state recoding are fixed
  example tables, not generated from an HLS design. Tracing a real circuit
  means replacing `hlsd_pkg::sched_src` and driving `recode_state_in` from
  its FSMs.
- **No flush.** A partly filled packer line is never flushed. The last few
  records of a run that stops without a freeze may be missing from the
  buffer.
- **Cheapest build.** `C = 0` gives the cheapest overlay, with selective
  tracing only. The freeze-unit registers then do not exist: writes to
  them are ignored, and the buffer stops only when the host switches
  tracing off.
- **Not included.**
  - Controllability of the user circuit, which is mentioned only as future
    work.
  - The compile-time-only baseline instrumentation that the architecture is
    compared with.
  - The host link and the debugger software.
- **No area or clock-speed numbers.** The area and Fmax numbers of the
  architecture's evaluation came from a vendor FPGA flow. They are not
  reproduced here.
