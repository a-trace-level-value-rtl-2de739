# Decoupled trace-level value predictor

A *trace-level* value predictor guesses the register values a whole stretch of
code (a trace) will produce. With those guesses a processor can jump from the
start of the trace straight to the instruction after it and check the guesses
later. This is the prediction engine of a *Contrail* processor, which splits a
program into two streams:

- the **speculation stream** runs on a fast processing element. It skips every
  trace whose results are predicted.
- the **verification stream** runs on a slow, low-voltage element. It executes
  the skipped traces, checks the predictions and restores state when one was
  wrong.

The energy saving comes from moving the skipped work onto hardware that runs at
lower frequency and supply voltage.

A conventional trace-level predictor keeps a full value history for every
register of every trace in one wide table, so its cost grows with the number of
registers per trace. This design **decouples** the two kinds of information:

- a **trace table (TT)** says which registers a trace produces and which
  instruction (PC) produces each one;
- one ordinary **instruction-level value predictor** (a VHT plus a PHT) is
  asked for those instructions' values, one register per access.

The price is a few cycles per trace; the gain is a much smaller table. With
the default sizes the tables hold about 139 KB: a 1024-entry TT of 27 KB, a
4096-entry VHT of 106 KB and a 4096-entry PHT of 6 KB.

## How a trace is predicted

```
start_pc ──► Trace Table ──(PCs 1..j)──► VHT ◄──► PHT
              tag 2bC nextPC regs PCs      │
                                           ▼
                               one predicted value per access
```

1. **Lookup.** The trace's first PC looks up the TT, which is direct mapped with
   a full tag. A hit yields:
   - the PC that follows the trace;
   - up to four register identifiers, each with the PC of the instruction that
     writes the register last in the trace;
   - a 2-bit saturating counter (2bC). The trace may be skipped
     (`pred_initiate`) only when the 2bC is at least 2.
2. **Per-register prediction.** For each register slot in turn, the VHT is
   read at the slot's PC. The entry's value-history pattern then indexes the
   PHT. Each predicted value leaves on the `pred_*` stream, tagged with its
   register.
3. **Done.** `pred_done` pulses with the hit, initiate and next-PC
   information. A trace with n registers takes **2 + 3n cycles** from start to
   `pred_done` (2 on a miss).

Predictions are made on every TT hit, even when the 2bC does not allow them to
be used. This lets the counter learn whether it would have been right.

## The instruction-level value predictor (VHT + PHT)

Each VHT entry belongs to one instruction and holds:

| field | bits | meaning |
|---|---|---|
| valid, tag | 1 + 29 | PC[31:3] |
| LRU Info | 4 x 2 | codes of the four values, most recently seen first |
| State | 2 | saturating confidence counter |
| Stride | 32 | last value minus the value before it |
| Data Values | 4 x 32 | the last four distinct values, codes 00..11 |
| Value History Pattern | 12 | codes of the last p = 6 outcomes |

The PHT has 2^12 entries. It is indexed by the pattern alone, so all
instructions share it, and each entry holds four 3-bit saturating counters, one
per code.

**Predicting.** The largest of the four counters selects a value; on a tie the
lowest code wins. This is used only if that counter is at least 4. Otherwise
the prediction is the most recent value plus Stride. The value is flagged
confident (`pred_conf`) when State is at least 2.

**Training** with the actual value:

- *VHT miss:* a new entry is written. The value goes in slot 00; State,
  Stride and history start at 0.
- *Value already stored:* its code is the outcome. That PHT counter counts up
  and the other three count down.
- *Value not stored:* it replaces the least recently seen slot, and that
  slot's code is the outcome. All four PHT counters count down, because none
  of them pointed at the right value.
- *Every hit:*
  - the outcome code moves to the front of LRU Info and is shifted into the
    history;
  - Stride is set to the new value minus the previous most recent value;
  - State counts up if the entry would have predicted the value right, and
    down otherwise.

The "all four count down" rule matters. Without it, a steadily striding value
would train the PHT to pick the slot about to be overwritten, which holds a
stale value. With it, striding instructions fall through to the stride path.

## Training and verification

The core reports the executed trace as:

- `start_valid` with `start_pc`;
- one `ret_*` beat per retired instruction, where `ret_wr` marks
  register-writing instructions (branches and stores are not candidates);
- `end_valid` with `end_next_pc`.

At the end:

1. The **trace builder** (`trace_builder`) has kept the registers written, in
   first-write order, with the PC and value of the last writer of each. It
   ignores register 0. A fifth register marks the record as overflowed, since
   an entry holds four.
2. The **verifier** (`trace_verifier`) compares that record with what was
   predicted. It is right only when all of these hold:
   - the TT hit;
   - the record did not overflow;
   - the start PC, the next PC and the register list agree;
   - every value is equal.

   It raises `verify_valid`/`verify_ok`, and `squash` when a wrong prediction
   had been initiated. `verify_wrong_mask` names the wrong slots.
3. The **TT** is updated in two cycles:
   - same trace: the 2bC counts up if the prediction was right, down if not;
   - different trace on an entry whose 2bC is not zero: the counter only
     counts down (hysteresis);
   - otherwise the trace is written as a new entry with 2bC = 1;
   - overflowed traces are never written.
4. The **VHT/PHT** are trained with each register's final value at its
   producer's PC, one register per access. The idle state returns
   **4 + 3n cycles** after `end_valid` (4 when nothing is trained).

`events` carries one-cycle strobes for performance counters, for example to measure prediction accuracy: TT allocation, VHT hit, PHT-chosen value, and whether training found the value right, missed, or replaced a value.

One trace is handled at a time. `start_ready` and `end_ready` are low while
the sequencer is busy and for `VHT_DEPTH` cycles after reset, while the tables
clear themselves. Retirements are accepted every cycle.

## Files

| file | contents |
|---|---|
| `rtl/tlvp_pkg.sv` | widths, sizes, entry and record structs |
| `rtl/tlvp_ram.sv` | table memory: sync read, one write port, self-clearing after reset |
| `rtl/trace_table.sv` | TT with lookup and 2bC/allocation update |
| `rtl/vht.sv`, `rtl/pht.sv` | the two tables of the value predictor |
| `rtl/inst_value_predictor.sv` | VHT + PHT prediction and training |
| `rtl/trace_builder.sv` | records what an executing trace writes |
| `rtl/trace_verifier.sv` | compares prediction and execution, raises squash |
| `rtl/tlvp_ctrl.sv` | sequencer for both phases |
| `rtl/decoupled_tlvp.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_tt_size_sweep` |
| `tb/tlvp_workload_driver.sv` | program driver used by `tb_tt_size_sweep` |

Top-level parameters are `TT_DEPTH` (default 1024) and `VHT_DEPTH` (default
4096). Both must be powers of two. The other sizes are in `tlvp_pkg`:

- four registers per trace;
- four values per VHT entry;
- history length 6;
- 3-bit PHT counters with threshold 4.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, to run the end-to-end test:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/tlvp_pkg.sv tb/tb_decoupled_tlvp.sv --top-module tb_decoupled_tlvp
./obj_dir/Vtb_decoupled_tlvp
```

`tb_decoupled_tlvp` runs the full-size design (default parameters). It runs a
five-trace program for 60 iterations, in which:

- values are constant, striding or periodic with period three;
- one stride is broken every 13th iteration;
- one trace writes six registers;
- one trace changes path every 7th iteration.

It checks every verification against its own comparison of prediction and
execution. It requires the regular traces to be predicted right and initiated
once warmed up, and the broken iterations to be squashed. It also checks the
prediction latency and requires each mechanism to happen at least once: TT
miss, allocation and hit, initiation, hysteresis, pattern and stride
predictions, VHT miss, value replacement, right verification, squash and
overflow.

`tb_tt_size_sweep` runs one program of 300 traces on four predictors at
once. Their trace tables hold 128, 512, 1024 and 4096 entries, and every VHT
holds 4096. For each size it prints values predicted, values right, accuracy,
traces verified right and traces initiated. The tables large enough for every
trace must behave identically and get at least 95% of the values right after
warm-up. The 128-entry table must do worse: here it keeps evicting, so it
predicts nothing. It uses the helper `tb/tlvp_workload_driver.sv`, so add
`-y tb` to the command above when building it.

The unit testbenches compare each block with a reference model written in
the testbench. Memories start with random contents in a two-state simulator,
so every table clears itself after reset.

## Where this design fills in details

These parts are design decisions of this RTL; where the predictor's source
description is silent, they should be judged on their own.

- **Data widths:** PCs and values are 32 bits, registers are 5-bit
  identifiers, and instructions are 8 bytes, as in a 32-bit MIPS-like ISA.
- **Tags:** the VHT and TT are direct mapped, with tags made of every PC bit
  above the instruction offset.
- **History and counters:** history length p = 6, 3-bit PHT counters with
  threshold 4, 2-bit State and its threshold of 2.
  - These sizes put the table budget close to the published cost figures for
    this organisation (about 142 KB for a 1024-entry TT with a 4096-entry
    VHT).
  - They are not from a specification.
- **Value selection:** how State, Stride and the PHT combine into one
  predicted value is this design's rule, and so is the "all counters down
  when the value is new" rule.
- **Trace table policy:** the 2bC starts at 1, and the replacement rule with
  hysteresis is this design's own.
- **Trace boundaries:** the core decides them; no trace-selection logic is
  included.
- **Training data:** the VHT is trained only with each trace's live-out
  values. It is not trained with every retired instruction.
- **Correctness:** a trace prediction is "right" only if every register
  value, the register list and the next PC match.
- **Handling:** the design serves one trace and one table access at a time,
  with no pipelining between requests.

## What is not included

The surrounding Contrail processor is outside this RTL:

- the processing-element datapaths (fast and slow);
- their trace and data caches;
- the per-element voltage/frequency controllers;
- the ring that links the elements;
- the alternative SMT organisation with two pipelines of different speeds.

The predictor's ports are the points where such a core connects. The
conventional (coupled) trace-level predictor is a point of comparison only
and is not implemented.
