# Rollback memory, pipelined stack and PPL register row

This repository holds synthesizable SystemVerilog for the hardware examples of
a specification-driven design flow built around HOP ("Hardware viewed as
Objects and Processes"). In HOP, synchronous hardware is specified as lock-step
processes. Each process has a finite control skeleton, events that select its
transitions, and data values it asserts on or queries from its ports. The RTL
here turns those specifications into clocked logic. One HOP time step is one
rising clock edge.

There are four independent designs. `hop_top` places them side by side. They
share only `clk` and `rst_n`.

| Design | Top module | What it is |
|---|---|---|
| Rollback memory | `rbc_rm3` | Version-controlled memory for Time Warp simulation: snapshot, roll back and discard versions of a data segment |
| Stack | `hop_stack` | A stack built from a pipelined memory, an up/down counter and a controller |
| PPL register row | `ppl_dff_row` | Eight path-programmable-logic D flip-flop cells, each driving a tristate cell onto a column wire |
| Lattice bus | `hop_bus` | A wire with several drivers, resolved on the five-valued HOP bit lattice |

## 1. The rollback memory (`rbc_rm2`, `rbc_rm3`)

### Why it exists

Optimistic ("Time Warp") parallel discrete-event simulation lets each
processor run ahead. When a message arrives from its past, the processor has
to return its data segment to an earlier state. Doing this in software costs a
lot. The rollback memory sits between a CPU and its memory and makes three
operations cheap:

- saving a snapshot (**mark**);
- returning to a snapshot (**rollback**);
- discarding snapshots that can no longer be needed, once global virtual time
  has passed them (**advance**).

`rbc_rm2` implements the second refinement level of the design, called RM2
here: the frame stack with its written bits and archive frame. `rbc_rm3` is
the third level, RM3. It puts a small cache of most recent versions in front
of `rbc_rm2` (see "The MRV cache" below). `hop_top` uses `rbc_rm3`.

### Data structure

The memory keeps several versions of a data segment of `NLINES` lines.

- **Mark frames.** `NFRAMES` frames form a circular buffer. Each frame holds a
  word for every line. `CMF` (current mark frame) is the frame being written.
  `OMF` (oldest mark frame) is the oldest frame still kept. The frames from
  OMF up to CMF are *live*.
- **Written bits.** There is one bit per line and frame, stored as a matrix
  with one row per line (`rbc_wb_array`). A bit is set when the line was
  written while that frame was current. A clear bit is a *hole*: the line kept
  its older value during that frame.
- **Archive frame (Aframe).** Holds, for each line, the newest value older
  than OMF. It is cleared to 0 after reset.

A **read** returns the line's *most recent version* (MRV). This is the word in
the first frame with a set written bit, looking back from CMF to OMF. If no
live frame has the bit set, the word comes from Aframe. `rbc_mrv_search`
finds that frame in one cycle. It rotates the written-bit row of the line and
uses a priority encoder, wrapping around the circular buffer.

### Operations and timing

An operation is accepted when `op_valid` and `ready` are both 1. The requester
must hold `op_valid` and the operands until then; an assertion checks this.
`k` is the frame count of mark, rollback and advance. In this table, cycle 0
is the accepting edge.

| Operation | Effect | Cycles until `ready` returns |
|---|---|---|
| `RBC_WRITE` | Writes the word into frame CMF and sets the line's written bit for CMF | 0 |
| `RBC_READ` | `rdata` carries the MRV with `rvalid=1` two cycles after acceptance; `rframe`/`rarch` say which frame it came from | 2 |
| `RBC_MARK` | CMF += k | 0 |
| `RBC_ROLLBACK` | CMF −= k, then the written bits of the k abandoned frames are cleared, one line per cycle | `NLINES` |
| `RBC_ADVANCE` | OMF += k, then every line is archived and the freed frames' bits are cleared, two cycles per line | 2·`NLINES` |

Illegal requests are refused. The state stays unchanged, and `err` pulses for
one cycle:

- a mark that would need more than `NFRAMES` live frames;
- a rollback that would take CMF behind OMF;
- an advance that would take OMF beyond CMF.

After reset, `ready` stays 0 for `NLINES` cycles while Aframe is cleared.

**Archiving during advance.** Suppose advance moves OMF to a new frame `N`.
For each line whose written bit is clear in frame `N`, the newest version
among the freed frames is copied into Aframe. If none of the freed frames
wrote the line, Aframe already holds the right value and is left alone. Lines
written in frame `N` need no archive: every later read stops at frame `N` or
newer.

**Clearing on rollback.** Frames given up by a rollback will be reused by
later marks, so their written bits must be clear. This design clears them
eagerly, by sweeping every line. That costs `NLINES` cycles per rollback. The
original project proposes a lazy scheme, the "rollback history unit", to
avoid this cost. Its mechanism is not specified, so it is not built.

### Correctness argument

Each RM2 operation must leave every read unchanged relative to a simpler
model (RM1). RM1 is an unbounded stack of frames that never archives or frees
anything, and whose reads search back through all of history. `tb_rbc_rm2`
checks this directly. It runs 4000 random operations through the RTL and
through such a model and compares every read, every refusal and both
pointers. The frame buffer wraps dozens of times during the run. `tb_rbc_workload` repeats the comparison for one million
operations on the full RM3 level at its default sizes.

### The MRV cache (`rbc_rm3`)

A read that misses must search the written-bit row and then read a frame.
RM3 keeps the most recent versions of recently used lines in a cache, so that
such reads are shorter. The cache is fully associative with `NENTRIES`
entries (default 8). Each entry holds:

- a valid bit;
- the line address;
- the data word;
- where that word lives: a frame number, or a flag saying it is the archive
  frame's copy.

Three parts work together:

- `rbc_cache` stores the entries, looks a line up in one cycle, and computes
  which entries a rollback or advance makes stale.
- `rbc_lru` keeps the use order. Its operations are reset, reference (make
  most recently used) and makelru (make least recently used). Its output
  `lru_idx` answers "which entry is least recently used".
- `rbc_rm3` is the controller. It wraps `rbc_rm2` and the two parts above.

The invariant is that a hit always returns the MRV. Three rules keep it:

- Every write goes through to `rbc_rm2`. It also updates the line's entry,
  or allocates one, with frame CMF.
- A miss fills the entry with the word `rbc_rm2` returns, together with the
  `rframe`/`rarch` source it reports. A free entry is used if there is one;
  otherwise the least recently used entry is replaced.
- After a rollback or an advance, every entry whose frame is no longer
  between OMF and CMF is invalidated in one cycle. The invalidated entries are
  then made least recently used, one per cycle, so they are refilled first.
  This clean-up runs while `rbc_rm2` sweeps its lines. It adds no time, as
  long as `NLINES >= NENTRIES + 2`.

Entries holding an archive copy stay valid. A cached archive copy means the
line has no version in any live frame. Any later write would have updated the
entry, so neither rollback nor advance can change that line's MRV.

Timing differs from `rbc_rm2` in two ways:

- A read that hits has `rvalid=1` one cycle after acceptance, and the `hit`
  output is 1. A miss takes two cycles, as in RM2.
- A refused rollback or advance still runs the clean-up, so `ready` returns
  after `NENTRIES+1` cycles.

A rollback or advance with `k=0` costs nothing.

`tb_rbc_rm3` runs the same random comparison against the unbounded stack as
`tb_rbc_rm2`, with 4 cache entries for 16 lines, so hits, misses, evictions
and stale entries are all frequent. It also checks the hit and miss latency.

### Parameters

| Parameter | Default | Note |
|---|---|---|
| `NLINES` | 256 | Lines in the data segment, power of two. This design's choice. |
| `NFRAMES` | 8 | Physical frames, power of two. This design's choice. |
| `DW` | 32 | Bits per line. A line is "a group of bytes"; the width is this design's choice. |
| `NENTRIES` | 8 | Cache entries (`rbc_rm3` only). This design's choice. |

### What the full Roll Back Chip adds, and why it is not here

The later refinements RM4 and RM5 add two parts:

- a per-line "best frame to start the backward scan" table (`LastWA`), with
  window-address registers;
- the lazy rollback history unit.

Only the names of these parts and their fields are known, not their rules.
They are therefore not implemented. The original cache entry also lists
fields named Abit, WB-Dirty, WB, Data-Dirty and WA. Their purpose is not
described, so the cache here leaves them out. In this design the MRV search covers the
whole written-bit row in one cycle, so there is no backward scan to speed up.
The CPU, the communication processor and the memory modules of a simulation
node are also not part of this RTL. The `rbc_*` ports of `hop_top` are the
CPU side of the rollback memory. The frame storage is inside `rbc_rm2`, within `rbc_rm3`
(`rbc_ram` instances) and is not an external memory.

## 2. The stack (`hop_stack`)

This is a small worked example of building a system out of specified parts.

- **`hop_mem`** is a pipelined memory. A write or a nop completes in its
  tick. A read captures the addressed word, and the memory presents it on
  `dout` (`dout_valid=1`) in the *next* tick while it already accepts the
  next command. Back-to-back reads therefore stream one word per tick. A
  write accepted during the delivery tick does not disturb the word being
  delivered. An address at or above `DEPTH` raises `addr_err`: the write is
  dropped, and a read returns 0. With the default `DEPTH` of
  2^`ADDR_W`, no address can be out of range, so `addr_err` stays 0.
- **`hop_ctr`** is an up/down counter holding the stack pointer. It drives
  its value on `cdo` in every tick except a load tick. Up and down take
  effect after the current value has been driven.
- **`hop_sctl`** is the stack controller. It answers an external event in
  the same tick with memory-nop and counter-nop. Then it runs a fixed
  sequence, during which `ready=0` and further events are ignored:

| Event | Tick t | t+1 | t+2 | Stack effect |
|---|---|---|---|---|
| RESET | nops | counter load (`cdi` sampled) | – | pointer := cdi |
| PUSH | nops | counter up | memory write (`din` sampled) | pointer += 1, mem[pointer] := din |
| POP | nops | counter down | – | pointer −= 1 |
| TOP | nops | memory read at pointer | memory nop, `dout` valid | none |
| NOP | nops | – | – | none |

The counter output is the memory address. This timing is the one a tester
must follow. `tb_hop_stack` and `tb_hop_top` both run the reference test
sequence: reset to 0, push 1, push 2, pop, top. They get 1.

Defaults: 8-bit items, 8-bit pointer (256 entries).

## 3. PPL cells and the register row

Path-programmable logic (PPL) builds a chip by tiling predefined cells. Two of
those cells are modelled behaviourally, as one protocol step per clock edge.
The transistor circuits are not modelled.

- **`ppl_dff_cell`** ('D' cell) is a master/slave flip-flop on one clock,
  `phi`. While `phi` is high, the master stores `not d` and `q` shows the
  slave. While `phi` is low, the slave takes `not master`, and `q` shows the
  captured value at once. Put simply, `d` is sampled while `phi` is high and
  appears on `q` in the first tick with `phi` low. The cell has no reset.
- **`ppl_tristate_cell`** ('3' cell) drives `in_i` when `ctl` is 1 and
  releases the wire otherwise.
- **`ppl_dff_row`** places eight D cells over eight '3' cells, as in a
  register slice of the Rollback History Chip. Each `q` feeds its tristate,
  and one `ctl` line enables all of them. The result is a register that puts
  its word on the column wires `col_o` on command.

High impedance cannot be represented in a two-state simulator. For that
reason the tristate output is a value of the HOP bit type (`hop_bit_t`), not
a Verilog `z`. A tristate only ever produces Z, T or F. The top bit of the
three-bit encoding, which only E sets, is therefore always 0 on its output
and on the row's columns.

## 4. The HOP bit lattice and `hop_bus`

`hop_pkg::hop_bit_t` has five values:

- `HB_Z`: not driven;
- `HB_T` and `HB_F`: true and false;
- `HB_U`: unknown;
- `HB_E`: error.

They are ordered Z < {T, F, U} < E, where T, F and U are mutually
incomparable. A wire with several drivers carries the least upper bound of
their values (`hop_lub`). Nobody driving gives Z, agreeing drivers give their
value, and a conflict gives E. `hop_bus` applies this rule to `N` drivers,
with a default of 2. The PPL column wires are meant to be resolved in this
way when several rows share them.

## 5. Top level

`hop_top` exposes each design's ports with a prefix: `stk_`, `bus_`, `ppl_`
and `rbc_`. Its parameters pass through to the designs. The event encodings
(`mem_cmd_t`, `ctr_cmd_t`, `stack_cmd_t` in `hop_pkg`; `rbc_op_t` in
`rbc_pkg`) are this design's own choice. The original specifications leave
event encodings open.

## 6. Simulation

Each module has a self-checking testbench, `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs.
All of them use Verilator 5. For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/hop_pkg.sv rtl/rbc_pkg.sv tb/tb_rbc_rm2.sv --top-module tb_rbc_rm2
./obj_dir/Vtb_rbc_rm2
```

| Testbench | Checks against |
|---|---|
| `tb_hop_top` | End-to-end run of all four designs at default sizes; counts every mechanism (stack tester, busy-ignore, pipelined read, bus conflict, row load/drive/release, rollback-memory write/read/mark/rollback/advance/archive reads/three refusals/buffer wrap, cache hit/miss/stale entry dropped/LRU eviction) and fails if one never occurs |
| `tb_rbc_rm3` | Unbounded-stack reference model through the cache, random traffic, hit and miss latency |
| `tb_rbc_workload` | One million random operations on `rbc_rm3` at its default sizes, with a moving hot set of lines, against a per-line version-list model of the unbounded stack (about 10 s in Verilator) |
| `tb_rbc_rm2` | Unbounded-stack reference model, random traffic, exact cycle counts, source frame of each read |
| `tb_rbc_cache`, `tb_rbc_lru` | Reference entry array with random CMF/OMF; reference use-ordered list |
| `tb_rbc_mrv_search`, `tb_rbc_wb_array`, `tb_rbc_ram` | Step-by-step reference search, reference matrix, reference array |
| `tb_hop_stack` | Reference tester sequence plus random traffic against a model stack, exact tick timing |
| `tb_hop_mem`, `tb_hop_ctr`, `tb_hop_sctl` | Reference memory, reference counter, expected event sequences |
| `tb_ppl_dff_cell`, `tb_ppl_dff_row`, `tb_ppl_tristate_cell` | Master/slave model, stored words on the columns, truth table |
| `tb_hop_bus` | Least upper bound found by searching the lattice order |

Block testbenches use reduced sizes where that makes wrap-around and error
cases frequent. For example, `tb_rbc_rm2` uses 4 frames and 16 lines.
`tb_hop_top` uses the defaults.

## 7. How far to trust it, and where it departs from its source

Taken from the specifications:

- the pipelined memory's state machine;
- the counter's events;
- the stack controller's event sequences and the stack's external timing;
- the D-cell and tristate-cell behaviour;
- the eight-cell row and its wiring;
- the bit lattice;
- the rollback memory's data structure, operations, MRV read rule and
  archiving rule;
- the RM3 split into cache, LRU unit and controller, the LRU operation
  names, and the rule that a cache hit must return the MRV.

Choices made here, where the source is silent:

- all widths and sizes except the 8-bit stack items and the 8-cell row;
- event and operation encodings;
- reset behaviour;
- the `ready`/`op_valid` handshakes;
- the cycle timing of the rollback memory;
- refusing illegal mark/rollback/advance instead of entering an error state;
- mark overflow checking against the circular buffer;
- clearing Aframe to 0 after reset;
- the cache's size, organisation, write-through/write-allocate policy,
  invalidation rule and LRU operation semantics.

Points of interpretation:

- **Which frames advance frees.** Advance by `k` frees frames `OMF` to
  `OMF+k−1`, and `OMF+k` becomes the oldest kept frame. The archive rule
  looks back from `OMF+k`, so that frame must survive.
- **Write address after a read.** A write accepted in the tick that delivers
  a read uses the newly presented address.
- **Rolled-over frames.** Rollback clears the written bits of the frames it
  abandons. Without this, a later mark would make stale writes visible again.

The source also describes a faulty controller variant (TOP without a memory
read) and a timing-free requirements specification of the stack. Neither is
hardware of this design.
