# Rollback Chip (RBC): a version-controlled memory for Time Warp

Optimistic parallel simulation (Time Warp) lets each process run ahead and
undo its work when a message arrives "in its past". To undo, a process must
be able to return its memory to an earlier snapshot. Copying the whole data
segment at every snapshot is the expensive part. The Rollback Chip makes
snapshots nearly free. It sits in front of a RAM that holds a circular stack
of *mark frames*, one frame per snapshot, and it provides six operations:

| operation  | meaning                                                        | cycles          |
|------------|----------------------------------------------------------------|-----------------|
| `reset`    | forget everything; frame 0 becomes the only frame              | 2               |
| `read a`   | newest surviving version of word `a`                           | 1               |
| `write a d`| write `d` to word `a` of the current frame                     | 2               |
| `mark`     | start a new snapshot (new current frame)                       | 1               |
| `rollback` | discard one or more of the newest frames                       | 1               |
| `advance`  | discard the oldest frame (fossil collection)                   | WORDS + K + 3   |

K is the number of words that an advance copies into the archive frame.
The cycle counts run from the clock edge where the request is accepted to the
`done` pulse, with that edge counted.

This RTL follows the structural design of the RBC published by
Gopalakrishnan and Fujimoto (1991). That design was verified formally against
a simple specification. In the specification every mark copies the whole
current frame into the next one. The chip must give the same answer to every
read as that specification would.

## The idea: write where you are, search backwards when you read

Two pointers describe the stack. **CMF** (current mark frame) is the frame
that writes go to. **OMF** (oldest mark frame) is the oldest frame still
kept. Both count modulo `NFRAMES`, so the stack is a ring. One extra frame,
the **archive frame** (frame number `NFRAMES`), holds each word's value as it
stood before OMF.

* A **mark** only steps CMF. Nothing is copied, so the new frame starts empty:
  it is full of holes.
* A **write** stores the word in frame CMF. It also sets the word's
  *written bit* for that frame. Each address has one `NFRAMES`-bit word of
  written bits, kept in the WB store.
* A **read** fetches the address's written bits. It then looks for the first
  set bit scanning from CMF downwards, wrapping around, until it reaches OMF.
  That bit names the frame holding the most recent version (MRV). If no bit in
  that range is set, the word has not changed since the oldest snapshot, and
  the chip reads it from the archive frame.

The search is done in one cycle by the **circular priority encoder**
(`rbc_cpencode`). It is an ordinary priority encoder whose highest-priority
position is CMF rather than bit 31. Positions outside the circular range from
CMF down to OMF are ignored. The original design builds it as a ring of cells
with propagate and kill chains, which is a combinational loop. This RTL
computes the same function without a loop: it rotates the word so that CMF
comes first, then scans it.

## Lazy clearing: the rollback history stack

This is the subtle part of the design.

A rollback discards frames, so their written bits must stop counting. Clearing
them would mean visiting every address. The chip avoids that with two
structures:

* **CRBI**, the current rollback index. It counts the rollbacks since reset
  (and the marks, see below).
* **RBH**, the rollback history stack. It holds one `NFRAMES`-bit mask per
  value of CRBI.

Each written-bits word carries a **timestamp tag**: the CRBI value at the time
the word was last written. Entry `RBH[i]` has a 0 for every frame discarded by
any rollback since rollback number `i`. So before the chip uses a
written-bits word, it ANDs the word with `RBH[tag]` (gate WBAND). Stale bits
vanish at that moment, and nothing is ever cleared in place.

A rollback with mask `rbdest` does the following in one clock:

1. It ANDs `rbdest` into every entry from `RBH[0]` to `RBH[CRBI]`. In
   `rbdest`, a 1 means "this frame stays" and a 0 means "this frame is
   discarded".
2. It pushes an all-ones entry at `RBH[CRBI+1]` and increments CRBI.
3. It loads CMF with the circular priority encode of `rbdest`, which is the
   newest frame that stays. If no frame in the OMF..CMF range stays, the
   rollback has underflowed: CMF is loaded with the archive frame number and
   the error is reported.

Example with 8 frames, where bit strings list frame 0 first and CRBI is 10:

* A rollback from frame 7 to frame 5 stores `11111100` in `RBH[10]` and pushes
  `RBH[11] = 11111111`.
* A word last written at tag 10 with written bits `01101011` now reads as
  `01101000`. The frames 6 and 7 are gone.
* A later rollback to frame 2 (mask `11100000`) turns both `RBH[10]` and
  `RBH[11]` into `11100000`, and pushes `RBH[12]`.

The top entry `RBH[CRBI]` is always all ones. A word written since the last
rollback is therefore never masked. The testbenches check this invariant
after every operation.

**Marks reuse the mechanism.** When CMF wraps around the ring, it reaches a
frame whose old written bits are still set. Instead of clearing them, a mark
behaves like a one-frame rollback of the new frame. It ANDs a mask with only
the new CMF bit cleared into the history, pushes a new entry, and steps CMF.
So the stack grows by one entry on every mark and every rollback. Written
bits are only ever rewritten by a write.

**Writes** take two cycles:

* Cycle 1 reads the old written bits and tag and masks them with
  `RBH[tag]`. It sets the CMF bit (gate BITOR) and loads the result into
  WBLATCH. In the same cycle the data goes into `RAM[CMF][a]`.
* Cycle 2 writes WBLATCH back to the WB store, tagged with the current CRBI.

## Advance and the archive frame

Advance discards frame OMF. First, every word whose newest surviving version
lives only in OMF must be saved, so the chip walks all addresses with the
advance counter WAC, which is part of the WB store. For each address:

1. It masks the written bits with the address's RBH entry and with the
   decoded OMF (the advance mask held in AMASKREG, through gates ADVAND and
   ADVMUX).
2. If the OMF bit survives, it copies `RAM[OMF][a]` through DLATCH into
   `RAM[archive][a]`. This takes one extra cycle.

The written bits are only read during an advance, never rewritten. At the end
of the walk, OMF steps.

## Errors and refused requests

A refused request completes in 1 cycle and changes nothing. A rollback that
underflows is carried out. Each case reports one of these `err` codes with
`done`:

| code           | when                                                     |
|----------------|----------------------------------------------------------|
| `ERR_MARK_OVF` | a mark would make CMF equal to OMF (the ring is full)    |
| `ERR_ADV_OVF`  | advance while OMF equals CMF                             |
| `ERR_RBH_FULL` | mark or rollback with the history stack full             |
| `ERR_NEED_RST` | any request but reset before the first reset, or after an underflow |
| `ERR_RB_UNDER` | the rollback was carried out and underflowed; only reset is accepted next |

## Interface (`rbc_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst` | in | 1 | clock; synchronous reset of the controller only |
| `req_valid` / `req_ready` | in / out | 1 | a request is taken on an edge where both are high; ready means idle |
| `req_op` | in | 3 | `rbc_op_e`: `OP_NOP`, `OP_RESET`, `OP_READ`, `OP_WRITE`, `OP_MARK`, `OP_ROLLBACK`, `OP_ADVANCE` |
| `req_addr` | in | log2(WORDS) | word address |
| `req_wdata` | in | DATA_W | write data |
| `req_rbdest` | in | NFRAMES | rollback mask: 1 = frame stays |
| `done` | out | 1 | one-cycle pulse when the operation ends |
| `err` | out | 3 | `rbc_err_e`, valid with `done` |
| `rdata` | out | DATA_W | read data (DLATCH), valid from `done` of a read |
| `cmf`, `omf`, `crbi`, `need_reset` | out | | status |

The chip's state is set up by an `OP_RESET` request, not by `rst`.

For a rollback of k frames, the host clears bits CMF, CMF-1, … CMF-k+1
(modulo `NFRAMES`). Clearing frames outside the OMF..CMF range as well is
harmless, and the example above does so.

## Blocks and files

| block (datapath name) | file | role |
|---|---|---|
| package | `rtl/rbc_pkg.sv` | operation, event and error enums |
| top and controller | `rtl/rbc_top.sv` | wiring, controller, and the glue listed below |
| WB+TS+WAC | `rtl/rbc_wbts.sv` | written bits, timestamp tags, advance counter |
| RBH | `rtl/rbc_rbh.sv` | rollback history stack |
| CRBI | `rtl/rbc_crbi.sv` | rollback index counter |
| CPENCODE | `rtl/rbc_cpencode.sv` | circular priority encoder |
| DECODE | `rtl/rbc_decode.sv` | frame number to one-hot |
| CMF, OMF | `rtl/rbc_frame_ptr.sv` | frame pointers: clear, up, down, load |
| WBLATCH, DLATCH | `rtl/rbc_latch.sv` | load/hold registers |
| RAM | `rtl/rbc_ram.sv` | `NFRAMES`+1 frames of `WORDS` words |

The glue inside `rbc_top` is:

* WBAND, ADVAND, BITOR: gates
* RBHASEL, ADVMUX, ENCMUX, EAMUX: multiplexers
* CONC: builds the RAM address as {frame, word}
* AMASKREG: the advance mask register
* AFRAMEADDR: the archive frame number, a constant

Controller states: `IDLE`, `RST2`, `WR2`, `ADV_INIT`, `ADV_SCAN`,
`ADV_COPY`, `ADV_FIN`.

## Parameters

| parameter | default | origin |
|---|---|---|
| `NFRAMES` | 32 | the original design's 32-bit written-bits word |
| `WORDS` | 1024 | chosen here (frame size not given); must be a power of two |
| `DATA_W` | 32 | chosen here |
| `RBH_DEPTH` | 1024 | chosen here; the original lets the history grow without bound |

## Where this RTL departs from, or adds to, the original design

* **Bounded history.** The stack holds `RBH_DEPTH` entries. A mark or
  rollback that would need more is refused until a reset. The original relies
  on a separate "forgetting" mechanism that is not part of this design.
* **Rollback takes 1 cycle**, with the update and the push in the same clock.
  An operation table in the original lists two control states for it.
* **Written bits are cleared at reset.** The original text also describes
  frame 0's bits as set initially. Either way, unwritten words read
  unspecified data; here they come from the archive frame.
* **The RBH update ANDs all entries in parallel.** The original scans from the
  top and stops at the first unchanged entry. The contents are the same.
* **The encoder has no combinational loop** (see above). The read-at-WAC
  select of the WB store is a separate input, so it can be combined with a
  WAC step in one clock.
* **Added here:** the request handshake, the error codes, and the rule that
  an underflow requires a reset. The original leaves the chip's behaviour
  after an underflow open.
* **Advance is one frame per request.** The original system can advance over
  several frames at once; here the host repeats the request.
* **Not built:** the data cache that avoids written-bit searches (a variant
  of the chip), and off-loading old frames to backing store.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M`.

* `tb/tb_rbc_top.sv` runs 6000 random operations at 8 frames, 16 words and
  16 history entries. It checks the chip against a reference model that
  copies the whole frame on every mark. It also checks:
  * the cycle count of every operation, including the exact advance length
    predicted from a per-frame written-bit model;
  * the all-ones top history entry;
  * that each of these happened at least once: CMF wrap-around, one-step and
    multi-step rollback, underflow, mark and advance overflow, archive copies,
    reads served from the archive frame, a full history, and refusal until
    reset.
* `tb/tb_rbc_top_full.sv` runs the same model with the default sizes and no
  parameter overrides: 20000 operations, including several hundred advances
  over all 1024 words.
* `tb/tb_rbc_fig3.sv` replays the 8-frame history example above through the
  whole chip. It writes one word in frames 1, 2, 4, 6 and 7, then rolls back
  to frames 5 and 2, marks twice, and rolls back to frame 3. After each step
  it checks the value read and the masked written bits.
* Each module has its own testbench:
  * `tb_rbc_cpencode`: every CMF/OMF pair at 8 and 32 frames, against a
    plain scan;
  * `tb_rbc_rbh`: the 8-frame history example above, step by step;
  * `tb_rbc_wbts`, `tb_rbc_decode`, `tb_rbc_crbi`, `tb_rbc_frame_ptr`,
    `tb_rbc_latch`, `tb_rbc_ram`.

To simulate with Verilator, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -yrtl rtl/rbc_pkg.sv \
    tb/tb_rbc_top.sv --top-module tb_rbc_top -o sim
./obj_dir/sim
```

Replace the testbench file and top module name to run any other test.
Verilator is a two-state simulator: the RAM and the history entries above
CRBI start with random contents. The design never reads them before it
writes them.

## Notes for changing the design

* `NFRAMES` sets the width of every written-bits word, history entry and
  encoder. The frame number is `$clog2(NFRAMES+1)` bits wide, so that the
  archive frame fits.
* The WB store resets in one clock and the RBH updates all entries in one
  clock. Both are therefore flop arrays. Synthesis of the defaults takes
  minutes. A RAM-based WB store would need a multi-cycle reset that walks
  WAC.
* The assertions in `rbc_top` check the invariants and the handshake rules:
  * WAC starts at 0;
  * a new written-bits word always has the CMF bit set;
  * the encoder output is one-hot or empty;
  * a request waiting for a busy controller keeps its operation.
