# RDC: a reconfigurable L1 data cache that keeps two versions of every line

Hardware transactional memory has to keep two versions of data a transaction
writes: the old, committed value, needed if the transaction aborts, and the new,
speculative one. Eager systems write the new value in place and save the old
one in a software undo log. Lazy systems buffer the new value and throw it away
on abort, so the line has to be fetched again. Both pay for having only one
copy of a line in the L1.

The reconfigurable data cache (RDC) solves this inside the L1 data array.
Every bit has two SRAM cells, an *upper* and a *lower* cell, joined by small
exchange circuits. The cache can run in either of two modes:

* **General purpose mode (TMM = 0): 64KB.** Upper and lower cells hold
  different lines, so the array has its full capacity.
* **TM mode (TMM = 1): 32KB.** The upper cells hold the current (new) value.
  The lower cells hold a *shadow copy* of the last committed (old) value. A
  whole line can be copied between the two in one cycle, and so can the whole
  cache at once.

This repository holds synthesizable SystemVerilog for the cache array, its
decoders and the controller that uses the shadow copies for an eager or a lazy
HTM. It also holds self-checking testbenches for every module.

## The extended cell and its operations

An e-cell is two 6T cells, one on word line WL1 (upper) and one on WL2
(lower), sharing the bit lines. Two exchange circuits can copy one cell into
the other. The RTL models a row of 512 e-cells (one 64-byte line) by its logic
function in `rdc_ecell_row`:

| Operation | Word lines / enables | Effect |
|-----------|----------------------|--------|
| URead / UWrite | WL1 | read / write the upper cells |
| LRead / LWrite | WL2 | read / write the lower cells |
| ULWrite | WL1 + WL2 | write the same data into both cells |
| Store | Store | copy upper to lower (one line) |
| Restore | Restore | copy lower to upper (one line) |
| StoreAll | StoreAll | copy upper to lower in every row at once |

Every operation takes one clock edge. The row drives zero when it is not
selected, so a way ORs its 128 rows together, the way shared bit lines work.

## Address mapping in the two modes

Addresses are 48 bits: a 35-bit tag (A47..A13), an 8-bit index (A13..A6) and a
6-bit offset. A13 belongs to both the tag and the index. This keeps the tag the
same width in both modes. Each of the 4 ways has 256 tag entries and 128 data
rows.

| | General purpose (64KB) | TM (32KB) |
|---|---|---|
| tag entry | A13..A6 (all 256) | 0,A12..A6 (top 128 only) |
| data row  | A13..A7 | A12..A6 |
| upper / lower cells | A6 = 0 / A6 = 1 (set 2r upper, set 2r+1 lower) | chosen by the operation |
| decoder op bits {a,b,c} | a = 1, b = A6, c = 0 | from the controller |

The way decoder (`rdc_decoder`) feeds two 3-to-8 predecoders and a sub-bank
select from those bits. It drives the `{a,b,c}` code into the control signal
generator (`rdc_ctrl_gen2`), which computes:

    Store    = TMM·a·b·c          WL1 = a·~b·~c + ~a·~b·c
    Restore  = TMM·~a·b·c         WL2 = ~a·~b·c + a·b·~c
    StoreAll = TMM·~a·~b·~c

This gives the TM-mode codes 100 (upper), 110 (lower), 001 (ULWrite), 111
(Store), 011 (Restore) and 000 (StoreAll). They are the `cell_op_e` values in
`rdc_pkg`. In general purpose mode, WL1 or WL2 follows A6 and the exchange
signals stay low, whatever code the controller drives.

## Version management

Each line has a **VSC** (Valid Shadow Copy) bit. It says that the lower cells
hold a committed value that can be used for recovery. Each line also has a
write-set bit `txw` (written by the running transaction) and a dirty bit. The
controller in `rdc_l1d` implements two policies, chosen by the static input
`lazy`.

### Eager policy (in-place updates, undo log)

* **Begin:** StoreAll copies every line into its shadow copy and sets every
  VSC bit. This takes one cycle.
* **Miss inside a transaction:** the fill uses ULWrite, which writes the line
  and its shadow copy together and sets VSC. If the next level reports the
  line as transactionally modified, the fill uses UWrite instead and leaves
  VSC clear. Such a line was already evicted and logged in this transaction,
  and a shadow copy of uncommitted data would corrupt recovery.
* **Store:** UWrite to the upper cells, which marks the line in the write-set.
* **Eviction of a write-set line with VSC set:** this is the *logging
  condition*. The controller reads the shadow copy (LRead) into a one-entry
  buffer (`rdc_evict_buf`). The buffer sends it to the log port as (physical
  line address, old data) and sets the *overflow* bit. Lines inside the log
  region `[log_base, log_limit)` are never logged, so logging cannot recurse.
  The new value then goes to the next level as a transactional write.
* **Commit:** one cycle flash-clears every VSC bit and every write-set bit.
* **Abort:** a walk over the 128 rows, with the 4 ways in parallel. It
  Restores every write-set line that has VSC set and invalidates every
  write-set line that does not. The abort response carries the overflow bit.
  When the bit is set, software must also unroll the log.
* **Forwarded request for a write-set line:** refused with a NACK, as a
  stall-on-conflict HTM does.

### Lazy policy (buffered updates, commit by address)

* **Begin:** nothing. The shadow copies are already current.
* **Every TM-mode fill** uses ULWrite and sets VSC, unless the line comes back
  transactionally modified.
* **Commit:** a 128-row walk Stores every write-set line into its shadow copy.
  Each such line becomes a committed, dirty line with VSC set. Only addresses
  would be sent at commit, so the data stays in the L1. The next transaction
  can write the same line again without a write-back first.
* **Abort:** the same walk as in the eager policy. Restore brings the
  committed value back into the L1, so the re-executed transaction hits.
* **Eviction of a write-set line:** if the shadow copy holds a committed
  value that is dirty, it is written back first as a non-transactional write.
  Then the new value is spilled as a transactional write.
* **Forwarded request:** answered from the shadow copy (LRead) when VSC is set,
  because the shadow copy always holds the last committed value. A write-set
  line without a shadow copy has no committed data here. It answers "no hit".

### Outside transactions and mode switches

A store outside a transaction to a line with VSC set uses ULWrite, so the
shadow copy stays equal to the line. `REQ_SET_MODE` works like WBINVD. It walks
all 256 × 4 tag entries, writes back dirty lines and invalidates everything.
Only then does it change TMM. Reset starts in general purpose mode.
Transaction requests in general purpose mode only return a response.

## Interfaces and timing (`rdc_l1d`)

Every handshake is valid/ready. A transfer happens on a clock edge where both
are high.

| Port group | Signals | Notes |
|---|---|---|
| CPU | `req_valid/ready, req_op, req_addr, req_wdata[63:0], req_be[7:0], req_tmm`, `rsp_valid, rsp_rdata, rsp_overflow` | one request at a time; `rsp_valid` is a one-cycle pulse |
| next level | `mem_req_valid/ready, mem_req_cmd (READ, WRITE, WRITE_TX), mem_req_addr, mem_req_data[511:0]`, `mem_rsp_valid, mem_rsp_data, mem_rsp_txmod` | one fill outstanding |
| log | `log_valid/ready, log_addr, log_data[511:0]` | eager policy only |
| forward | `fwd_valid/ready, fwd_addr`, `fwd_rsp_valid, fwd_rsp_hit, fwd_rsp_nack, fwd_rsp_data` | forwarded requests go ahead of CPU requests |
| status | `tmm, in_tx`, `ev` | `ev` (`rdc_events_t`) pulses once for each mechanism that fires, for counting |

Timing:

* **Load or store hit:** the response is valid in the second cycle after the
  request is taken (2-cycle hit).
* **Begin and eager commit:** 2 cycles to the response.
* **Lazy commit and abort:** 128 cycles of row walk, plus the wait for a
  pending log entry to drain, plus the response.
* **Miss:** the controller reads the victim (upper, then lower if needed),
  writes back or logs it, fills, and then repeats the lookup.

## Module map

    rdc_l1d                  controller, top
    ├── rdc_tag_way   x4     tags, TMM index mux, comparator, VSC/txw/dirty, flash ops
    ├── rdc_data_way  x4     128 rows
    │   ├── rdc_decoder      mode-dependent bit selection, row select
    │   │   ├── rdc_predecoder x2
    │   │   └── rdc_ctrl_gen2
    │   └── rdc_ecell_row x128
    ├── rdc_way_mux          4:1 data multiplexer
    ├── rdc_plru             replacement (tree pseudo-LRU)
    └── rdc_evict_buf        evicted shadow copy: log, write back or drop
    rdc_pkg                  geometry, op codes, tag entry, request/event types

The top has no parameters: the geometry (48-bit addresses, 64B lines, 4 ways,
256/128 rows, 35-bit tags) lives in `rdc_pkg`. The array is built from flip-
flops, because StoreAll must copy every row in one cycle. A standard SRAM
macro cannot do that.

## Simulation

Each module `rtl/X.sv` has a testbench `tb/tb_X.sv`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog. For example, the
end-to-end test:

    verilator --binary --timing --assert -Irtl --top-module tb_rdc_l1d \
        rtl/rdc_pkg.sv tb/tb_rdc_l1d.sv -o sim && obj_dir/sim

`tb_rdc_l1d` runs the full-size cache under both policies. It first sends
general purpose traffic, then switches to TM mode. It then runs 60 random
transactions that commit or abort, with non-transactional traffic and
forwarded requests in between, and finally switches back. A behavioural next
level keeps committed and transactionally spilled lines apart. For the eager
policy, the testbench also plays the software abort handler that unrolls the
log. Every load is compared with a word-level reference, and every hit's
latency is checked. The test fails if any mechanism never fired: StoreAll,
ULWrite fill, refetch without shadow copy, Store at commit, Restore,
invalidation at abort, VSC flash clear, logging, overflow abort, shadow
write-back, spill, dirty write-back, forward by LRead, NACK, flush write-back
and mode switch. It runs in about one second of simulation after a build of
roughly 20 seconds.

`tb_rdc_l1d_reuse` measures the two effects the shadow copies exist for,
with a 64-line write-set that fits in TM mode:

* **Lazy policy, repeated transactions.** Eight transactions that write the
  same lines cause no traffic at all to the next level and no misses. Each
  commit takes 16 Store cycles, because the 4 ways are stored in parallel.
* **Both policies, abort and re-execute.** An aborted transaction is undone
  by 16 Restore cycles, with no log entries. Its re-execution hits on every
  line and reads the pre-transactional values.

## Limits and departures

* **Controller details are this design's own.** The cell, the two modes, the
  decoder equations and the version-management rules follow the RDC-HTM
  scheme. The controller's sequencing is not prescribed by it. The row walks
  for commit and abort, the 64-bit CPU word, the handshakes, the one-entry
  eviction buffer, the log-region filter as a base/limit pair, pseudo-LRU
  replacement and reset into general purpose mode are choices made here.
* **The coherence protocol is reduced to valid/dirty.** The write-set bit
  stands in for the read/write-set signatures of a real eager HTM. Conflict
  detection is therefore only the NACK on forwarded requests for write-set
  lines.
* **No lazy commit broadcast.** The address broadcast and directory update of
  a lazy commit are outside the cache. The cache only keeps its own state
  consistent.
* **Circuit-level parts are not modelled.** The first control signal
  generator of the decoder (clock, precharge and output/input enables), sense amplifiers,
  drivers and layout are absent. So are the access-time and energy
  characterisation.
* **Restore decode.** The Restore term of the control generator is taken as
  TMM·~a·b·c. The code points 010 and 101 are unused.
