# Static register-file storage for a low-power, radiation-hardened microprocessor

This RTL models the on-chip storage of a small dual-modular-redundant (DMR)
microprocessor. Every storage structure in it is a **static register file
(RF)**. A static RF has a separate write port and a tri-state read port in
each cell, and its read path is plain combinational logic. It has no
precharge, no sense amplifier and no read clock. Such arrays work down to the
low supply voltages used with dynamic voltage scaling. They are also built
from standard-cell-compatible pieces. Two structures are built from them:

* **CacheSD**, an 8 KB, 4-way set-associative cache. It is used twice, once as
  the instruction cache and once as the data cache. It is assembled from
  16-entry RF sub-banks.
* **The general-purpose register file**, 32 registers of 32 data bits plus 8
  parity bits. It has three read ports and one write port, and is kept in two
  redundant copies. Checkers compare the redundant write word lines and write
  data, and a correction sequence repairs a disagreement.

The top level, `lp_rf_top`, places the two caches and the register file side
by side and brings all their ports out. The processor pipeline, the TLB and
the cache miss-handling policy are not part of this RTL. They drive these
ports.

## 1. The static RF array

`sp_rf_array` (cache) and `mp_rf_copy` (register file) share one
organisation. Their decoders are `wl_write_decoder` and `wl_read_decoder`.

**Write path.** A predecoded N-to-2^N decoder turns the write address into
one-hot *global write word lines* (GWWL), qualified by the write enable. The
enable stands for the gated write clock of the circuit. In the cache arrays,
every 8 columns have a local gate that ANDs the GWWL with that byte's write
enable to form a *local* word line. So the smallest write is one byte, and
only the enabled bytes of the addressed entry change. The write happens at
the rising clock edge.

**Read path.** The read decoder has no enable. Some row is always selected,
so exactly one RWL is high at all times, together with its complement RWLN.
The circuit needs RWLN to switch on the pull-up half of the cell's tri-state
read inverter. Each column's read bit line is split into a top half and a
bottom half, with half the entries on each. This halves the bit-line load. A
2:1 multiplexer driven by the read-address MSB picks one half. `rdata` is
therefore a pure combinational function of `raddr` and the stored bits. A
static array can sit anywhere inside a pipeline stage. It does not have to
straddle a clock edge the way a precharged (dynamic) RF must.

The model writes at the clock edge and reads combinationally. The circuit's
own timing is not modelled. That covers the delayed write clock that removes
address/enable races, the delayed multiplexer select that saves power, and
the access times.

Storage has no reset, like a real RF. Write or invalidate before reading.

## 2. CacheSD: the 8 KB cache

### Organisation

```
CacheSD = 8 x cache_cluster (1 KB each, 16 sets)
cache_cluster = 1 tag_subbank (16 x 96) + 4 data_subbank (16 x 128)
```

* **Data sub-bank k** holds word k (of 4) of every line in the group, for all
  four ways. One entry is `{way3, way2, way1, way0}` words. The bytes are
  also interleaved by way: byte *b* of way *w* sits at physical byte `4*b + w`.
  Two bytes of the same way are therefore four bytes apart, and the four
  candidates for one output byte sit side by side at the way multiplexer. A
  write stores up to 4 bytes of one way.
* **Tag sub-bank**: each entry holds the four 24-bit tag entries of one set.
  A tag entry is `tag_entry_t = {lrf, lock, valid, tag[20:0]}`. A tag spans
  three byte groups that share one write enable, so exactly one way's tag is
  written at a time. The valid column has resettable cells: the global
  invalidate clears every valid bit in one clock.

Address map (32-bit physical address):

| bits    | use                                         |
|---------|---------------------------------------------|
| [31:11] | 21-bit tag                                  |
| [10:8]  | group (which `cache_cluster`)               |
| [7:4]   | set within the group (sub-bank entry)       |
| [3:2]   | word in the 16-byte line (which data sub-bank) |
| [1:0]   | byte (use `wbe`)                            |

### Operations (`cache_op_e`)

| op              | effect                                                                                  |
|-----------------|-----------------------------------------------------------------------------------------|
| `OP_LOOKUP`     | reads all 4 tags of the set and compares them with `addr[31:11]`, requiring `valid`. Returns `hit`/`miss`, `hit_way` and the addressed word of the hit way. |
| `OP_READ`       | returns the addressed word of way `way` in `rdata`, and that way's tag entry in `rtag`. |
| `OP_WRITE`      | with `wr_data`, writes `wdata` under `wbe` into the addressed word of way `way`. With `wr_tag`, writes `wtag` as that way's tag entry. Either or both. |
| `OP_INVALIDATE` | clears every valid bit in all groups.                                                   |

### Power gating of the inputs

Group logic decodes `addr[10:8]` and raises `sel` for one group only. Inside
the group, each sub-bank has its own address/data registers. These registers
load only when that sub-bank takes part: the tag sub-bank for every
operation, and data sub-bank k only when word k is the target. The inputs of
unused sub-banks therefore stay still. In silicon, these enables are the
clock gates of the address flip-flops.

### Timing

```
cycle      t            t+1                  t+2
inputs     req A        req B                ...
edge t:    A captured in the group registers
t..t+1     A's response valid (rsp_valid=1); B on the inputs
edge t+1:  A's write/invalidate stored;  B captured
t+1..t+2   B's response, already seeing A's write
```

There is one request per cycle and no back-pressure.

### What the processor must do

The cache does not allocate lines by itself. The data cache is meant to be
write-through and read-allocate, so:

* on a load miss, the processor fetches the line and writes it with four
  `OP_WRITE`s: data, plus the tag on one of them;
* on a store, the processor writes main memory and, if `OP_LOOKUP` hits,
  writes the bytes into the hit way.

The processor picks the victim way. The `lrf` (least recently filled) and
`lock` bits are stored for that purpose. `tb_lp_rf_top` does all of this
with round-robin refill.

## 3. The DMR register file

`mp_regfile` is the hardest part to follow. Its structure is:

```
              waddr_a ──► write decoder A ──┐  wwl_a ──► copy A cells ─┐
pipeline A ── wdata_a ───────────────────────┼──────────► copy A       │  a cell is written only
              raddr_a ──► 3 read decoders ──► copy A ──► rdata_a (Rs,Rt,RtRd)   when wwl_a AND wwl_b
              waddr_b ──► write decoder B ──┤  wwl_b ──► copy B cells ─┘
pipeline B ── wdata_b ───────────────────────┼──────────► copy B
              raddr_b ──► 3 read decoders ──► copy B ──► rdata_b
                                            │
             dmr_write_checker (wwl_a vs wwl_b, data A vs data B) ──► rf_recovery ──► stall, replay
```

* **Two WWLs per cell.** Each write decoder drives a word line into *every*
  cell of *both* copies, and a cell is written only when both of its WWLs
  are high. Suppose one decoder raises a word line on its own, for example
  after a particle strike. The other decoder's line stays low, so nothing is
  written.
* **Separate read paths.** Each copy has three unclocked read decoders for its
  own pipeline's Rs, Rt and RtRd addresses. Each read port has its own split
  bit lines and MSB multiplexer.
* **Parity.** An entry is stored as `{parity[7:0], data[31:0]}`. Parity
  bit *i* is the even parity of nibble *i*. Parity is generated at the write
  port. Each read port reports `rperr` when the stored parity does not match.
* **Write-data gating.** Outside the arrays, each copy's write data is
  forced to zero when that copy is not writing, so the write bit lines
  toggle only on writes.
* **Checkers.** `dmr_write_checker` raises `wwl_err` when the two WWL
  vectors differ. It raises `data_err` when a write is in progress and the
  two copies' 40-bit write data differ.
* **Correction.** `rf_recovery` records every write presented by pipeline A
  (address and data). If the checker fails in a cycle:
  1. *That cycle's edge:* the write lands wherever both WWLs agreed. After a
     data mismatch, the entry now differs between the copies. After a WWL
     mismatch, nothing was written.
  2. *Next cycle:* `stall` is high. The register file ignores the pipeline's
     write port and re-writes the recorded write through both decoders into
     both copies, with the same data (copy A's).
  3. The copies agree again. If the check fails during the replay, the
     replay repeats.

  If the error occurred with no write of pipeline A (a stray write enable in
  copy B), the replay re-writes the last good write, which changes nothing.
  **While `stall` is high, the pipeline must hold the write it presents and
  present it again in the next cycle.**

Timing: reads are combinational. Writes and replays take effect at the
rising edge. `stall` is high in the cycle after the failing write, and for
exactly one cycle when the replay succeeds.

## 4. Where this RTL departs from the original design or fills gaps

These choices are not fixed by the original design:

* Tag-entry field order, the cache address split, the request/response
  handshake and the operation encoding.
* Multiple matching ways: an assertion flags them and the lowest way wins.
* Where parity is generated and checked, and its polarity.
* The replay details: one cycle long, trusting copy A, repeating while the
  check fails.
* The read-decoder split. It is described as "two 3-to-16 decoders" for 16
  entries, built here as two 3-to-8 half decoders qualified by the MSB.
* The predecoder field grouping.

Circuit-level features have no logic function, so they appear only as the
behaviour they produce:

* the 10-transistor and 20-transistor cells;
* edge and well-tap cells;
* write-clock delay and race margins;
* delayed multiplexer selects;
* access times, energies and areas.

Not included:

* The dynamic (precharged) RF. It is only a comparison baseline.
* A second redundant copy of each cache. The caches are DMR in the original
  design, but how their copies are compared is not specified, so one copy of
  each cache is built.

Assertions check that:

* the read word lines are one-hot;
* the write word lines are at most one-hot;
* no set holds the same valid tag twice.

## 5. Simulating

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog. Example with plain
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal rtl/rf_pkg.sv rtl/*.sv \
          tb/tb_lp_rf_top.sv --top-module tb_lp_rf_top -Mdir obj -o sim
./obj/sim
```

Put `rtl/rf_pkg.sv` first. Duplicate-package warnings from listing it twice
are harmless.

| testbench             | what it shows |
|-----------------------|---------------|
| `tb_lp_rf_top`        | End to end, at the default sizes. Fetch, load, store and refill traffic on both caches; register writes and reads with injected write faults. Counts hits, misses, refills, byte writes, invalidations, data/WWL errors and stalls; each must occur. |
| `tb_cache_sd`         | 6000 back-to-back random requests against a reference cache model, each response checked one cycle later. |
| `tb_cache_cluster`    | One group, including unselected cycles whose inputs must be ignored. |
| `tb_data_subbank`, `tb_tag_subbank` | Way/byte interleaving, one-tag writes, invalidation. |
| `tb_sp_rf_array`      | Byte writes; 64 consecutive static reads with no clock; clearing of resettable columns. |
| `tb_rf_sizes`         | The static array at 16/32/64 entries x 32/64/128 bits. |
| `tb_mp_rf_copy`       | Write only when both WWLs agree; three independent read ports. |
| `tb_mp_regfile`       | 3000 cycles with data, address and enable faults; checks the stall and replay, both copies' contents, and parity errors after a stored-bit flip. |
| `tb_dmr_write_checker`, `tb_rf_recovery`, `tb_wl_write_decoder`, `tb_wl_read_decoder` | Unit checks. |

The full top builds in about 2-3 minutes and runs in under a second.

## 6. Files

* `rtl/rf_pkg.sv`: shared sizes, `cache_op_e`, `tag_entry_t`, the parity
  function.
* Decoders: `wl_write_decoder.sv`, `wl_read_decoder.sv`.
* Cache: `sp_rf_array.sv`, `data_subbank.sv`, `tag_subbank.sv`,
  `cache_cluster.sv`, `cache_sd.sv`.
* Register file: `mp_rf_copy.sv`, `dmr_write_checker.sv`, `rf_recovery.sv`,
  `mp_regfile.sv`.
* Top: `lp_rf_top.sv`.
* `tb/`: one testbench per module, plus `tb_rf_sizes` and its helper
  `tb_rf_size_check`.

All parameters default to the sizes of the original design: 16-entry
sub-banks, 128/96-bit rows, 8 groups, and a 32 x 40 register file with 3 read
ports.
