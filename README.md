# VAAG: vertex attribute address generator with address coalescing

When a GPU front end fetches vertex attributes, each vertex of a warp asks for
one attribute at `base + index * stride + offset`. Neighbouring vertices
usually land close together in memory, so sending one memory request per
vertex wastes bandwidth. This design computes the attribute addresses of two
vertices per clock and then *coalesces* them. Consecutive addresses that share
their most significant bits are merged into one request. That request carries
the common high bits once, plus the low bits of every address merged into it.

The design has two units:

```
               +------------------- vaag -------------------------------+
 vtx_index[0]->| ACAL  ALU #0 --attr[0]-->+                              |
 vtx_index[1]->|       ALU #1 --attr[1]-->|  CLSC  (FSM + record queue)  |--> coalesced
 warp_end   -->|      (1 register stage) -+ warp_end, block_end -->      |    records,
 block_end  -->|                                                        |    1 per clock
               +--------------------------------------------------------+
```

* **ACAL** (address calculation) holds two ALUs. Each one turns a vertex index
  into an attribute address, with its size and an out-of-bounds status bit.
* **CLSC** (coalescing) runs a three-state FSM over the stream of addresses. It
  decides, address by address, whether to merge, hold or send.

The CLSC is the hard part, and most of this document is about it.

## Address layout

An attribute address has 16 bits:

```
 15        10 9                 0
+------------+-------------------+
|  MSB (6)   |   OFFSET (10)     |
+------------+-------------------+
```

Two addresses can be coalesced when their 6-bit MSB fields are equal. A
coalesced record carries the common MSB once and then one 10-bit offset per
merged address:

```
| common MSB (6) | OFFSET #1 (10) | OFFSET #2 (10) | ... up to SLOTS offsets
```

In the RTL this is the `clsc_out_t` struct in `rtl/vaag_pkg.sv`. It holds the
following fields:

| field       | meaning |
|-------------|---------|
| `msb`       | the common MSB |
| `offset[i]` | offset of the i-th merged address (slot 0 is the oldest) |
| `size[i]`   | attribute size in bytes of the i-th address |
| `count`     | number of addresses in the record. 0 marks a flag-only record |
| `oob`       | the record is a single out-of-bounds address |
| `two_lines` | the first address runs past the end of its MSB region |
| `warp_end`, `block_end` | the record closes a warp or a block |

Slots that are not used are zero.

An address "needs two lines" when `offset + size > 1024`. Its last byte then
lies in the next MSB region.

## The coalescing FSM

The CLSC keeps at most one *cached* record: the addresses it has merged so far
and is still trying to extend. Its state says what that record is:

| state      | cached record |
|------------|---------------|
| `IDLE`     | none |
| `Non-COAL` | one address, not merged with anything yet |
| `COAL`     | two or more addresses merged |

Every valid address is one event, and so is a warp or block end. Each event
causes exactly one transition, and 0, 1 or 2 records leave the unit. The
conditions are tested in the order listed. The numbers are the arc numbers of
the state diagram (`//` comments in `vaag_pkg::clsc_step_addr` use them too).

| from     | condition | to | records sent |
|----------|-----------|----|--------------|
| IDLE     | out of bounds (3) | IDLE | the address itself |
| IDLE     | any other valid address (4) | Non-COAL | none; the address is cached |
| Non-COAL | out of bounds (8.1) | IDLE | the cache, then the address |
| Non-COAL | address needs two lines (5.1) | Non-COAL | the cache; the new address is cached |
| Non-COAL | MSB differs (5.2) | Non-COAL | the cache; the new address is cached |
| Non-COAL | MSB matches (6) | COAL | none; the address is merged |
| COAL     | out of bounds (2.2) | IDLE | the cache, then the address |
| COAL     | needs two lines (7.1), MSB differs (7.3), or max coalesce number is 0 (7.2) | Non-COAL | the cache; the new address is cached |
| COAL     | MSB matches, merges in COAL + 1 < max (1) | COAL | none; merged |
| COAL     | MSB matches, the max is reached (2.1) | IDLE | the cache with the new address merged |
| any      | warp end or block end (8.2) | IDLE | the cache with the flag set, or a flag-only record from IDLE |

The "max coalesce number" is the run-time input `cfg_max_coal`. It counts the
merges done *while in COAL*. The first merge, Non-COAL to COAL, always happens,
so a record holds at most `2 + cfg_max_coal` addresses. Here is an example with
`cfg_max_coal = 2` and four addresses with the same MSB:

```
addr A : IDLE     -> Non-COAL   cache {A}
addr B : Non-COAL -> COAL       cache {A,B}       merges = 0
addr C : COAL     -> COAL       cache {A,B,C}     merges = 1   (0+1 < 2)
addr D : COAL     -> IDLE       send  {A,B,C,D}                (1+1 = 2)
```

With `cfg_max_coal = 0`, a matching address in COAL is not merged. The record
is sent and the new address starts a fresh one. Values above `MAX_COAL` (2)
are treated as `MAX_COAL`.

Addresses whose valid bit is clear are skipped. They change nothing.

Out-of-bounds addresses are never merged. They always leave as records of
their own, with `oob` set, so that the consumer can handle them. A merged
address may itself need two lines. The two-lines test only stops a new
address from being merged into the cache.

## Two addresses per clock

The ACAL delivers address #0 and address #1 together, with the flags of the
pair. The CLSC applies the FSM to address #0, then address #1, then the end
flag, all in one clock. Three copies of the step function are chained
combinationally. So two addresses that coalesce cost one clock, the same as a
single address.

Up to four records can come out of one pair. This worst case happens when
address #0 is out of bounds in Non-COAL (2 records), address #1 is out of
bounds in IDLE (1), and an end flag follows (1). All the records of a pair are
written into an 8-entry record FIFO in the same clock. The CLSC takes a new
pair only while the FIFO has room for four more records. The output sends one
record per clock with a valid/ready handshake. Backpressure therefore reaches
the input whenever a stream produces records faster than one per clock.

Timing, counted from the clock edge at which the CLSC takes a pair:

* The first record of the pair is on `out` right after that edge: one cycle
  from input to output.
* The second, third and fourth records follow on successive clocks, if the
  consumer keeps `out_ready` high.
* An address that is cached stays inside the unit until a later event sends
  its record, so latency depends on the data.

Example: a record is cached, and addresses #0 and #1 differ from it and from
each other. The cached record leaves at cycle +1 and address #0 at cycle +2.
Address #1 stays cached.

Through the whole `vaag`, the ACAL register adds one clock. A request reaches
`out` two clocks after `in_valid && in_ready` at the earliest.

Every register, the cached record included, is reset by `rst_n`, which is
active low and synchronous. The cached record is also cleared to zero each
time it is sent. No state from an earlier record can leak into a later
comparison.

## The ACAL

Each ALU computes the following:

```
rel  = index * stride + offset
addr = (base + rel) mod 2^16
oob  = rel + size > limit
```

`base`, `stride`, `offset`, `size` and `limit` form the attribute descriptor
(`attr_desc_t`), which both ALUs share. The ACAL registers both results and
the two flags in one valid/ready pipeline stage
(`in_ready = !out_valid || out_ready`).

## Interfaces

`vaag` (top):

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `desc` | in | `attr_desc_t` | attribute descriptor |
| `cfg_max_coal` | in | 2 | max coalesce number |
| `in_valid` / `in_ready` | in / out | 1 | request handshake |
| `vtx_valid` | in | 2 | valid bit per lane |
| `vtx_index` | in | 2 x 16 | vertex index per lane |
| `warp_end`, `block_end` | in | 1 | flags of this pair, applied after both addresses |
| `out_valid` / `out_ready` | out / in | 1 | record handshake; `out` is held while stalled |
| `out` | out | `clsc_out_t` (73 bits) | coalesced record |
| `clsc_state` | out | `clsc_state_e` | FSM state, for observation |

`acal` and `clsc` have the same handshakes on their own boundaries. `clsc`
asserts three rules: a stalled output holds its value, at most four records
are pushed per pair, and a record never exceeds `SLOTS` addresses.

## Parameters

Widths are package constants in `vaag_pkg`, because the shared structs depend
on them.

| name | value | note |
|------|-------|------|
| `ADDR_W`, `MSB_W`, `OFF_W` | 16, 6, 10 | address layout |
| `SIZE_W` | 5 | attribute size in bytes |
| `IDX_W`, `STRIDE_W`, `AOFF_W` | 16, 8, 8 | descriptor fields |
| `MAX_COAL` | 2 | largest max coalesce number |
| `SLOTS` | `MAX_COAL + 2` = 4 | offsets per record |
| `FIFO_DEPTH` (module parameter of `clsc`, `vaag`) | 8 | record queue; a power of two, at least 4 |

To raise `MAX_COAL`, change it in the package. `SLOTS`, the record width and
the `cfg_max_coal` width follow from it.

## Files

| file | content |
|------|---------|
| `rtl/vaag_pkg.sv` | widths, structs, FSM state type, and the FSM rules as pure functions |
| `rtl/acal_alu.sv` | one address ALU (combinational) |
| `rtl/acal.sv` | two ALUs and the output register |
| `rtl/clsc.sv` | FSM register, the three-step chain, record FIFO |
| `rtl/vaag.sv` | top level |
| `tb/clsc_ref_pkg.sv` | reference model of the coalescing rules (a class), one event at a time |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Run one with
Verilator 5 from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/vaag_pkg.sv tb/clsc_ref_pkg.sv rtl/acal_alu.sv rtl/acal.sv \
  rtl/clsc.sv rtl/vaag.sv tb/tb_vaag.sv --top-module tb_vaag
./obj_dir/Vtb_vaag
```

For another testbench, replace `tb_vaag` with its name.

* `tb_acal_alu` tests 20,000 random descriptor and index pairs, plus the exact
  limit boundary.
* `tb_acal` tests random traffic under random backpressure. It checks the
  one-cycle latency and that a stalled output holds.
* `tb_clsc` checks the unit against the reference model in
  `tb/clsc_ref_pkg.sv`. It also runs directed latency checks, including the
  two-record example above. It drives all twelve four-step paths from IDLE back
  to IDLE through the state diagram, and checks the state after each step:

  ```
  I-I-I-I-I   I-N-I-I-I   I-I-N-I-I   I-I-I-N-I
  I-N-N-I-I   I-N-I-N-I   I-I-N-N-I   I-N-N-N-I
  I-N-C-I-I   I-N-N-C-I   I-N-C-N-I   I-N-C-C-I
  ```

  Each path is run six times, with randomly chosen events that cause the
  wanted arcs. After the paths come 3,000 random pairs under random
  backpressure. Every arc and sub-case must be seen at least once.
* `tb_vaag` runs the whole generator at its default parameters. It streams 120
  warps of 32 vertices: runs of consecutive vertices, scattered indices, short
  buffers (out of bounds) and line-crossing strides. It varies
  `cfg_max_coal` (0 included) and stalls the output at random. It compares
  every record and requires every arc, input backpressure and the limit-0 mode
  to occur.

## What is assumed

The following rests on the published description of this unit:

* the ACAL and CLSC structure
* the two-ALU ACAL and its outputs (address, size, status, valid)
* the warp and block end flags
* the 6 + 10 bit address layout
* the three FSM states and the conditions on their eight arcs
* address #0 being handled before address #1
* the one-cycle path from input to first record

The following are this design's own choices. Check them before relying on the
design.

* **The ALU formula and the bounds test.** The source says only that the ACAL
  generates vertex attribute addresses with a size and a status. The
  descriptor fields and their widths are invented.
* **The meaning of the max coalesce number.** It counts merges made in COAL.
  This reading is the one that makes all three of its stated uses (below max,
  reaching max, and max = 0) consistent. The source gives no range; 0 to 2
  is chosen here.
* **"Needs two lines" is `offset + size > 1024`.** No cache line size is
  given, so one line is taken to be one MSB region.
* **Warp and block ends.** The source defines only the Non-COAL case (send the
  cache, go to IDLE). In COAL the end does the same. In IDLE it sends a
  flag-only record so the flag is not lost. Flags act after both addresses of
  their pair.
* **The record format beyond "common MSB + offsets".** This covers the sizes,
  the count and the flag bits.
* **Micro-architecture.** The original unit appears to stage a second output
  through an extra pipeline register. In the one published timing example it
  moves a cached address into the cache a cycle later than this design does.
  Here, extra records wait in a FIFO instead. The output sequence and the
  cycle at which each record appears match that example. The handshakes, the
  FIFO depth and the synchronous reset are also choices of this design.
* **Split addresses.** The original timing diagrams show each address as a
  pair of high and low parts. Their role is not described, so they are not
  modelled. An address that needs two lines is sent as one record with
  `two_lines` set.
