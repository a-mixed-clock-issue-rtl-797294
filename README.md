# Mixed-clock issue queue for a GALS out-of-order core

In a globally asynchronous, locally synchronous (GALS) processor, the
front end and the execution core run on separate clocks. Those clocks are
unrelated in phase and frequency. Somewhere an instruction has to cross from
the dispatch clock into the issue clock. The usual answer is to put a
mixed-clock FIFO between dispatch and a synchronous issue queue. That FIFO
costs an extra pipeline stage and extra storage.

This design drops the FIFO. The **issue queue itself is the clock-domain
boundary**:

- the dispatch stage writes entries on its own clock (`clk1`);
- wakeup, selection and read-out run on the issue clock (`clk2`);
- only one bit per entry, the Valid bit, is synchronized.

The RTL implements the mixed-clock issue queue described in *A Mixed-Clock
Issue Queue Design for Globally Asynchronous, Locally Synchronous Processor
Cores*. It also includes a dispatch stage so that the queue can be used and
tested as a working unit. The default configuration follows that design:
32 entries, a two-way pipeline (two dispatch and two issue ports), and
position-based selection of the two oldest-by-position ready entries. The
reference operating point is a 1.1 GHz dispatch clock and a 1.0 GHz issue
clock.

```
             clk1 (dispatch)                 |             clk2 (issue / execute)
                                             |
 inst[2] --> dispatch_unit --wr_en/idx/data--+--> mc_issue_queue --> iss[2] --> functional units
             | reg_status_table              |     32 x iq_entry                     |
             | avail_fifo  <---- busy_w -----+---  select2 (2 of 32)                 |
             |                               |     tag_delay  <---- wb_tag[2] -------+
             +<-- written --- tag_sync <-----+------------------------ wb_tag[2] ----+
```

## The path of one instruction

1. **Dispatch, clk1.** `dispatch_unit` takes a group of up to two renamed
   instructions. It looks up each source register in the register status
   table, which also sees the tags being written back in this cycle. An
   unused source is marked ready. It also takes one free entry index per
   instruction from the availability FIFO. The entry is written on the
   rising edge of `clk1`, with the same timing as an ordinary register
   write.
2. **Crossing.** On that edge the entry's Valid bit changes on the dispatch
   side. The issue side sees it through a two-flop synchronizer, so the entry
   becomes visible after two `clk2` edges. If the first flop misses the
   change, it takes three. Data and tags need no synchronizer: they were
   written on the same `clk1` edge and have been stable for two `clk2`
   cycles by the time the Valid bit arrives.
3. **Wakeup and select, clk2.** A visible entry requests issue when both
   operands are ready. An operand is ready if it was ready at dispatch or
   if a broadcast tag matches it. A match in the current cycle counts, so
   wakeup and select happen in the same cycle. `select2` grants the two
   lowest-index requests.
4. **Read-out.** On the edge that ends the cycle, the granted entries are
   copied to `iss[0]`/`iss[1]` and their Valid bits are cleared.
5. **Freeing.** The clear crosses back to `clk1`, again through two flops.
   The availability FIFO sees the entry's busy flag fall and queues its
   index for reuse.

An instruction that is ready at dispatch and meets an idle queue is
therefore issued on the **third `clk2` edge** after its dispatch edge, or the
fourth if a synchronizer misses.

## The Valid bit across two clocks

The original circuit is a four-port storage bit:

- either dispatch word line sets it;
- either issue read line clears it;
- the issue side reads it through two synchronizing latches, which a pulse
  generator flushes when the bit falls.

No synthesizable flip-flop can be written from two clocks, so `valid_bit`
stores the bit as two toggle flops:

| signal | clock | changes when |
|---|---|---|
| `set_t` | clk1 | an entry is written |
| `clr_t` | clk2 | the entry is read (granted) |
| `valid_r = sync2(set_t) ^ clr_t` | clk2 view | rises two clk2 edges after a write, falls in the same edge as the read |
| `busy_w = set_t ^ sync2(clr_t)` | clk1 view | rises on the write edge, falls two clk1 edges after the read |

The two views have these properties:

- **Issue side.** It never has to re-synchronize a clear that it made
  itself. In the original circuit, the pulse generator provides this by
  flushing the synchronizers when the bit falls.
- **Dispatch side.** It sees an entry as busy until the read has safely
  crossed back. So it cannot rewrite an entry that the issue side is still
  reading.

Two rules keep the toggle pair consistent, and the module checks both with
assertions:

- write only when `busy_w` is low;
- read only when `valid_r` is high.

Each `ready_flag` follows the same split:

- **Dispatch-time status:** a register on `clk1`, written with the entry.
- **Match flag:** a register on `clk2`. It can only be set while the entry
  is visible on the issue side (`valid_r` high). It is cleared as soon as
  the entry is no longer visible, so a rewritten entry never inherits an
  old match.

## Why broadcast tags are delayed

The execution units broadcast destination tags in `clk2`. The dispatch
stage needs the same tags in `clk1` for its register status table, so
`tag_sync` carries them across. It keeps one toggle bit per physical
register and uses a two-flop synchronizer per bit. A multi-bit tag is never
synchronized as a bus.

The danger is an instruction whose source tag is broadcast in the window
after it was dispatched but before its entry is visible on the issue side:

- the dispatch stage has not yet seen the tag, so it writes the operand as
  not ready;
- the queue entry does not yet exist for the issue side, so it misses the
  match;
- the instruction waits forever.

The fix is the one the original design uses: tags pass through `tag_delay`
before they reach the comparators. They then arrive after any such
instruction has become visible.

The original design uses a delay of 3 cycles. This RTL's worst case is
longer:

- **Tag crossing into the register status table:** three `clk1` edges (two
  flops, plus one edge if the first flop misses).
- **Entry becoming visible on the issue side:** three `clk2` edges.
- **The broadcast cycle itself:** one more cycle.

The required delay is therefore

    DELAY >= 4 + 3 * T1 / T2        (T1 = clk1 period, T2 = clk2 period)

At 1.1 / 1.0 GHz this is 6.7, so the default is `TAG_DELAY = 7`. Raise it
if the dispatch clock is much slower than the issue clock. The end-to-end
testbench records "late-tag wakeups", meaning instructions that could only
wake up through the delayed tag. With the delay cut to 2, the same test
deadlocks.

A consequence for the surrounding core: a physical register must not be
reallocated while an old broadcast of its tag is still in the delay line.
Otherwise that stale broadcast could wake a consumer of the new value.
Normal commit latency covers this, and the testbench enforces it.

## Selection: two of 32 with group disables

`select2` grants the lowest-index request on `grant1` and the second
lowest on `grant2`. Both buses are one-hot or zero.

In a flat design every request line would have to kill every grant below
it. Instead, requests are grouped four at a time.

- `disable_group` gives each group two kill lines: "one or more requests
  here" and "two or more".
- Those kill lines are chained down the groups. For 32 lines the top group
  drives seven groups below instead of 28 separate lines.
- Inside a group, `grant_cell` combines:
  - the incoming group kills;
  - the kills from the lines above it in the same group.

  A line keeps Grant_1 if nothing above it requests. It keeps Grant_2 if
  exactly one request is above it.

The original is a precharged dynamic circuit. This RTL is the equivalent
static logic.

## Issue lanes and functional units

`fu_ready[1:0]` says which issue lane can accept an instruction this
cycle:

- **Both lanes free:** Grant_1 goes to lane 0 and Grant_2 to lane 1.
- **One lane free:** Grant_1 goes to that lane.
- **No lane free:** no entry is read. Requests simply stay asserted.

## Dispatch stage

- **`reg_status_table`** holds one ready bit per physical register, all
  ready after reset.
  - A bit is cleared when its register is given to a dispatched instruction
    as a destination.
  - It is set by a `written` pulse from `tag_sync`.
  - Lookups also see this cycle's pulses.
- **`avail_fifo`** is a circular buffer of free entry indices, holding
  0..31 after reset.
  - Up to two indices are popped per cycle.
  - An entry whose busy flag fell is remembered as pending. Up to two
    pending entries are pushed back per cycle, lowest index first; a second
    `select2` picks them.
- **`dispatch_unit`** accepts a group only when there are enough free
  entries for all of its valid instructions. When it cannot, `in_ready`
  stays low: this is the dispatch stall.
  - Lane 0 is the older instruction. A lane 1 source that names lane 0's
    destination is written as not ready.
  - Every dispatched instruction's destination is marked not ready.

## Top-level interface (`gals_iq_top`)

| port | dir | clock | meaning |
|---|---|---|---|
| `clk1`, `rst1_n` | in | – | dispatch clock, asynchronous active-low reset |
| `inst[2]` (`ren_inst_t`) | in | clk1 | valid, src1_used, src1, src2_used, src2, dst, payload |
| `in_ready` | out | clk1 | the offered group is taken on this rising edge |
| `free_count` | out | clk1 | free entries known to dispatch |
| `clk2`, `rst2_n` | in | – | issue clock and reset |
| `fu_ready[1:0]` | in | clk2 | issue lane may receive an instruction |
| `iss[2]` (`issue_t`) | out | clk2 | registered: valid, src1, src2, dst, payload |
| `iss_idx[2]` | out | clk2 | entry each issued instruction came from |
| `iq_valid[31:0]` | out | clk2 | entries currently valid on the issue side |
| `wb_tag[2]` (`tag_bcast_t`) | in | clk2 | destination tags from the execution units |

Assert both resets together. Types and sizes are in `rtl/iq_pkg.sv`:

| constant | default | note |
|---|---|---|
| `IQ_DEPTH` | 32 | entries; must be a power of two (FIFO pointers) |
| `WAYS` | 2 | dispatch/issue width; the selector is fixed at two grants |
| `NPREG` | 64 | physical registers, so 6-bit tags (own choice) |
| `PAYLOAD_W` | 16 | opaque per-instruction payload (own choice) |
| `GROUP` | 4 | requests per disable group |
| `TAG_DELAY` | 7 | see above (the original design uses 3) |

## Where this RTL departs from the original design

- **Clocking of storage.** Storage is flip-flops on rising edges, not SRAM
  cells, negative-edge flip-flops and synchronizing latches.
  - Entries are written on the rising `clk1` edge, not in the negative
    phase.
  - A tag match is captured on the rising `clk2` edge, and it also acts
    combinationally in the same cycle.
- **Valid bit.** It is a toggle pair, as described above. There is no
  separate pulse generator and no reset pulse derived from a word-line
  edge.
- **Tag delay.** It is 7 cycles, not 3, to cover this RTL's synchronizer
  path.
- **Tag crossing.** Tags cross into `clk1` as per-register toggle bits,
  not as synchronized tag buses.
- **Grant timing.** Grants are combinational within the issue cycle.
  Read-out is a register loaded on the edge that ends it.
- **Register status table.** The dispatch stage marks destinations not
  ready. The original gives this job to the rename stage, which is not
  part of this RTL.
- **Own choices.** The stall rule, the handshake, the lane mapping under
  `fu_ready`, the availability FIFO structure, tag width and payload are
  this design's own; the original does not specify them.
- **Not built:**
  - fetch, rename, execute, write-back and commit;
  - the synchronous and FIFO-based reference designs the original compares
    against;
  - anything about power or energy. Its power and energy figures come from
    transistor-level simulation and have no RTL counterpart.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

Most testbenches use two unrelated clocks: 910 ps and 1000 ps periods,
with a phase offset so that edges never coincide. All of them compare
against reference models written independently in the testbench.

| testbench | what it establishes |
|---|---|
| `tb_select2` | all one- and two-hot patterns plus 4000 random ones, against a lowest-two scan |
| `tb_valid_bit` | visible exactly two clk2 edges after a write, cleared at once by a read, freed two clk1 edges later |
| `tb_iq_entry` | a broadcast before the entry is visible is ignored; same-cycle wakeup, held wakeup, read data, erase |
| `tb_mc_issue_queue` | cycle-exact model of the whole queue (visibility, delayed wakeup, selection, lane mapping) over ~5700 instructions |
| `tb_iq_wakeup_timing` | one instruction cycle by cycle: valid two edges after the write, request exactly `TAG_DELAY` cycles after its tag is broadcast, issue on the next edge; and a tag broadcast just before the write still wakes the entry |
| `tb_gals_iq_top` | end-to-end run at default sizes, 1.1/1.0 GHz (see below) |
| `tb_iq_same_clock` | the same program with one 1 GHz clock driving both domains |
| `tb_tag_sync`, `tb_reg_status_table`, `tb_avail_fifo`, `tb_dispatch_unit`, `tb_ready_flag`, `tb_cam_cell`, `tb_tag_delay`, `tb_sync2`, `tb_disable_group`, `tb_grant_cell` | each unit against its own model |

`tb_gals_iq_top` runs a random 3000-instruction program with real
register dependences and two functional units (latencies 1 and 2 cycles). It
checks the following:

- every instruction issues exactly once, with its own fields;
- no instruction issues before its sources' tags were broadcast;
- nothing is left in the queue at the end, i.e. no deadlock;
- the idle-queue dispatch-to-issue latency is three `clk2` edges.

It also counts these events and fails if any of them never occurs:

- dispatch stalls on a full queue;
- functional-unit stalls;
- dual issue;
- tag wakeups;
- late-tag wakeups through the delay line;
- same-group dependences;
- write-back bypass;
- one-operand instructions.

Simulation uses Verilator 5 with timing support. For example:

```
verilator --binary --timing --assert -Irtl rtl/iq_pkg.sv rtl/*.sv \
          tb/tb_gals_iq_top.sv --top-module tb_gals_iq_top
./obj_dir/Vtb_gals_iq_top
```

(`iq_pkg.sv` must come first.) A full end-to-end run takes a few seconds.

The synchronizers can be trusted only as far as a two-state simulator can
test them: metastability itself is not modelled. The worst-case analyses
above, including the extra edge a synchronizer may take, are by
construction, not by simulation.
