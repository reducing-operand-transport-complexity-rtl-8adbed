# Distributed register file back end

In a wide superscalar processor every functional unit reads its operands from one
central register file and a global bypass network. As issue width grows, that
register file needs many ports and the operand wires must reach across every
unit. Both the access time and the wire delay then limit the clock.

This RTL takes the central register file apart. Each functional unit forms a
**cluster** with its own small **local register file** (LRF). An
architectural register can live in one cluster or in several at the same time.
A **local register mapping table** (LRMT) records where each one lives. When an
instruction needs a value that its cluster lacks, a **register transfer**
copies it over a dedicated **transfer bus**. The transfer is an operation of
its own, executed by a dedicated **Rcopy unit**. Two mechanisms keep transfers
off the critical path:

* **eager transfer**: when the Rcopy unit is idle, the most recently written
  register is copied ahead of need;
* **multicast**: each transfer writes the value into every cluster that lacks
  it and has room, not only the one that asked.

The design follows the architecture of *"Reducing Operand Transport Complexity
of Superscalar Processors using Distributed Register Files"*. It covers the
integer part of that architecture: integer ALU and multiplier clusters,
dispatch, the LRMT, transfers and commit. The last section lists what is left
out and what was added.

## Path of an instruction

```
 decoded        +-----------------------------+      +-------------+
 instruction -->| dispatch_unit               |----->| rob         |--> commit (dst, value)
 (valid/ready)  |  cluster_assign  lrmt       |      | (in order,  |--> registers freed
                |  lreg_alloc x N  multicast_sel    |  frees regs)|       to lreg_alloc
                +------+-----------------+----+      +-------------+
                       | renamed uop     | transfer ops        ^ completions
                       v                 v                     |
        +--------------+--+        +------------+              |
        | fu_cluster 0..N-1|<======>| rcopy_unit |              |
        |  issue_queue     |  xfer  |  (8-entry  |              |
        |  int_alu/int_mul |  _net  |   FIFO)    |              |
        |  local_regfile   |  bus   +------------+              |
        +------------------+--------------------------------------+
```

1. **Assign.** `cluster_assign` looks at the clusters of the instruction's
   class (ALU or multiplier). It picks the one that already holds the most of
   the instruction's source operands. Ties go to the cluster with the fewest
   occupied issue-queue entries, then to the lowest number. A cluster is
   eligible only if its queue has room and it has enough free local registers.
   It needs one register for the result plus one for each operand that must
   be transferred in.
2. **Transfer missing operands.** For each source operand that has no copy in
   the chosen cluster, dispatch issues an *on-demand* transfer to the Rcopy
   unit, one per cycle. The chosen cluster is held in the meantime. Each
   transfer allocates a local register in every destination cluster. The LRMT
   records the new copies at once, so later instructions can already be
   renamed to them.
3. **Dispatch.** The instruction is renamed to the chosen cluster's local
   registers and written into that cluster's issue queue. A fresh local
   register is allocated for its result. In the LRMT, the destination now maps
   only to that register: every older copy of it, in any cluster, becomes
   invalid. A reorder-buffer entry remembers those older copies.
4. **Execute.** In each cluster, the oldest queued instruction whose operand
   registers are ready issues. It reads the LRF and computes its result. An
   ALU writes the result at the end of the issue cycle. The multiplier is
   pipelined and writes it 3 cycles after issue. When the result is written,
   the register's ready bit is set and the value goes to the reorder buffer.
   A dependant issues in the next cycle, so a chain of ALU operations issues
   back to back with no bypass network.
5. **Commit.** The reorder buffer retires up to 4 instructions per cycle, in
   program order. For each one it reports the destination and value, and
   returns the older copies of the destination to the free lists.

A source register that has never been written has no mapping anywhere and
reads as zero. After reset all registers therefore read as zero.

## The local register mapping table

For every architectural register and every cluster, the LRMT (`lrmt`) holds a
valid bit and a local register number. A cluster holds at most one copy of a
register. A row whose valid bits are all zero means the register was never
written. The table has four combinational lookup ports: the two sources, the
destination (whose old copies go into the reorder buffer) and the eager
candidate. It has three update ports:

* *def*: an instruction writes the register. The row becomes a single valid
  bit in the chosen cluster.
* *cp*: a transfer adds copies in a set of clusters.
* *drop*: one copy is removed (used by register reclaim, below).

## Register transfers

A transfer operation names a source cluster and source local register, a set
of destination clusters and the register allocated in each destination. The
Rcopy unit (`rcopy_unit`) keeps up to 8 of them and executes them in order,
one per cycle. The head of the queue is put on the bus (`xfer_net`). As soon
as the source register's ready bit is set, the bus reads the value through the
source cluster's read/write LRF port. In the same cycle it writes the value
into every destination through their read/write ports, and sets their ready
bits. Instructions waiting in a destination cluster's issue queue wake up in
the next cycle through those ready bits.

`multicast_sel` decides where a transfer goes. The source is the
lowest-numbered cluster that holds the register. The destinations are every
cluster that lacks the register and has more than `XFER_RESERVE` (3) free
local registers. A cluster may also be forced in or left out:

| transfer | when | register | forced in | left out |
|---|---|---|---|---|
| on-demand | an operand is missing in the chosen cluster | that operand | chosen cluster | none |
| eager | no on-demand transfer this cycle and the Rcopy queue is empty | most recently written register | none | the cluster the current instruction goes to |
| copy-out (reclaim) | as eager, while reclaiming | a copy held only by the full cluster | none | none |

Every transfer is therefore a multicast. An on-demand transfer also acts as an
eager transfer to the other clusters. An eager transfer never takes a
cluster's last spare registers. This is what the reserve of 3 is for: an
instruction may need up to three registers in its cluster (two transfers and a
result). An eager transfer is skipped in a cycle where the dispatched
instruction overwrites the eager register.

## Freeing and reclaiming local registers

**When a register becomes free.** A local register is freed when its value is
dead everywhere. The design derives that from program order. The reorder
buffer frees the copies that an instruction's write made obsolete when that
instruction commits. By then every older reader has executed, and every
older write into that register, including a pipelined multiply, has landed. Transfers are
not in the reorder buffer, so one more condition is needed. Every entry
records how many transfers had been issued when it was dispatched. The head
retires only after the Rcopy unit has completed that many transfers (16-bit
counters compared modulo 2^16). Each of the up to 4 entries retiring in a
cycle must pass this test on its own. So no queued transfer can read a register
after it was freed. The same rule covers a transfer that is still to write
into a register whose mapping was meanwhile superseded.

**Why reclaim is needed.** A cluster holds at most one copy per architectural
register. With 32 architectural and 32 local registers, a cluster can end up
holding a current copy of almost every register. Once the other instructions
drain, no commit frees anything in it. An instruction that must run there,
such as a multiply when there is only one multiplier cluster, then waits
forever. The random end-to-end test hits this within a few thousand
instructions.

**The reclaim mechanism.** When no cluster of the needed class has enough
free registers but one has queue space, `cluster_assign` names the cluster to
make room in. The cluster it names has the most free registers.

* If that cluster holds a copy that another cluster also holds (never one of
  the waiting instruction's sources), dispatch drops it from the LRMT. It then
  allocates a *silent* reorder-buffer entry that records the register. The
  entry is done from the start, frees the register when it reaches the head,
  and is not reported on the commit port. One copy is dropped per cycle.
* If every copy in that cluster is the only one, dispatch first sends one of
  them to the other clusters with an eager transfer, once the Rcopy queue is
  empty. The copy is now redundant and can be dropped in a later cycle.

This path is not part of the reference architecture. It is marked by the
`ev_reclaim` output.

## Clusters and timing

`fu_cluster` contains an `issue_queue` (8 entries kept in age order; the oldest
ready entry issues; the queue closes up behind it), one `int_alu` or `int_mul`
selected by the `FCLASS` parameter, a `local_regfile` and 32 ready bits.
Dispatch clears a register's ready bit when it allocates it. The functional
unit sets it when it writes the register, and so does the transfer bus. The
`LAT` parameter sets the result latency: 1 for an ALU, `MUL_LAT` (3) for the
multiplier. With `LAT` above 1, the result, its register number and its
reorder-buffer index pass through `LAT-1` pipeline registers. The unit can
still take a new instruction every cycle. So a multiply often finishes after
younger ALU operations, and those then commit together with it.

| event | latency |
|---|---|
| instruction with all operands local: taken by dispatch | cycle *t* |
| earliest issue in its cluster | *t*+1 |
| result in LRF, ready for dependants (ALU) | end of the issue cycle (a dependant issues in the next cycle) |
| same, multiplier | end of the third cycle from issue (a dependant issues 3 cycles after the multiply) |
| each missing operand | delays dispatch by one cycle (one on-demand transfer per cycle) |
| transfer | executes in the cycle after it is queued if its source is ready and it is at the head |
| commit | earliest one cycle after completion, up to 4 per cycle |

The local register file has 32 registers of 32 bits. It has two read ports and
one write port for its functional unit, and one read/write port for the
transfer bus. Reads are combinational.

## Parameters and types

| where | name | default | meaning |
|---|---|---|---|
| `drf_core` | `N_ALU` | 4 | integer ALU clusters, numbered 0..N_ALU-1 |
| `drf_core` | `N_MUL` | 1 | integer multiplier clusters, numbered after the ALUs |
| `drf_core` | `NCOMMIT` | 4 (`COMMIT_W`) | instructions committed per cycle at most |
| `drf_pkg` | `MUL_LAT` | 3 | multiplier result latency in cycles (pipelined) |
| `drf_pkg` | `LRF_DEPTH` | 32 | local registers per cluster |
| `drf_pkg` | `IQ_DEPTH` | 8 | issue-queue entries per cluster |
| `drf_pkg` | `RCQ_DEPTH` | 8 | Rcopy queue entries |
| `drf_pkg` | `ROB_DEPTH` | 32 | reorder-buffer entries |
| `drf_pkg` | `NARCH` | 32 | architectural registers |
| `drf_pkg` | `XFER_RESERVE` | 3 | spare registers a cluster keeps from multicast |

The defaults are the integer units and the commit width of the reference
4-way machine (4 IntALU, 1 IntMUL, commit width 4). `N_ALU=6, N_MUL=2,
NCOMMIT=8` gives the integer units and commit width of the 8-way machine.
The reorder-buffer depth, the number of architectural registers and the
multiply latency are this design's own choices. The multiply latency follows
the usual 3-cycle pipelined integer multiplier of the simulator the reference
results come from.

`inst_t` (decoded instruction) has these fields: `fclass` (`FC_ALU` or
`FC_MUL`), `op` (`OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLT` (signed),
`OP_SLL, OP_SRL, OP_MUL`), `dst`, `src1`, `src2`, `use_imm` and `imm` (32
bits; it replaces `src2` when `use_imm` is set). An operation of the wrong
class yields zero.

## Top-level interface (`drf_core`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, active-low synchronous reset |
| `in_valid`, `in_inst`, `in_ready` | in/in/out | instruction handshake. `in_inst` must stay stable while `in_valid` is high and `in_ready` is low. `in_ready` is high in the cycle the instruction is taken |
| `commit_valid[NCOMMIT]`, `commit_dst[NCOMMIT]`, `commit_value[NCOMMIT]` | out | committed instructions, slot 0 oldest; the valid slots of a cycle are in program order and follow the previous cycle's |
| `ev_ondemand`, `ev_eager`, `ev_multicast`, `ev_reclaim`, `ev_stall` | out | one-cycle pulses, for counting. `ev_multicast` means more than one destination. `ev_stall` means an instruction waited for a reason other than its own transfers |

## Differences from the reference architecture

* **Width.** The reference machine fetches, decodes and commits 4 (or 8)
  instructions per cycle. This RTL commits up to 4 (or `NCOMMIT`) per cycle,
  but takes in and dispatches only one instruction per cycle (an eager
  transfer may go with it), and issues at most one on-demand transfer per
  cycle. Each cluster issues one instruction per cycle, as in the reference.
* **Units.** Only integer ALU and multiplier clusters exist. There are no
  floating-point clusters and no load/store clusters with their load/store
  queue. Fetch, branch prediction, decode, caches and memory are not built:
  the core takes already decoded instructions.
* **Operations and latencies** of the ALU and multiplier are this design's own
  choices: a minimal integer set, a single-cycle ALU and a 3-cycle pipelined
  multiplier.
* **Added mechanisms**: register reclaim (above), the transfer-count condition
  at commit, and the spare-register reserve for multicast. The reference
  architecture does not specify how registers are freed or how a full local
  register file is handled.
* **Small choices**: "least busy" means the fewest queued instructions; the
  transfer source is the lowest-numbered holder; the transfer network is a
  single bus carrying one transfer per cycle.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
compares the module with an independent reference model or with directed
expectations, and prints `TB_RESULT checks=N failures=M`.

* `tb_drf_core` runs the core at its default parameters. The program has 3000
  random ALU, immediate and multiply instructions. In its second half it uses
  all 32 registers to put the local register files under pressure. Every
  commit is checked, in order, against an in-order reference model. The test
  fails if any of these never happened: on-demand transfer, eager transfer,
  multicast, register freed at commit, a cluster reaching its reserve, a
  register reclaim, or several commits in one cycle.
* `tb_drf_core_8way` runs the same kind of program on 6 ALU and 2 multiplier
  clusters with a commit width of 8.
* `tb_fu_cluster` checks the timing: back-to-back ALU chains, and a dependent
  multiply 3 cycles behind its producer while an independent one overtakes
  it.
* `tb_dispatch_unit` walks through directed scenarios. It covers assignment,
  an eager multicast, an on-demand transfer (one cycle of dispatch delay), and
  stalls on a full queue, a full reorder buffer and a full Rcopy queue. It also
  covers invalidation of old copies, register reuse, and reclaim with drop and
  copy-out.

To run a testbench with Verilator 5, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/drf_pkg.sv tb/tb_drf_core.sv --top-module tb_drf_core
./obj_dir/Vtb_drf_core
```

The IPC printed by the end-to-end test depends on the stimulus. The test
mostly offers one instruction per cycle, so values around 0.7 reflect the
one-wide dispatch. They are not a performance measurement.
