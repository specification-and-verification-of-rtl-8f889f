# PowerScale bus arbiter

In a PowerScale multiprocessor, PowerPC processors share one memory. There
are up to four nodes of two processors each, plus a fifth node for I/O. Every
processor reaches memory over two buses. One is a single 64-bit address bus
shared by all of them, which carries commands. The other is its node's 64-bit
data path, which joins the memory controller (SMC) through a crossbar.
Nobody may drive a bus without a grant. One central arbiter hands out every
grant, for the address bus and for each data path.

This RTL implements that arbiter, together with the two small pieces of the
memory controller that take part in arbitration. The rules it follows come
from a published formal model of the protocol, written in LOTOS and checked
by model checking (G. Chehaibar, H. Garavel, L. Mounier, N. Tawbi,
F. Zulian, INRIA research report 2958, 1996). That model gives the
arbitration algorithm and its correctness requirements. It does not give
signal timing or encodings, so those are this design's own choices. Each
choice is marked below.

Three ideas make up the arbiter:

1. **Round-robin arbitration with a current pointer.** The address bus and
   each data path use the same scheme.
2. **An ordering queue for writes.** A write's data grant follows its address
   grant, in the same order as the address grants.
3. **Flow control on the memory controller's input buffers ("masking").** A
   processor may not send write data that the memory controller has no room
   for.

## Operations, requests and grants

Each processor has one operation in flight at a time. It issues one of three
kinds:

| operation | request | grant(s) | used for |
|---|---|---|---|
| address-only | ABR (address bus request) | ABG | reads, invalidations: a command only |
| data-only | PDBR (processor data bus request) | PDBG | interventions: cache-to-cache data |
| address-data | ADBR (address-data bus request) | ABG, then PDBG | writes: a command and its data |

The processor signals ADDRSEND once its command is on the address bus, which
ends its address tenure. It signals PDFREE when it gives its data path back.
While it holds a data path, it may send one word to the memory controller
(DATASEND), or none. After a data grant, the processor may start its next
operation at once, while its data tenure still runs. Address and data
tenures of different operations therefore overlap.

The memory controller also needs the data paths, to return read data. For
each path it posts MDBR, receives MDBG and frees the path with MDFREE.

In this RTL every request, grant and release is a one-cycle pulse. Grants
come from registers. Requests are recorded in tables inside the arbiter, so
a processor pulses its request once and then waits for the grant.

## Round robin with a current pointer

Each arbiter keeps a circular list of devices and a pointer into it. It scans
from the pointer and grants the first device with a pending request. It then
moves the pointer to the device after the winner. If nothing is pending, the
pointer stays where it is. `rr_pick` is this scan.

* **Address bus** (`rnd_addr_arb`). The devices are all processors, ten at
  the default size. ABR and ADBR both count as requests. The bus stays with
  its owner until ADDRSEND. The next grant may be decided at the same clock
  edge as ADDRSEND.
* **Data path** (`rnd_data_arb`, one per node). The devices are the node's
  processors (indices 0 and 1), then the memory controller (index 2). A
  processor requests either through a PDBR or through the write queue
  described next.

A request seen at a clock edge on a free bus is granted in the next cycle.
Because of the pointer rule, a waiting processor watches every other device
win at most once before its own turn. With two processors, that means the
other processor is granted at most once while one waits. This is the
fairness requirement of the protocol.

## Write ordering: the internal request queue

When the address arbiter grants an ADBR, it pushes the processor's index
into the queue of that processor's data path (`int_pdbr_fifo`). These
entries are internal data bus requests (IDBR). The data arbiter sees only
the head of the queue as a request. When it grants that processor, the entry
is popped. Write data grants on a path therefore come in the order of their
address grants, whatever the data pointer says. For example, if P0's ADBR
won the address bus before P1's, P0 gets the data path first, even when the
data pointer points at P1. A processor has at most one request in flight, so
the queue needs only one entry per processor on the path.

Processor `p` belongs to node `p / PROCS_PER_NODE` and uses that node's data
path. The five data paths run fully independently of one another.

## Flow control: DIRs and masking

This is the subtle part of the design.

For each data path, the memory controller has two **data-in registers
(DIRs)**. Each is a one-word buffer. A word a processor sends goes into a
free DIR and waits there until it is copied to memory, which frees the DIR.
The rule is simple to state: **no processor gets a data grant while both
DIRs are busy**. The consequences take more care.

**Who counts.** The memory controller owns the DIRs (`smc_di_stat`). The
arbiter keeps its own copy of the count (`arb_di_stat`) and derives `mask`
from it, where `mask` = all DIRs busy. The memory controller reports three
events to the arbiter:

| report | meaning | arbiter count |
|---|---|---|
| `di_change` | a processor tenure ended with a word in a DIR | +1 |
| `di_nochange` | a processor tenure ended without data | unchanged |
| `di_reset` | a DIR was copied to memory | -1 |

The change and no-change reports come one cycle after PDFREE. The reset
report comes one cycle after the copy.

**Why the arbiter waits after PDFREE.** A word sent in a tenure is known to
the arbiter only through the report. The data arbiter therefore does not
return to arbitration when PDFREE arrives. It goes to a waiting state
(`D_WAIT`) until a report arrives (`stat_rec`), one way or the other. Only
then is its mask certain to count the word just sent. Without this wait, two
back-to-back grants could fill three DIRs.

**Why the count may only be too high, never too low.** A word is not copied
to memory before its tenure has been reported. The reset report lags the
copy by one cycle. Together, these keep the arbiter's count at or above the
true occupancy whenever it arbitrates. The top level asserts this
(`a_count_safe`). A word sent into full DIRs would set a sticky `overflow`
flag. A correct system never sets it.

**Masking.** While `mask` is high, processors are not eligible and only the
memory controller can be granted (MDBG). The memory controller still needs
the path to return reads, which is how the system makes progress. After an
MDBG given under the mask, the **pointer is not moved**. This detail matters.
The original designers considered a variant that always moves the pointer
after an MDBG. Model checking showed that the variant breaks fairness: a
processor can be passed over more than once. This RTL does not include that
variant. The fault-injection copy of the data arbiter uses it, and both the
unit testbench and the arbiter testbench catch it.

## Timing at a glance

```
cycle            0      1      2      3      4      5      6
abr[i]/adbr[i]  _/‾\___________________________________________   request pulse
abg[i]          ______/‾\______________________________________   grant, next cycle (bus free)
addrsend[i]     _____________/‾\_______________________________   command sent: bus free again
```

A write follows the same pattern on its path, after its ABG:

```
idbr push (reg)  ABG cycle -> queue entry visible in the next cycle -> PDBG one cycle later
pdfree[i]        -> path in D_WAIT -> di_change/di_nochange (1 cycle later) -> D_IDLE -> next grant
```

The memory controller's requester (`m_data_req`) pulses MDBR, waits for MDBG,
holds the path for `XFER_CYCLES` cycles (`mem_xfer` high) and then pulses
MDFREE.

## Modules

```
powerscale_top                 arbiter + memory-controller side, per data path
├── ps_arbiter                 the arbiter
│   ├── rnd_addr_arb           address bus round robin, IDBR push
│   │   └── rr_pick
│   └── per data path (N_NODES):
│       ├── int_pdbr_fifo      IDBR queue
│       ├── rnd_data_arb       data path round robin with masking
│       │   └── rr_pick
│       └── arb_di_stat        arbiter's DIR count, mask
└── per data path (N_NODES):
    ├── smc_di_stat            the two DIRs, reports, copy to memory
    └── m_data_req             MDBR / MDBG / MDFREE for read returns
ps_pkg                          defaults, state enums
```

Top-level ports: processor vectors `abr adbr pdbr addrsend pdfree datasend`
(`NPROC` bits each), `ds_data` (`NPROC` x 64), grants `abg pdbg`. Per data
path: `rd_req` (a read return to deliver), `mem_xfer`, and the DIR copy
port `dir_wr_valid/dir_wr_data/dir_wr_ready`. Status outputs: `addr_busy`,
`path_state`, `dir_mask`, `dir_busy`, `dir_overflow`, `rd_overflow`. Clock
`clk`. Reset `rst_n` is asynchronous and active low: it empties every table,
queue and counter and sets the pointers to device 0.

## Parameters

| parameter | default | where from |
|---|---|---|
| `N_NODES` | 5 | four processor nodes plus the I/O node, one data path each |
| `PROCS_PER_NODE` | 2 | two processors per node. The I/O node is counted as two requesters, which gives the ten address-bus requesters of the real arbiter |
| `NB_DIR` | 2 | two DIRs per data path |
| `DATA_W` | 64 | data path width |
| `MAX_PEND` | 4 | own choice: read returns queued per path |
| `XFER_CYCLES` | 4 | own choice: cycles a read return holds the path (no burst length is published) |

## What follows the source, and what does not

Taken from the protocol description:
* the three operation kinds and their grant sequences;
* the request tables and round-robin pointer rule;
* the IDBR queue and its ordering purpose;
* two DIRs per path, a DIR freed by its copy to memory, and no PDBG while
  both are busy;
* masking, with the pointer kept after an MDBG;
* one data arbiter per path, independent of the others;
* the sub-block split and the signal names (ABR, ADBR, ABG, ADDRSEND, PDBR,
  PDBG, PDFREE, DATASEND, MDBR, MDBG, MDFREE, DI_CHANGE, DI_NOCHANGE,
  DI_RESET, FREEDIR).

This design's own choices:
* pulse handshakes and registered grants;
* the same-edge address handover;
* the meaning given to the three DIR reports and their one-cycle delay;
* the wait for the report after PDFREE;
* DIRs used oldest-first;
* the valid/ready copy port;
* device order on the data list: the path's processors first, then the
  memory controller;
* an IDBR taking precedence over a PDBR of the same processor (this cannot
  happen when each processor has one request in flight);
* the read-return queue and transfer length;
* reset.

Not included: the processors; the memory array; the data crossbar and its
256-bit memory bus; the I/O node's insides; and the address bus command
format. The source does not design any of these. Their connections are
ports. Write addresses travel on the address bus, so the DIR copy port
carries data only. The arbitration modes for PowerPC 601 and 604 processors
are not covered. Only the 620 mode is.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_rr_pick` | exhaustive scan check for 3 devices, random check for 10 |
| `tb_int_pdbr_fifo` | order, full, count against a queue model |
| `tb_arb_di_stat` | count, mask, same-cycle `stat_rec` |
| `tb_rnd_addr_arb` | every grant predicted by a reference model; IDBR pushes; one-cycle latency; fairness bound |
| `tb_rnd_data_arb` | every grant, pop and pointer predicted, with random masking; pointer kept after a masked MDBG; wait for the DIR report |
| `tb_smc_di_stat` | reports, copy order, no copy before its report, overflow flag |
| `tb_m_data_req` | MDBR/MDBG/MDFREE sequence, hold time, queue, overflow |
| `tb_ps_arbiter` | directed, cycle-exact scenarios: write order against the pointer, masking and kept pointer, independent paths |
| `tb_powerscale_top` | end to end at the default size (10 processors, 5 paths) with behavioural processors (`ps_proc_model`) |
| `tb_powerscale_1node` | the same at one node with P0 and P1 |

The two end-to-end tests check the four requirements of the protocol:
* **Response:** every request is granted, in the right sequence.
* **Fairness:** no other processor wins twice while one waits, on the
  address bus and on each path.
* **Write order:** PDBGs of writes come in the order of their ABGs.
* **Flow control:** no word is ever sent into full DIRs, and the DIRs
  always drain.

They also check that every written word reaches memory unchanged and in
order. They count each mechanism (the three request kinds, masking with a
processor waiting, MDBG under the mask, tenures without data, read returns,
address handover at the release edge) and fail if any of them never occurs.
Assertions in the RTL check the handshake rules: one grant at a time,
releases only by the owner, no PDBG under the mask, no queue overflow, and
the DIR count bound.

These are simulations with random stimulus, not proofs. The LOTOS model was
checked exhaustively. This RTL is only tested against the same
requirements.

Running one test with plain Verilator, from the directory holding `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
  rtl/ps_pkg.sv tb/tb_powerscale_top.sv --top-module tb_powerscale_top
./obj_dir/Vtb_powerscale_top
```

Each test finishes in well under a second. To explore other sizes, change
`N_NODES` or `PROCS_PER_NODE` on `powerscale_top`. The queue depth and all
list lengths follow from them.
