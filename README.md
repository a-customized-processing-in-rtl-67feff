# In-memory Needleman-Wunsch alignment for an HMC-like DRAM stack

Global alignment of DNA sequences is bound by memory bandwidth, not by
arithmetic. Each cell of the Needleman-Wunsch dynamic-programming (DP) matrix
takes two additions and a three-way maximum, yet moves about 8.5 bytes of
data. This design therefore puts small alignment engines in the logic layer
of a 3D-stacked DRAM (an HMC-style cube with 32 vaults). There they use the
bandwidth of each vault's own through-silicon vias instead of the narrower
host links.

The host loads a query sequence and many reference sequences into the
vaults. It then sends one *PIM packet* per (query, reference) pair. In each
vault a processing element (PE) walks the whole DP matrix of that pair, and
the vault keeps the best score it has seen. The host finishes by comparing
the 32 per-vault best scores.

The RTL is SystemVerilog-2017 and synthesizable. Every module is checked by a
self-checking testbench, and the whole stack, at its default size, is run end
to end.

## Block map

```
 host links (N_LINKS=4)                                   vault controllers (outside)
   link_req ──► xbar (requests, by vault) ──► pim_vault[0..31] ──► vc_req / vc_resp
   link_resp ◄── xbar (replies, by link)  ◄──┘      │
                                                    ├─ PIM queue ─► pim_scheduler ─► pe[0], pe[1]
                                                    ├─ memory queue (host RD/WR)       │
                                                    ├─ vault_arbiter (round robin) ◄───┘ address + store queues
                                                    ├─ host response queue
                                                    └─ best score / best reference register
 pe = agu + pe_datapath (+ score_table) + address queue + store queue + read buffer
```

| file | role |
|---|---|
| `rtl/pim_pkg.sv` | widths, packet and request structs, direction encoding |
| `rtl/pim_hmc.sv` | top: request crossbar, 32 vaults, reply crossbar |
| `rtl/pim_vault.sv` | one vault's logic layer |
| `rtl/pe.sv` | processing element |
| `rtl/agu.sv` | address generation unit: the DP walk and all memory traffic of a PE |
| `rtl/pe_datapath.sv` | one-cycle DP cell datapath |
| `rtl/score_table.sv` | substitution scores addressed by the character pair |
| `rtl/pim_scheduler.sv` | gives queued tasks to idle PEs |
| `rtl/vault_arbiter.sv` | shares the vault controller; steers read data by tag |
| `rtl/xbar.sv` | generic round-robin packet crossbar |
| `rtl/rr_arbiter.sv`, `rtl/sync_fifo.sv` | helpers |

## The recurrence and the datapath

For query A (length m, rows i) and reference B (length n, columns j):

```
DP(i,j) = max( DP(i-1,j-1) + T(a_i,b_j),     diagonal  -> direction 0
               DP(i-1,j)   + gap,            North     -> direction 1
               DP(i,j-1)   + gap )           West      -> direction 2
```

T is +1 for a match and -1 for a mismatch, and the gap score is -1. When
candidates are equal, the diagonal wins over North and North wins over West.
The gap row and column are never stored. Their values are
`DP(-1,-1) = 0`, `DP(i,-1) = (i+1)*gap` and `DP(-1,j) = (j+1)*gap`, and the
AGU supplies them itself. `DP(m-1,n-1)` is the alignment score. For example,
aligning `AND` with `SEND` ends in 0.

`pe_datapath` has five data registers: A, B, North, West and North-West.
Only A, B and North are loaded from memory:

* on every `start`, the new maximum goes into both `value` and West, because
  the next cell's West is this cell's result;
* on every `start`, North-West takes the old North, because the next cell's
  diagonal is this cell's North;
* `row_init` loads West and North-West with the boundary values at the start
  of a row.

The score table is addressed by the concatenation `{a, b}` of the two
characters. For protein work it can be built with `CHAR_W=5` and reloaded
through its write port. The result appears one clock after `start`, with
`valid` high for one cycle.

## The AGU: how a PE walks the matrix

This is the part that needs the closest reading.

**Memory layout.** All addresses are byte addresses and all accesses are
32-bit words.

* A and B are packed 16 two-bit characters per word. Character k of a word
  sits in bits `[2k+1:2k]`. The encoding is A=0, C=1, G=2, T=3, or any fixed
  map. With `CHAR_BITS=5` (protein) a word holds six 5-bit characters in
  bits `[5k+4:5k]`, and the top two bits are unused.
* The DP matrix is row-major with one word per cell:
  `addr_dp + 4*(i*n + j)`.
* The direction matrix is row-major with 16 two-bit entries per word. Each
  row starts a new word, so word `addr_dir + 4*(i*ceil(n/16) + j/16)` holds
  entry `j%16` in bits `[2(j%16)+1 : 2(j%16)]`.

**Traffic per cell.**

* Reads: one word of A per 16 rows, one word of B per 16 columns (B is read
  again for every row), and North `DP(i-1,j)` for every cell except in row 0.
  For protein, replace 16 with 6.
* Writes: one DP word per cell, and one Dir word per 16 cells or at the end
  of a row.

For long rows this comes to about 2.1 accesses per cell for DNA and 2.2 for
protein. The `tb_pe` and `tb_pe_protein` testbenches check the exact access
counts.

**Two sides that run apart.**

* The *issue side* walks (i, j) and pushes read requests into the PE's
  10-entry address queue. It may run ahead of the computation, but only
  while the read buffer has room for every reply it has asked for
  (`RESP_DEPTH` credits).
* A North read of `DP(i-1,j)` is held back until the write of that cell has
  entered the address queue. The queue and the vault controller are both
  first-in first-out, so the read then returns the new value. A row shorter
  than the look-ahead therefore cannot read stale data.
* The *compute side* pops replies in request order. In its fetch cycle it
  loads A, B and North (plus the row boundary), and in the next cycle it
  pulses `start`.
* One cycle after `start`, the DP write enters the queue together with its
  data in the store queue. A Dir write follows whenever a Dir word is full.
* Writes win over reads for the single queue slot per cycle. Everything
  stalls while the address or store queue is full.

A cell therefore takes two cycles when its data are waiting. In practice the
vault's memory bandwidth sets the rate. `done` pulses when the last write of
the task has been queued, and `score` then holds `DP(m-1,n-1)`. `agu_ready`
is high only while no task is held.

## A vault

* **Splitting host packets.** `pim_vault` sorts incoming packets by command.
  PIM packets go to the PIM queue and reads/writes go to the memory queue.
* **Credit flow control.** Each time a PIM packet leaves the PIM queue, the
  vault pulses `pim_credit`. The host must never have more than
  `PIM_Q_DEPTH` PIM packets in flight to a vault. An assertion flags an
  overflow.
* **Scheduling.** `pim_scheduler` gives the head task to a PE whose
  `agu_ready` is high. When more than one PE is ready, it picks round robin.
* **Sharing the vault controller.** `vault_arbiter` serves the PE queues and
  the memory queue round robin, one request per cycle. Every request carries
  a tag `{source, link, host tag}`, and read data are sent back by that tag.
  A host read is admitted only while the host response queue has room for
  its reply.
* **Best score.** When a PE finishes, its score is compared with the
  vault's best. The best score and the address of the reference sequence
  that produced it are outputs. `best_score` resets to the most negative
  32-bit value.

## The stack

* `pim_hmc` instantiates 32 vaults between two `xbar` crossbars. Requests
  are steered by their vault field, and replies go back by the link field
  that the link controller put into the request.
* A packet is one wide transfer here. Splitting packets into link flits, the
  serial links themselves and the DRAM vault controllers are outside this
  RTL. The vault-controller channel of every vault is therefore a port: a
  request valid/ready channel, and in-order read data that are always
  accepted.

## Parameters (top level)

| parameter | default | origin |
|---|---|---|
| `N_VAULTS` | 32 | design description (HMC 2.0 vault count) |
| `N_LINKS` | 4 | design description |
| `N_PE` | 2 per vault, 64 in total | design description (bandwidth arithmetic) |
| `QUEUE_DEPTH` | 10 (PE address and store queues) | design description for the address queue |
| `PIM_Q_DEPTH`, `MEM_Q_DEPTH`, `RESP_DEPTH`, `HRESP_DEPTH` | 8 | own choice |
| `GAP` | -1 | design description; match +1 and mismatch -1 are `score_table` parameters |
| `CHAR_BITS` | 2 (DNA); 5 builds the protein alphabet | design description |

Fixed in `pim_pkg`: 32-bit words, 32-bit DP cells, 2-bit direction entries,
32-bit addresses and lengths.

## How far to trust it, and where it departs

Tested behaviour:

* every DP cell, every direction entry and the final score of random
  alignments against a software model, from single cells up to 40x64
  matrices;
* with random memory latency and back-pressure;
* 384 alignments spread over all 32 vaults, with default parameters, through
  the links;
* a database search on one vault: a 1024-character query against six
  references of up to 1024 characters, 2.75 million cells in all. It
  measures 2.124 memory accesses per cell and 0.471 cells per cycle for the
  vault's two PEs, with the vault port busy every cycle while both work.

Departures and limits:

* **Protein mode.** `CHAR_BITS=5` gives 5-bit characters, six per word, so
  the AGU fetches a new sequence word every six cells. The choice is made
  when the design is built, not per task. The score table keeps its +1/-1
  contents in that build. A 20x20 substitution matrix such as BLOSUM would
  have to be written through the table's write port, and that port is not
  brought out of the PE. Only a single PE is tested in protein mode.
* **Memory rate.** A vault issues at most one 32-bit access per cycle to its
  controller. A PE does about 2.1 accesses per cell, so two busy PEs share
  roughly 0.47 cells per cycle. Running both PEs at one cell per cycle would
  need about four accesses per cycle per vault.
* **Full DP matrix in memory.** Every task writes its whole DP matrix and
  direction matrix, as the method prescribes. A 100K x 10K alignment needs
  4 GB of DP storage, more than one vault (128 MB) and more than the 32-bit
  address space. The RTL handles such lengths (32-bit lengths, 64-bit cell
  counter), but only alignments whose matrices fit in memory can actually
  run.
* **Not included:**
  * traceback of the best alignment, which the host does;
  * an optional on-PE cache of the previous DP row;
  * host address translation.
* **Timing assumptions.** The host must respect the PIM credits, and the
  vault controller must return reads in order.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself by a
watchdog. The shared packages must come first on the command line:

```
verilator --binary --timing --assert --top-module tb_pim_hmc \
  rtl/pim_pkg.sv tb/nw_ref_pkg.sv rtl/*.sv tb/*.sv
./obj_dir/Vtb_pim_hmc
```

Available testbenches:

* `tb_sync_fifo`, `tb_rr_arbiter`, `tb_score_table`, `tb_xbar`
* `tb_pe_datapath`: the `AND`/`SEND` example and random pairs
* `tb_agu`: address discipline, read-after-write order, write-back one cycle
  after `start`
* `tb_pe`: includes the access counts
* `tb_pe_protein`: the same checks with `CHAR_BITS=5` and a 20-letter alphabet
* `tb_pim_scheduler`, `tb_vault_arbiter`
* `tb_pim_vault`: host load, credits, mixed traffic
* `tb_pim_hmc`: the whole stack at default size
* `tb_workload_vault`: the database search on one vault, with score, access
  rate and port use checked

The end-to-end test also counts the events it must provoke:

* a PIM credit stall;
* both PEs of a vault busy at once;
* a full address queue;
* several vaults contending for one link;
* host reads served during alignment.

`tb/vault_mem_model.sv` is the behavioural vault controller used by the
tests. It serves requests in order, with a fixed latency and random
back-pressure.
