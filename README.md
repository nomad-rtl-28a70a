# NOMAD back-end: non-blocking page copies for an OS-managed DRAM cache

A large on-package DRAM (an HBM stack) can serve as a page-granular cache in
front of off-package DDR memory. If the operating system manages it, the tags
live in the page tables: a PTE points either at a physical frame (PFN) or at a
cache frame (CFN). Then a TLB hit is already a tag hit, and no tag has to be
read from DRAM. The cost comes on a miss. A blocking OS design stalls the
faulting thread until the whole 4 KB page has been copied in.

NOMAD splits the work in two:

* **Front end (OS software).** The tag-miss handler takes the next free cache
  frame from a FIFO, hands a *cache-fill* command to the hardware, and points
  the PTE at the frame. Then it returns to the thread at once. A background
  eviction daemon frees frames from the FIFO tail. It skips frames that are
  still in a TLB, and it hands *write-back* commands to the hardware for dirty
  frames.
* **Back end (hardware, this RTL).** The back end copies pages between the two
  memories in the background. It keeps page copy status holding registers
  (PCSHRs) so that an access to a page still being copied is not lost. Each
  such access is answered from DRAM, from the page copy buffer, or later, once
  its block has arrived.

The RTL covers the back end. It is distributed: one back end sits beside each
HBM stack. The OS routines, the TLB, the CPU caches and the memories
themselves are not hardware of this design. The testbenches contain
behavioural models of them.

## Block diagram

```
 OS command (T, PFN, CFN, Offset) ─┐            nomad_top: one back-end per HBM stack,
 LLC access (CFN, block, r/w) ─────┼── steer by CFN mod NUM_BE ──┬── nomad_backend #0 ── HBM 0, DDR port 0
                                   │                             └── nomad_backend #1 ── HBM 1, DDR port 1
nomad_backend:
   OS ──► nomad_be_interface ──alloc──► nomad_pcshr_file ◄──► nomad_page_copy_buffer
                │ held cmd                 │  ▲     │ off_*  ──────────────► off-package memory
                ▼                          ▼  │     │ eng_* ─┐
   LLC ──► nomad_comparator ◄── PCSHR state ─┘      │        ├─ nomad_dram_arbiter ─► on-package DRAM
            │ data hit ─────────────────────────────┼────────┘
            │ buffer hit / data miss (sub-entry) ───┘
```

## The PCSHR and its life cycle

A PCSHR tracks one page copy. Its fields are:

| field | meaning in this RTL |
|---|---|
| V | entry in use |
| T | cache-fill (off-package → DRAM cache) or write-back (DRAM cache → off-package) |
| PFN, CFN | the physical frame and the cache frame |
| P (+PB) | index of the page copy buffer assigned to the entry; PB says whether one is assigned yet |
| PI | priority index: the block that the faulting access asked for |
| R[64] | per block: the read from the source memory has been issued |
| B[64] | per block: the data is in the page copy buffer |
| W[64] | per block: the write to the destination has been issued |
| sub-entries | V, SI (block index) and the waiting LLC request (id, read/write, write data) |

A page copy goes through these steps:

1. **Allocation.** The OS polls the interface state S. S is *busy* while the
   interface register still holds a command, or while no PCSHR is free. When S
   is idle, the OS writes the command. In the next cycle the command moves to a
   free PCSHR. The move waits if another PCSHR is still working on the same CFN
   or the same PFN (see *Ordering* below).
2. **Buffer assignment.** A waiting PCSHR gets one of the `N_PCB` page copy
   buffers, chosen round-robin. There may be fewer buffers than PCSHRs. An
   entry without a buffer waits.
3. **Block reads.** Reads go to the source memory one block per cycle. They
   start at PI and wrap round the page. A block that a sub-entry is waiting for
   jumps the queue. Each returning block is written into the buffer, and its B
   bit is set.
4. **Block writes.** A block with B set and W clear is written to the
   destination, again starting from PI. W is set when the memory accepts the
   write.
5. **Completion.** When all 64 W bits are set and no sub-entry is left, the
   PCSHR and its buffer are freed.

Each memory port carries one block per cycle. On each port, reads and writes
alternate when both are waiting. Fills read off-package memory and write the
DRAM cache. Write-backs do the reverse. Different PCSHRs take turns
round-robin.

## How an access to the DRAM cache is answered

After the OS updates the PTE, the thread may touch the new frame before the
copy has finished. The comparator checks every access against the CFN of
every valid cache-fill PCSHR:

| case | handling |
|---|---|
| no match, or the block's W bit is set | **data hit**: sent to on-package DRAM |
| match, B set, W clear | **hit in the page copy buffer**: the read is answered from the buffer, or the write goes into the buffer |
| match, B clear | **data miss**: the request is queued in a sub-entry of that PCSHR and replayed from the buffer once the block arrives |
| CFN of a fill command still in the interface register | **held**: not accepted until a PCSHR tracks the command |

Write-back PCSHRs are never matched. The OS evicts only frames that are out of
every TLB and have been flushed from the SRAM caches, so no access can reach
them.

Read data returns on `dc_rsp`, tagged with the request id, and may come back
out of order. Writes are posted and get no response.

## Ordering: what keeps the data right

A non-blocking copy opens several races. The RTL closes them with these rules:

* **A block must not be overwritten after it has been copied out.** A fill
  block is not written to DRAM while a write to it is queued in a sub-entry.
  In a cycle in which the LLC writes into the buffer, no fill block leaves the
  buffer. W is set when DRAM accepts the copy-out write. Every later access to
  that block goes to DRAM behind it, and the DRAM port is assumed to be in
  order.
* **A read and a write to the same missing block are never both queued.** The
  later one waits (`dc_req_ready` low). Reads of the same block may pile up.
  New buffer hits wait while any replay is pending, so they cannot overtake an
  older queued access.
* **A frame is reused only after its write-back is done.** The eviction
  routine frees a frame right after it hands off the write-back. So a refill
  of that frame may arrive while the old page is still being read out. The PCSHR
  file refuses a command while another PCSHR uses the same CFN or the same
  PFN. This also covers refetching a page whose write-back is still in flight.
* **Across back-ends.** A page written back through one back-end may be
  refilled into a frame owned by another. `nomad_top` reports `os_busy` for
  such a command until no other back-end holds or copies that PFN. It finds
  this out through each back-end's `pfn_query` port.

## Files

| file | contents |
|---|---|
| `rtl/nomad_pkg.sv` | sizes, PTE layout (`pte_t`), command, LLC and memory-port structs |
| `rtl/nomad_top.sv` | `NUM_BE` back-ends, steering by CFN mod `NUM_BE`, cross-back-end page check |
| `rtl/nomad_backend.sv` | one back-end: the access path, response register, buffer-port priorities |
| `rtl/nomad_be_interface.sv` | OS command register and busy state S |
| `rtl/nomad_comparator.sv` | classification of an access against the PCSHRs |
| `rtl/nomad_pcshr_file.sv` | PCSHRs, sub-entries, buffer assignment, copy engine |
| `rtl/nomad_page_copy_buffer.sv` | `N_PCB` × 4 KB buffers, 2 write and 3 read ports |
| `rtl/nomad_dram_arbiter.sv` | round-robin sharing of the on-package DRAM port |
| `tb/nomad_mem_model.sv`, `tb/nomad_shared_mem.sv` | behavioural memories (latency, random back-pressure) |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Parameters and sizes

| name | default | where it comes from |
|---|---|---|
| `NUM_BE` | 2 | back-ends, one per HBM stack; two are drawn in the design's system diagram |
| `N_PCSHR` | 8 | 8 PCSHRs were found to give near-maximum performance |
| `N_PCB` | 8 | one 4 KB page copy buffer per PCSHR in the main configuration; can be set lower |
| `N_SUB` | 8 | sub-entries per PCSHR (this design's choice) |
| page | 4 KB | design |
| block | 64 B, 64 per page, 512-bit data | this design's choice |
| PFN | 40 bits | PTE bits 51:12 |
| CFN | 18 bits | a 1 GB DRAM cache of 4 KB frames |

The PTE layout in `nomad_pkg::pte_t` is: EX (bit 63), unused (62:52),
PFN/CFN (51:12), C = cached (11), NC = non-cacheable (10), DC = dirty in cache
(9) and flags (8:0). The back-end never reads a PTE. The type is there for
front-end software and for the testbench's OS model. The cache page
descriptor holds V, DC, the PFN (for reverse mapping) and a TLB directory.
That descriptor is OS data and appears only in the testbench.

The evaluated (PCSHRs, buffers) pairs (8, 8), (16, 8), (32, 8) and (32, 32)
are all reachable through `N_PCSHR` and `N_PCB`.

## Interfaces and timing

* **OS command:** `os_cmd_valid`, `os_cmd` = {T, PFN, CFN, Offset}, and
  `os_busy`. Write only when `os_busy` is low; an assertion flags a write
  while busy. An idle back-end takes one command every two cycles.
* **LLC:** `dc_req_valid`/`dc_req_ready`, `dc_req` = {we, CFN, block, id,
  wdata}. `dc_rsp_valid`/`dc_rsp` is a one-cycle pulse per back-end, and the
  LLC must always accept it. A buffer hit or a replay answers one cycle after
  it is accepted. A DRAM hit answers one cycle after the DRAM responds.
* **Memories:** each back-end has `on_*` and `off_*` ports. Requests use
  valid/ready and `mem_req_t` = {we, block address, tag, wdata}. Read
  responses come back as `mem_rsp_t` with the request's tag, and cannot be
  back-pressured. Writes get no response. The on-package address is
  {CFN, block}. The off-package address is {PFN, block}. Each memory must
  keep the order of the requests it accepts to one block: a read accepted
  after a write returns that write's data.
* **Reset:** asynchronous, active low (`rst_n`). The buffer array is not
  reset.

## Verification

Each testbench is self-checking. Each ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_nomad_top`: the whole distributed back-end at default parameters, with
  a model of the OS routines and a small TLB. A core touches 40 virtual pages
  through 24 cache frames: 6000 accesses in about 96 k cycles, which takes
  under a second. It checks every read against a shadow copy. At the end it
  evicts everything and compares all of off-package memory. It counts, and
  requires, all of these: fills on both back-ends, dirty write-backs, clean
  evictions, eviction skips of TLB-resident frames, head skips, eviction
  flags, busy waits, data hits, buffer hits, data misses, replays, held
  accesses, sub-entry ordering stalls, and same-frame and cross-back-end
  command waits.
* `tb_nomad_pcshr_sweep`: a burst of 96 tag misses, each followed by a read
  of the faulting block. It runs on four copies of the top with (PCSHRs,
  buffers) = (8, 8), (16, 8), (32, 8) and (32, 32). It checks the data and
  that 32 PCSHRs cut the OS's wait per miss compared with 8. With the memory
  models used (off-package port ready half the time), the average waits are
  about 53, 42, 20 and 41 cycles. With 32 buffers, 32 pages share the
  off-package bandwidth at once, so each PCSHR is held longer than with 8
  buffers.
* `tb_nomad_backend`: one back-end with 4 PCSHRs, 2 buffers and 2
  sub-entries, under random fills, write-backs and LLC traffic. This is
  where buffer shortage and full sub-entries are exercised.
* `tb_nomad_pcshr_file`: checks that fills and write-backs copy whole pages,
  that the Offset block is read first, that a demanded block jumps the queue,
  that an entry waits for a buffer, and that replay works.
* `tb_nomad_comparator`, `tb_nomad_be_interface`, `tb_nomad_dram_arbiter`,
  `tb_nomad_page_copy_buffer`: check each unit against a reference written
  from its rules.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/nomad_pkg.sv tb/tb_nomad_top.sv \
          --top-module tb_nomad_top -Mdir obj_top && obj_top/Vtb_nomad_top
```

## Where this RTL goes beyond, or departs from, the published design

The design description gives the structure, the PCSHR and interface field
names, the busy rule, the comparator's role, the sizes above and the OS
algorithms. It does not give the following, which are this RTL's own choices:

* The meaning of the PCSHR fields P, PI, R, B and W (see the table above), and
  the added PB bit.
* The block size of 64 B, the sub-entry count and contents, and the copy
  order (critical block first, demanded blocks next).
* All handshakes, the response tagging, posted writes and the round-robin
  arbitration.
* The ordering rules in *Ordering* above, including the cross-back-end check
  and the mapping of frames to back-ends by CFN mod `NUM_BE`.
* The comparator ignores write-back PCSHRs.

Not built: the OS routines, the page descriptors, the TLB and the CPU caches
(software, or parts of the host CPU). The HBM and DDR devices are also not
built; behavioural models stand in for them in `tb/`. The superpage support
and shared-page caching that the design mentions are OS-side features with no
described hardware. They are not modelled.

Performance has not been measured against the published figures. The
testbenches check function and that each mechanism occurs, not IPC or
latency.
