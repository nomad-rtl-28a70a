// nomad_pkg: sizes, field layouts and shared types of the NOMAD back-end.
//
// NOMAD splits a DRAM cache into an OS front end, which keeps the tags in the
// page tables and hands out 4 KB cache frames, and a hardware back end, which
// copies pages between off-package memory and the on-package DRAM cache while
// the thread that missed keeps running. This package holds the constants and
// the request/response structs that every back-end module shares.
//
// Taken from the design description: 4 KB pages, the PTE layout (EX at bit 63,
// PFN/CFN in bits 51:12, C/NC/DC in bits 11/10/9, flags in 8:0), a 1 GB cache
// (2^18 frames), 8 PCSHRs and one 4 KB page copy buffer per PCSHR.
// Own choices: 64-byte blocks moved one per beat (512-bit data), 8-bit request
// ids, 16-bit memory tags, and the encodings of the command type.
package nomad_pkg;

  // ---- page and block geometry ----
  localparam int unsigned PAGE_BYTES = 4096;            // 4 KB pages
  localparam int unsigned BLK_BYTES  = 64;              // block copied per beat (own choice)
  localparam int unsigned BLOCKS     = PAGE_BYTES / BLK_BYTES;   // 64 blocks per page
  localparam int unsigned BLK_W      = $clog2(BLOCKS);  // block index width
  localparam int unsigned DATA_W     = BLK_BYTES * 8;   // 512-bit block

  // ---- frame numbers ----
  localparam int unsigned PFN_W = 40;                   // PTE bits 51:12
  localparam int unsigned CFN_W = 18;                   // 1 GB / 4 KB cache frames

  // ---- addresses of a block in each memory ----
  localparam int unsigned OFF_ADDR_W = PFN_W + BLK_W;   // off-package block address
  localparam int unsigned ON_ADDR_W  = CFN_W + BLK_W;   // on-package block address

  // ---- identifiers ----
  localparam int unsigned ID_W  = 8;                    // LLC request id
  localparam int unsigned TAG_W = 16;                   // memory request tag

  // ---- page table entry, 64 bits ----
  typedef struct packed {
    logic             ex;        // bit 63
    logic [10:0]      unused;    // bits 62:52
    logic [PFN_W-1:0] fn;        // bits 51:12, PFN, or CFN when cached
    logic             c;         // bit 11: page is cached
    logic             nc;        // bit 10: page is non-cacheable
    logic             dc;        // bit 9 : dirty in cache
    logic [8:0]       flags;     // bits 8:0
  } pte_t;

  // ---- command from the OS front end to the back-end interface ----
  typedef enum logic {CMD_FILL = 1'b0, CMD_WRITEBACK = 1'b1} cmd_type_e;

  typedef struct packed {
    cmd_type_e        t;         // T: cache-fill or write-back
    logic [PFN_W-1:0] pfn;       // physical (off-package) frame
    logic [CFN_W-1:0] cfn;       // cache (on-package) frame
    logic [BLK_W-1:0] offset;    // block the faulting access wants first
  } os_cmd_t;

  // ---- DRAM cache access from the last-level cache ----
  typedef struct packed {
    logic              we;       // 1: write of a whole block, 0: read
    logic [CFN_W-1:0]  cfn;
    logic [BLK_W-1:0]  blk;
    logic [ID_W-1:0]   id;
    logic [DATA_W-1:0] wdata;
  } dc_req_t;

  typedef struct packed {
    logic [ID_W-1:0]   id;
    logic [DATA_W-1:0] rdata;
  } dc_rsp_t;

  // ---- block-granular memory port (on- and off-package) ----
  typedef struct packed {
    logic                  we;
    logic [OFF_ADDR_W-1:0] addr;   // on-package uses the low ON_ADDR_W bits
    logic [TAG_W-1:0]      tag;
    logic [DATA_W-1:0]     wdata;
  } mem_req_t;

  typedef struct packed {
    logic [TAG_W-1:0]  tag;
    logic [DATA_W-1:0] rdata;
  } mem_rsp_t;

  // Tag bit marking a request of the page-copy engine (else the LLC's).
  localparam int unsigned TAG_ENGINE_BIT = TAG_W - 1;

endpackage
