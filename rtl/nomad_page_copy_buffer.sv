// nomad_page_copy_buffer: the page copy buffers of a NOMAD back-end.
//
// Each buffer holds one 4 KB page on its way between off-package memory and
// the DRAM cache, as BLOCKS blocks of DATA_W bits. A buffer belongs to one
// PCSHR at a time; the PCSHR's B vector says which of its blocks are valid,
// so the array itself needs no reset.
//
// Interface: two write ports (w0: data returning from off-package memory;
// w1: data returning from on-package DRAM, or a write from the LLC), and three
// read ports (r0: block being written to on-package DRAM, r1: block read for
// the LLC, r2: block being written to off-package memory).
// Timing: writes take effect at the clock edge; reads are combinational.
// w0 and w1 never address the same buffer in one cycle (they serve different
// PCSHRs); if they did, w1 would win.
// From the design description: one 4 KB buffer per page in flight, their
// number m set apart from the PCSHR count n. Own choices: port count, block
// width and asynchronous read.
module nomad_page_copy_buffer
  import nomad_pkg::*;
#(
  parameter int unsigned N_PCB = 8,
  localparam int unsigned PB_W = (N_PCB > 1) ? $clog2(N_PCB) : 1
) (
  input  logic              clk,
  input  logic              w0_en,
  input  logic [PB_W-1:0]   w0_buf,
  input  logic [BLK_W-1:0]  w0_blk,
  input  logic [DATA_W-1:0] w0_data,
  input  logic              w1_en,
  input  logic [PB_W-1:0]   w1_buf,
  input  logic [BLK_W-1:0]  w1_blk,
  input  logic [DATA_W-1:0] w1_data,
  input  logic [PB_W-1:0]   r0_buf,
  input  logic [BLK_W-1:0]  r0_blk,
  output logic [DATA_W-1:0] r0_data,
  input  logic [PB_W-1:0]   r1_buf,
  input  logic [BLK_W-1:0]  r1_blk,
  output logic [DATA_W-1:0] r1_data,
  input  logic [PB_W-1:0]   r2_buf,
  input  logic [BLK_W-1:0]  r2_blk,
  output logic [DATA_W-1:0] r2_data
);

  localparam int unsigned WORDS = N_PCB * BLOCKS;
  localparam int unsigned AW    = $clog2(WORDS);

  logic [DATA_W-1:0] mem [WORDS];

  function automatic logic [AW-1:0] addr(input logic [PB_W-1:0] b, input logic [BLK_W-1:0] k);
    return AW'(b) * AW'(BLOCKS) + AW'(k);
  endfunction

  always_ff @(posedge clk) begin
    if (w0_en) mem[addr(w0_buf, w0_blk)] <= w0_data;
    if (w1_en) mem[addr(w1_buf, w1_blk)] <= w1_data;
  end

  assign r0_data = mem[addr(r0_buf, r0_blk)];
  assign r1_data = mem[addr(r1_buf, r1_blk)];
  assign r2_data = mem[addr(r2_buf, r2_blk)];

endmodule
