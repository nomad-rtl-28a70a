// nomad_comparator: classifies a DRAM-cache access against the PCSHRs.
//
// Once the OS has pointed a PTE at a cache frame, the thread may touch that
// frame before the back-end has copied the page in. Every access to the DRAM
// cache is therefore compared with the CFN of every valid cache-fill PCSHR.
// No match, or a match on a block already written to the cache (W set), is a
// data hit and goes to on-package DRAM. A match on a block that sits in the
// page copy buffer but is not yet written (B set, W clear) is served by the
// buffer. A match on a block that has not arrived is a data miss and waits in
// a sub-entry of that PCSHR. An access to the frame of a command that is still
// in the interface register is held (hold_pending) until a PCSHR tracks it.
// Write-back PCSHRs are not compared: the OS only evicts frames that are out
// of every TLB and flushed from the SRAM caches, so no access can reach them.
//
// Purely combinational. From the design description: compare with the CFN of
// each PCSHR, data hit to DRAM, data miss to a sub-entry, hit in the page
// copy buffer. Own choices: the use of the B/W vectors as the "metadata" and
// the hold for a command not yet allocated.
module nomad_comparator
  import nomad_pkg::*;
#(
  parameter int unsigned N_PCSHR = 8,
  localparam int unsigned IDX_W  = (N_PCSHR > 1) ? $clog2(N_PCSHR) : 1
) (
  input  logic [CFN_W-1:0]  acc_cfn,
  input  logic [BLK_W-1:0]  acc_blk,
  input  logic [N_PCSHR-1:0] pc_valid,
  input  logic [N_PCSHR-1:0] pc_fill,      // T is cache-fill
  input  logic [CFN_W-1:0]  pc_cfn [N_PCSHR],
  input  logic [BLOCKS-1:0] pc_b   [N_PCSHR],
  input  logic [BLOCKS-1:0] pc_w   [N_PCSHR],
  input  logic              held_valid,
  input  os_cmd_t           held_cmd,
  output logic              match,
  output logic [IDX_W-1:0]  match_idx,
  output logic              data_hit,
  output logic              buf_hit,
  output logic              data_miss,
  output logic              hold_pending
);

  always_comb begin
    match     = 1'b0;
    match_idx = '0;
    for (int i = 0; i < N_PCSHR; i++) begin
      if (!match && pc_valid[i] && pc_fill[i] && pc_cfn[i] == acc_cfn) begin
        match     = 1'b1;
        match_idx = IDX_W'(i);
      end
    end
  end

  assign hold_pending = held_valid && held_cmd.t == CMD_FILL && held_cmd.cfn == acc_cfn;
  assign data_hit  = !hold_pending && (!match || pc_w[match_idx][acc_blk]);
  assign buf_hit   = !hold_pending && match && !pc_w[match_idx][acc_blk] && pc_b[match_idx][acc_blk];
  assign data_miss = !hold_pending && match && !pc_w[match_idx][acc_blk] && !pc_b[match_idx][acc_blk];

endmodule
