// nomad_backend: one NOMAD back-end, serving one on-package DRAM stack.
//
// The OS front end keeps the DRAM-cache tags in the page tables: once a TLB
// translation points at a cache frame, the access is a tag hit and comes here
// as a DRAM-cache access. On a tag miss the OS picks a frame, writes a
// cache-fill command into this back-end's interface and lets the thread run
// on; the back-end copies the page in the background. This module ties
// together the interface, the PCSHR file (with the page copy buffers), the
// comparator and the DRAM arbiter, and steers each DRAM-cache access:
//   data hit          -> on-package DRAM (through the arbiter)
//   hit in the buffer -> read or write the page copy buffer
//   data miss         -> sub-entry of the matching PCSHR, replayed later
//   frame still in the interface register -> held (not ready)
// Read data returns on dc_rsp, from DRAM, the buffer or a replay; writes are
// posted and get no response.
//
// Interface: os_cmd_valid/os_cmd/os_busy is the OS register. pfn_query and
// pfn_query_hit let the other back-ends ask whether a page copy of a
// physical page is held or in flight here. dc_req_* is a
// valid/ready LLC request port; dc_rsp_valid/dc_rsp a one-cycle response
// pulse that the LLC always takes. on_* and off_* are block-wide memory ports
// (valid/ready requests, responses returned by tag, no back-pressure).
// Timing: a buffer hit or a replay answers one cycle after it is accepted;
// a DRAM hit answers one cycle after the DRAM response arrives. Order of use
// of the single buffer read/write port: DRAM read responses first, then
// replays, then new buffer hits.
// From the design description: the parts and their roles. Own choices: the
// port protocol, the priorities, and posted writes.
module nomad_backend
  import nomad_pkg::*;
#(
  parameter int unsigned N_PCSHR = 8,
  parameter int unsigned N_PCB   = 8,
  parameter int unsigned N_SUB   = 8
) (
  input  logic     clk,
  input  logic     rst_n,
  // OS front end
  input  logic     os_cmd_valid,
  input  os_cmd_t  os_cmd,
  output logic     os_busy,
  // physical-page lookup for the other back-ends
  input  logic [PFN_W-1:0] pfn_query,
  output logic     pfn_query_hit,
  // DRAM-cache accesses from the LLC
  input  logic     dc_req_valid,
  output logic     dc_req_ready,
  input  dc_req_t  dc_req,
  output logic     dc_rsp_valid,
  output dc_rsp_t  dc_rsp,
  // on-package DRAM
  output logic     on_req_valid,
  input  logic     on_req_ready,
  output mem_req_t on_req,
  input  logic     on_rsp_valid,
  input  mem_rsp_t on_rsp,
  // off-package memory
  output logic     off_req_valid,
  input  logic     off_req_ready,
  output mem_req_t off_req,
  input  logic     off_rsp_valid,
  input  mem_rsp_t off_rsp
);

  localparam int unsigned IDX_W = (N_PCSHR > 1) ? $clog2(N_PCSHR) : 1;
  localparam int unsigned PB_W  = (N_PCB > 1) ? $clog2(N_PCB) : 1;

  // ---------------------------------------------------------------- interface
  logic    free_avail, alloc_valid, alloc_ready, held_valid;
  os_cmd_t alloc_cmd, held_cmd;

  nomad_be_interface u_if (
    .clk, .rst_n,
    .cmd_valid  (os_cmd_valid),
    .cmd        (os_cmd),
    .free_avail (free_avail),
    .busy       (os_busy),
    .alloc_valid(alloc_valid),
    .alloc_ready(alloc_ready),
    .alloc_cmd  (alloc_cmd),
    .held_valid (held_valid),
    .held_cmd   (held_cmd)
  );

  // ---------------------------------------------------------------- PCSHRs
  logic [N_PCSHR-1:0] pc_valid, pc_fill;
  logic [CFN_W-1:0]   pc_cfn [N_PCSHR];
  logic [PFN_W-1:0]   pc_pfn [N_PCSHR];
  logic [BLOCKS-1:0]  pc_b   [N_PCSHR];
  logic [BLOCKS-1:0]  pc_w   [N_PCSHR];
  logic [PB_W-1:0]    pc_p   [N_PCSHR];

  logic             sub_ins_valid, sub_ins_ready;
  logic [IDX_W-1:0] match_idx;
  logic             rp_valid, rp_ready;
  dc_req_t          rp_req;
  logic [PB_W-1:0]  rp_buf;
  logic             eng_req_valid, eng_req_ready, eng_rsp_valid;
  mem_req_t         eng_req;
  logic [PB_W-1:0]  llc_r_buf, llc_w_buf;
  logic [BLK_W-1:0] llc_r_blk, llc_w_blk;
  logic [DATA_W-1:0] llc_r_data, llc_w_data;
  logic             llc_w_en;

  nomad_pcshr_file #(.N_PCSHR(N_PCSHR), .N_PCB(N_PCB), .N_SUB(N_SUB)) u_pcshr (
    .clk, .rst_n,
    .alloc_valid, .alloc_ready, .alloc_cmd, .free_avail,
    .pc_valid, .pc_fill, .pc_cfn, .pc_pfn, .pc_b, .pc_w, .pc_p,
    .sub_ins_valid, .sub_ins_ready,
    .sub_ins_idx (match_idx),
    .sub_ins_req (dc_req),
    .rp_valid, .rp_ready, .rp_req, .rp_buf,
    .off_req_valid, .off_req_ready, .off_req, .off_rsp_valid, .off_rsp,
    .eng_req_valid, .eng_req_ready, .eng_req,
    .eng_rsp_valid,
    .eng_rsp     (on_rsp),
    .llc_r_buf, .llc_r_blk, .llc_r_data,
    .llc_w_en, .llc_w_buf, .llc_w_blk, .llc_w_data
  );

  // ---------------------------------------------------------------- physical-page lookup
  // Tells the other back-ends that a page copy of this physical page is held
  // or in flight here.
  always_comb begin
    pfn_query_hit = held_valid && held_cmd.pfn == pfn_query;
    for (int i = 0; i < N_PCSHR; i++)
      if (pc_valid[i] && pc_pfn[i] == pfn_query) pfn_query_hit = 1'b1;
  end

  // ---------------------------------------------------------------- comparator
  logic match, data_hit, buf_hit, data_miss, hold_pending;

  nomad_comparator #(.N_PCSHR(N_PCSHR)) u_cmp (
    .acc_cfn (dc_req.cfn),
    .acc_blk (dc_req.blk),
    .pc_valid, .pc_fill, .pc_cfn, .pc_b, .pc_w,
    .held_valid, .held_cmd,
    .match, .match_idx, .data_hit, .buf_hit, .data_miss, .hold_pending
  );

  // ---------------------------------------------------------------- on-package responses
  logic dram_llc_rsp;   // a DRAM read answer for the LLC this cycle
  assign eng_rsp_valid = on_rsp_valid &&  on_rsp.tag[TAG_ENGINE_BIT];
  assign dram_llc_rsp  = on_rsp_valid && !on_rsp.tag[TAG_ENGINE_BIT];

  // ---------------------------------------------------------------- DRAM arbiter
  logic     hit_valid, hit_ready;
  mem_req_t hit_req;

  always_comb begin
    hit_req       = '0;
    hit_req.we    = dc_req.we;
    hit_req.addr  = OFF_ADDR_W'({dc_req.cfn, dc_req.blk});
    hit_req.tag   = TAG_W'(dc_req.id);
    hit_req.wdata = dc_req.wdata;
  end
  assign hit_valid = dc_req_valid && data_hit;

  nomad_dram_arbiter u_arb (
    .clk, .rst_n,
    .a_valid (hit_valid),     .a_ready (hit_ready),     .a_req (hit_req),
    .b_valid (eng_req_valid), .b_ready (eng_req_ready), .b_req (eng_req),
    .m_valid (on_req_valid),  .m_ready (on_req_ready),  .m_req (on_req)
  );

  // ---------------------------------------------------------------- buffer hits and replays
  logic bh_rd_ok, bh_wr_ok, bh_fire, rp_fire;

  // A replay needs the buffer port it uses: a read needs the response slot,
  // a write needs the buffer write port (taken by write-back data first).
  assign rp_ready = rp_req.we ? !eng_rsp_valid : !dram_llc_rsp;
  assign rp_fire  = rp_valid && rp_ready;

  // New buffer hits wait while any replay is pending, so that they never
  // overtake an older access to the same block.
  assign bh_rd_ok = !rp_valid && !dram_llc_rsp;
  assign bh_wr_ok = !rp_valid && !eng_rsp_valid;
  assign bh_fire  = dc_req_valid && buf_hit && (dc_req.we ? bh_wr_ok : bh_rd_ok);

  assign sub_ins_valid = dc_req_valid && data_miss;

  always_comb begin
    if (hold_pending)   dc_req_ready = 1'b0;
    else if (data_hit)  dc_req_ready = hit_ready;
    else if (buf_hit)   dc_req_ready = dc_req.we ? bh_wr_ok : bh_rd_ok;
    else                dc_req_ready = sub_ins_ready;
  end

  assign llc_r_buf  = rp_valid ? rp_buf     : pc_p[match_idx];
  assign llc_r_blk  = rp_valid ? rp_req.blk : dc_req.blk;
  assign llc_w_en   = (rp_fire && rp_req.we) || (bh_fire && dc_req.we);
  assign llc_w_buf  = rp_valid ? rp_buf       : pc_p[match_idx];
  assign llc_w_blk  = rp_valid ? rp_req.blk   : dc_req.blk;
  assign llc_w_data = rp_valid ? rp_req.wdata : dc_req.wdata;

  // ---------------------------------------------------------------- LLC response register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dc_rsp_valid <= 1'b0;
      dc_rsp       <= '0;
    end else begin
      dc_rsp_valid <= 1'b0;
      if (dram_llc_rsp) begin
        dc_rsp_valid <= 1'b1;
        dc_rsp.id    <= on_rsp.tag[ID_W-1:0];
        dc_rsp.rdata <= on_rsp.rdata;
      end else if (rp_fire && !rp_req.we) begin
        dc_rsp_valid <= 1'b1;
        dc_rsp.id    <= rp_req.id;
        dc_rsp.rdata <= llc_r_data;
      end else if (bh_fire && !dc_req.we) begin
        dc_rsp_valid <= 1'b1;
        dc_rsp.id    <= dc_req.id;
        dc_rsp.rdata <= llc_r_data;
      end
    end
  end

endmodule
