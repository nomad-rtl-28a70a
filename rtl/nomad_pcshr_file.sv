// nomad_pcshr_file: page copy status holding registers (PCSHRs) and the
// page-copy engine of a NOMAD back-end.
//
// A PCSHR tracks one page copy handed over by the OS: a cache-fill (from
// off-package memory into the DRAM cache) or a write-back (out of the DRAM
// cache into off-package memory). Its fields are
//   V   valid            T   type (fill or write-back)
//   PFN physical frame   CFN cache frame
//   P   page copy buffer index, PB says whether a buffer is assigned yet
//   PI  priority index: the block the faulting access asked for
//   R   per block: read from the source issued
//   B   per block: data is in the page copy buffer
//   W   per block: write to the destination issued
// and N_SUB sub-entries (V, SI = block index, and the waiting LLC request).
// The page moves block by block: the source read of each block starts at PI
// and wraps round the page, except that a block a sub-entry is waiting for
// is read first. A block that is in the buffer is written to its destination
// starting from PI as well. Accesses that miss on a block not yet in the
// buffer wait in a sub-entry and are replayed from the buffer once it
// arrives. When every block is written and no sub-entry is left, the PCSHR
// and its buffer are freed.
// Page copy buffers (N_PCB of them) are handed out round-robin to PCSHRs
// that wait for one, so there can be more PCSHRs than buffers.
//
// Ports: alloc_* takes a command from the interface (ready only when a PCSHR
// is free and no PCSHR works on the same cache frame or the same physical
// frame: a refill waits for the write-back of its frame, and a fill of a page
// waits for a write-back of that same page). pc_* export the state
// the comparator needs. sub_ins_* queue a data miss. rp_* offer one sub-entry
// per cycle whose block is in the buffer. off_* is the off-package memory
// port (fill reads, write-back writes); eng_* is the copy engine's share of
// the on-package DRAM (write-back reads, fill writes). llc_* is the buffer
// port the back-end uses for buffer hits and replays.
// Timing: each memory port carries at most one block per cycle; state
// updates land at the next clock edge. Memory responses carry the PCSHR index
// and block in their tag and cannot be stalled.
// From the design description: the PCSHR fields V T PFN CFN P PI R B W, the
// sub-entries (V, SI), page-granular tracking with block-level requests, the
// page copy buffers and their count kept apart from the PCSHR count. Own
// choices: the meaning given to P, PI, R, B and W above, the scheduling
// order, the round-robin picks, the sub-entry count and their replay rules.
module nomad_pcshr_file
  import nomad_pkg::*;
#(
  parameter int unsigned N_PCSHR = 8,
  parameter int unsigned N_PCB   = 8,
  parameter int unsigned N_SUB   = 8,
  localparam int unsigned IDX_W  = (N_PCSHR > 1) ? $clog2(N_PCSHR) : 1,
  localparam int unsigned PB_W   = (N_PCB > 1) ? $clog2(N_PCB) : 1,
  localparam int unsigned SUB_W  = (N_SUB > 1) ? $clog2(N_SUB) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // allocation from the interface
  input  logic               alloc_valid,
  output logic               alloc_ready,
  input  os_cmd_t            alloc_cmd,
  output logic               free_avail,
  // state seen by the comparator
  output logic [N_PCSHR-1:0] pc_valid,
  output logic [N_PCSHR-1:0] pc_fill,
  output logic [CFN_W-1:0]   pc_cfn [N_PCSHR],
  output logic [PFN_W-1:0]   pc_pfn [N_PCSHR],
  output logic [BLOCKS-1:0]  pc_b   [N_PCSHR],
  output logic [BLOCKS-1:0]  pc_w   [N_PCSHR],
  output logic [PB_W-1:0]    pc_p   [N_PCSHR],
  // data miss: queue in a sub-entry
  input  logic               sub_ins_valid,
  output logic               sub_ins_ready,
  input  logic [IDX_W-1:0]   sub_ins_idx,
  input  dc_req_t            sub_ins_req,
  // replay of a sub-entry whose block has arrived
  output logic               rp_valid,
  input  logic               rp_ready,
  output dc_req_t            rp_req,
  output logic [PB_W-1:0]    rp_buf,
  // off-package memory
  output logic               off_req_valid,
  input  logic               off_req_ready,
  output mem_req_t           off_req,
  input  logic               off_rsp_valid,
  input  mem_rsp_t           off_rsp,
  // copy engine share of on-package DRAM
  output logic               eng_req_valid,
  input  logic               eng_req_ready,
  output mem_req_t           eng_req,
  input  logic               eng_rsp_valid,
  input  mem_rsp_t           eng_rsp,
  // page copy buffer port of the back-end (buffer hits and replays)
  input  logic [PB_W-1:0]    llc_r_buf,
  input  logic [BLK_W-1:0]   llc_r_blk,
  output logic [DATA_W-1:0]  llc_r_data,
  input  logic               llc_w_en,
  input  logic [PB_W-1:0]    llc_w_buf,
  input  logic [BLK_W-1:0]   llc_w_blk,
  input  logic [DATA_W-1:0]  llc_w_data
);

  // ---------------------------------------------------------------- state
  logic [N_PCSHR-1:0] v_q, pb_q;
  cmd_type_e          t_q   [N_PCSHR];
  logic [PFN_W-1:0]   pfn_q [N_PCSHR];
  logic [CFN_W-1:0]   cfn_q [N_PCSHR];
  logic [PB_W-1:0]    p_q   [N_PCSHR];
  logic [BLK_W-1:0]   pi_q  [N_PCSHR];
  logic [BLOCKS-1:0]  r_q   [N_PCSHR];
  logic [BLOCKS-1:0]  b_q   [N_PCSHR];
  logic [BLOCKS-1:0]  w_q   [N_PCSHR];
  logic [N_SUB-1:0]   sv_q  [N_PCSHR];
  logic [BLK_W-1:0]   si_q  [N_PCSHR][N_SUB];
  dc_req_t            sreq_q[N_PCSHR][N_SUB];
  logic [N_PCB-1:0]   pcb_used_q;
  logic [IDX_W-1:0]   rr_assign_q, rr_off_q, rr_eng_q;
  logic               off_pref_wr_q, eng_pref_wr_q;

  // ---------------------------------------------------------------- helpers
  // First set bit of mask at or after ptr, wrapping.
  function automatic logic [IDX_W:0] rr_pick(input logic [N_PCSHR-1:0] mask,
                                             input logic [IDX_W-1:0]   ptr);
    logic [IDX_W:0] res;
    int unsigned j;
    res = '0;
    for (int unsigned k = 0; k < N_PCSHR; k++) begin
      j = (32'(ptr) + k) % N_PCSHR;
      if (!res[IDX_W] && mask[j]) res = {1'b1, IDX_W'(j)};
    end
    return res;
  endfunction

  // First set bit of a block vector at or after start, wrapping.
  function automatic logic [BLK_W:0] blk_pick(input logic [BLOCKS-1:0] mask,
                                              input logic [BLK_W-1:0]  start);
    logic [BLK_W:0]   res;
    logic [BLK_W-1:0] j;
    res = '0;
    for (int unsigned k = 0; k < BLOCKS; k++) begin
      j = start + BLK_W'(k);
      if (!res[BLK_W] && mask[j]) res = {1'b1, j};
    end
    return res;
  endfunction

  function automatic logic [TAG_W-1:0] eng_tag(input logic [IDX_W-1:0] i,
                                               input logic [BLK_W-1:0] k);
    logic [TAG_W-1:0] tg;
    tg = '0;
    tg[TAG_ENGINE_BIT] = 1'b1;
    tg[BLK_W +: IDX_W] = i;
    tg[0 +: BLK_W]     = k;
    return tg;
  endfunction

  // ---------------------------------------------------------------- exports
  always_comb begin
    for (int i = 0; i < N_PCSHR; i++) begin
      pc_valid[i] = v_q[i];
      pc_fill[i]  = (t_q[i] == CMD_FILL);
      pc_cfn[i]   = cfn_q[i];
      pc_pfn[i]   = pfn_q[i];
      pc_b[i]     = b_q[i];
      pc_w[i]     = w_q[i];
      pc_p[i]     = p_q[i];
    end
  end

  // ---------------------------------------------------------------- allocation
  logic             alloc_conflict;
  logic [IDX_W-1:0] alloc_idx;
  logic             alloc_fire;

  always_comb begin
    alloc_conflict = 1'b0;
    alloc_idx      = '0;
    free_avail     = 1'b0;
    for (int i = N_PCSHR - 1; i >= 0; i--) begin
      if (!v_q[i]) begin
        free_avail = 1'b1;
        alloc_idx  = IDX_W'(i);
      end
      if (v_q[i] && (cfn_q[i] == alloc_cmd.cfn || pfn_q[i] == alloc_cmd.pfn))
        alloc_conflict = 1'b1;
    end
  end
  assign alloc_ready = free_avail && !alloc_conflict;
  assign alloc_fire  = alloc_valid && alloc_ready;

  // ---------------------------------------------------------------- buffer assignment
  logic [IDX_W:0]   assign_pick;
  logic             buf_free;
  logic [PB_W-1:0]  buf_idx;
  logic             assign_fire;

  always_comb begin
    buf_free = 1'b0;
    buf_idx  = '0;
    for (int j = N_PCB - 1; j >= 0; j--) begin
      if (!pcb_used_q[j]) begin
        buf_free = 1'b1;
        buf_idx  = PB_W'(j);
      end
    end
  end
  assign assign_pick = rr_pick(v_q & ~pb_q, rr_assign_q);
  assign assign_fire = assign_pick[IDX_W] && buf_free;

  // ---------------------------------------------------------------- per-PCSHR block candidates
  logic [BLOCKS-1:0]  demand_blk [N_PCSHR];   // blocks a sub-entry waits for
  logic [BLOCKS-1:0]  wpend_blk  [N_PCSHR];   // blocks with a queued write
  logic [BLOCKS-1:0]  wr_ok      [N_PCSHR];   // blocks ready to go to the destination
  logic [N_PCSHR-1:0] can_read, can_write, is_fill;

  always_comb begin
    for (int i = 0; i < N_PCSHR; i++) begin
      demand_blk[i] = '0;
      wpend_blk[i]  = '0;
      for (int s = 0; s < N_SUB; s++) begin
        if (sv_q[i][s]) begin
          demand_blk[i][si_q[i][s]] = 1'b1;
          if (sreq_q[i][s].we) wpend_blk[i][si_q[i][s]] = 1'b1;
        end
      end
      wr_ok[i]     = b_q[i] & ~w_q[i] & ~wpend_blk[i];
      is_fill[i]   = (t_q[i] == CMD_FILL);
      can_read[i]  = v_q[i] && pb_q[i] && (~r_q[i] != '0);
      can_write[i] = v_q[i] && pb_q[i] && (wr_ok[i] != '0);
    end
  end

  // Block to read next: a demanded block not yet read, else the first unread
  // block from PI on.
  function automatic logic [BLK_W-1:0] read_blk(input logic [IDX_W-1:0] i);
    logic [BLK_W:0] d, n;
    d = blk_pick(demand_blk[i] & ~r_q[i], pi_q[i]);
    n = blk_pick(~r_q[i], pi_q[i]);
    return d[BLK_W] ? d[BLK_W-1:0] : n[BLK_W-1:0];
  endfunction

  function automatic logic [BLK_W-1:0] write_blk(input logic [IDX_W-1:0] i);
    logic [BLK_W:0] n;
    n = blk_pick(wr_ok[i], pi_q[i]);
    return n[BLK_W-1:0];
  endfunction

  // ---------------------------------------------------------------- off-package port
  // Candidates: fill reads and write-back writes.
  logic [IDX_W:0]   off_rd_pick, off_wr_pick;
  logic             off_is_wr;
  logic [IDX_W-1:0] off_idx;
  logic [BLK_W-1:0] off_blk;
  logic [PB_W-1:0]  r2_buf;
  logic [DATA_W-1:0] r2_data;

  assign off_rd_pick = rr_pick(can_read & is_fill, rr_off_q);
  assign off_wr_pick = rr_pick(can_write & ~is_fill, rr_off_q);
  assign off_is_wr   = off_wr_pick[IDX_W] && (!off_rd_pick[IDX_W] || off_pref_wr_q);
  assign off_idx     = off_is_wr ? off_wr_pick[IDX_W-1:0] : off_rd_pick[IDX_W-1:0];
  assign off_blk     = off_is_wr ? write_blk(off_idx) : read_blk(off_idx);
  assign r2_buf      = p_q[off_idx];

  assign off_req_valid = off_rd_pick[IDX_W] || off_wr_pick[IDX_W];
  always_comb begin
    off_req       = '0;
    off_req.we    = off_is_wr;
    off_req.addr  = {pfn_q[off_idx], off_blk};
    off_req.tag   = eng_tag(off_idx, off_blk);
    off_req.wdata = off_is_wr ? r2_data : '0;
  end
  logic off_fire;
  assign off_fire = off_req_valid && off_req_ready;

  // ---------------------------------------------------------------- on-package (engine) port
  // Candidates: write-back reads and fill writes. A fill write is held back
  // in a cycle the back-end writes the buffer from the LLC, so that a block
  // never leaves the buffer in the cycle it is being overwritten.
  logic [IDX_W:0]   eng_rd_pick, eng_wr_pick;
  logic             eng_is_wr;
  logic [IDX_W-1:0] eng_idx;
  logic [BLK_W-1:0] eng_blk;
  logic [PB_W-1:0]  r0_buf;
  logic [DATA_W-1:0] r0_data;

  assign eng_rd_pick = rr_pick(can_read & ~is_fill, rr_eng_q);
  assign eng_wr_pick = llc_w_en ? '0 : rr_pick(can_write & is_fill, rr_eng_q);
  assign eng_is_wr   = eng_wr_pick[IDX_W] && (!eng_rd_pick[IDX_W] || eng_pref_wr_q);
  assign eng_idx     = eng_is_wr ? eng_wr_pick[IDX_W-1:0] : eng_rd_pick[IDX_W-1:0];
  assign eng_blk     = eng_is_wr ? write_blk(eng_idx) : read_blk(eng_idx);
  assign r0_buf      = p_q[eng_idx];

  assign eng_req_valid = eng_rd_pick[IDX_W] || eng_wr_pick[IDX_W];
  always_comb begin
    eng_req       = '0;
    eng_req.we    = eng_is_wr;
    eng_req.addr  = OFF_ADDR_W'({cfn_q[eng_idx], eng_blk});
    eng_req.tag   = eng_tag(eng_idx, eng_blk);
    eng_req.wdata = eng_is_wr ? r0_data : '0;
  end
  logic eng_fire;
  assign eng_fire = eng_req_valid && eng_req_ready;

  // ---------------------------------------------------------------- responses
  logic [IDX_W-1:0] offr_idx, engr_idx;
  logic [BLK_W-1:0] offr_blk, engr_blk;
  assign offr_idx = off_rsp.tag[BLK_W +: IDX_W];
  assign offr_blk = off_rsp.tag[0 +: BLK_W];
  assign engr_idx = eng_rsp.tag[BLK_W +: IDX_W];
  assign engr_blk = eng_rsp.tag[0 +: BLK_W];

  // ---------------------------------------------------------------- page copy buffers
  nomad_page_copy_buffer #(.N_PCB(N_PCB)) u_pcb (
    .clk     (clk),
    .w0_en   (off_rsp_valid),
    .w0_buf  (p_q[offr_idx]),
    .w0_blk  (offr_blk),
    .w0_data (off_rsp.rdata),
    .w1_en   (eng_rsp_valid || llc_w_en),
    .w1_buf  (eng_rsp_valid ? p_q[engr_idx] : llc_w_buf),
    .w1_blk  (eng_rsp_valid ? engr_blk : llc_w_blk),
    .w1_data (eng_rsp_valid ? eng_rsp.rdata : llc_w_data),
    .r0_buf  (r0_buf),
    .r0_blk  (eng_blk),
    .r0_data (r0_data),
    .r1_buf  (llc_r_buf),
    .r1_blk  (llc_r_blk),
    .r1_data (llc_r_data),
    .r2_buf  (r2_buf),
    .r2_blk  (off_blk),
    .r2_data (r2_data)
  );

  // ---------------------------------------------------------------- sub-entries
  logic             sub_free, sub_conflict;
  logic [SUB_W-1:0] sub_slot;

  always_comb begin
    sub_free     = 1'b0;
    sub_slot     = '0;
    sub_conflict = 1'b0;
    for (int s = N_SUB - 1; s >= 0; s--) begin
      if (!sv_q[sub_ins_idx][s]) begin
        sub_free = 1'b1;
        sub_slot = SUB_W'(s);
      end else if (si_q[sub_ins_idx][s] == sub_ins_req.blk &&
                   (sreq_q[sub_ins_idx][s].we || sub_ins_req.we)) begin
        sub_conflict = 1'b1;   // keep reads and writes of one block in order
      end
    end
  end
  assign sub_ins_ready = sub_free && !sub_conflict;
  logic sub_fire;
  assign sub_fire = sub_ins_valid && sub_ins_ready;

  // Replay: first sub-entry whose block is in the buffer.
  logic             rp_found;
  logic [IDX_W-1:0] rp_i;
  logic [SUB_W-1:0] rp_s;
  always_comb begin
    rp_found = 1'b0;
    rp_i     = '0;
    rp_s     = '0;
    for (int i = 0; i < N_PCSHR; i++) begin
      for (int s = 0; s < N_SUB; s++) begin
        if (!rp_found && v_q[i] && sv_q[i][s] && b_q[i][si_q[i][s]]) begin
          rp_found = 1'b1;
          rp_i     = IDX_W'(i);
          rp_s     = SUB_W'(s);
        end
      end
    end
  end
  assign rp_valid = rp_found;
  assign rp_req   = sreq_q[rp_i][rp_s];
  assign rp_buf   = p_q[rp_i];
  logic rp_fire;
  assign rp_fire = rp_valid && rp_ready;

  // ---------------------------------------------------------------- completion
  logic [N_PCSHR-1:0] done;
  always_comb begin
    for (int i = 0; i < N_PCSHR; i++)
      done[i] = v_q[i] && pb_q[i] && (&w_q[i]) && (sv_q[i] == '0);
  end

  // ---------------------------------------------------------------- state update
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q           <= '0;
      pb_q          <= '0;
      pcb_used_q    <= '0;
      rr_assign_q   <= '0;
      rr_off_q      <= '0;
      rr_eng_q      <= '0;
      off_pref_wr_q <= 1'b0;
      eng_pref_wr_q <= 1'b0;
      for (int i = 0; i < N_PCSHR; i++) begin
        t_q[i]   <= CMD_FILL;
        pfn_q[i] <= '0;
        cfn_q[i] <= '0;
        p_q[i]   <= '0;
        pi_q[i]  <= '0;
        r_q[i]   <= '0;
        b_q[i]   <= '0;
        w_q[i]   <= '0;
        sv_q[i]  <= '0;
        for (int s = 0; s < N_SUB; s++) begin
          si_q[i][s]   <= '0;
          sreq_q[i][s] <= '0;
        end
      end
    end else begin
      if (alloc_fire) begin
        v_q[alloc_idx]   <= 1'b1;
        pb_q[alloc_idx]  <= 1'b0;
        t_q[alloc_idx]   <= alloc_cmd.t;
        pfn_q[alloc_idx] <= alloc_cmd.pfn;
        cfn_q[alloc_idx] <= alloc_cmd.cfn;
        pi_q[alloc_idx]  <= alloc_cmd.offset;
        r_q[alloc_idx]   <= '0;
        b_q[alloc_idx]   <= '0;
        w_q[alloc_idx]   <= '0;
      end
      if (assign_fire) begin
        pb_q[assign_pick[IDX_W-1:0]] <= 1'b1;
        p_q[assign_pick[IDX_W-1:0]]  <= buf_idx;
        pcb_used_q[buf_idx]          <= 1'b1;
        rr_assign_q <= IDX_W'((32'(assign_pick[IDX_W-1:0]) + 1) % N_PCSHR);
      end
      if (off_fire) begin
        if (off_is_wr) w_q[off_idx][off_blk] <= 1'b1;
        else           r_q[off_idx][off_blk] <= 1'b1;
        off_pref_wr_q <= !off_is_wr;
        rr_off_q      <= IDX_W'((32'(off_idx) + 1) % N_PCSHR);
      end
      if (eng_fire) begin
        if (eng_is_wr) w_q[eng_idx][eng_blk] <= 1'b1;
        else           r_q[eng_idx][eng_blk] <= 1'b1;
        eng_pref_wr_q <= !eng_is_wr;
        rr_eng_q      <= IDX_W'((32'(eng_idx) + 1) % N_PCSHR);
      end
      if (off_rsp_valid) b_q[offr_idx][offr_blk] <= 1'b1;
      if (eng_rsp_valid) b_q[engr_idx][engr_blk] <= 1'b1;
      if (sub_fire) begin
        sv_q[sub_ins_idx][sub_slot]   <= 1'b1;
        si_q[sub_ins_idx][sub_slot]   <= sub_ins_req.blk;
        sreq_q[sub_ins_idx][sub_slot] <= sub_ins_req;
      end
      if (rp_fire) sv_q[rp_i][rp_s] <= 1'b0;
      for (int i = 0; i < N_PCSHR; i++) begin
        if (done[i]) begin
          v_q[i]               <= 1'b0;
          pb_q[i]              <= 1'b0;
          pcb_used_q[p_q[i]]   <= 1'b0;
        end
      end
    end
  end

  // ---------------------------------------------------------------- rules
  a_rsp_to_live_entry: assert property (@(posedge clk) disable iff (!rst_n)
    off_rsp_valid |-> v_q[offr_idx] && pb_q[offr_idx] && r_q[offr_idx][offr_blk])
    else $error("off-package response for a block that was not requested");
  a_sub_on_live_entry: assert property (@(posedge clk) disable iff (!rst_n)
    sub_ins_valid |-> v_q[sub_ins_idx])
    else $error("sub-entry queued on a free PCSHR");

endmodule
