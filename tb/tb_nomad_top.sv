// tb_nomad_top: end-to-end run of the distributed back-end at its default
// size (two back-ends, 8 PCSHRs, 8 page copy buffers, 8 sub-entries each)
// under a model of the OS front end and of one core.
//
// The core touches random blocks of a set of virtual pages larger than the
// number of cache frames the OS hands out. A small TLB translates; on a TLB
// miss the page table is walked, and on a DRAM-cache tag miss the miss
// handler runs: it takes the frame at the FIFO head (skipping frames still
// valid), sends a cache-fill to the back-end that owns the frame, points the
// PTE at the frame and lets the access proceed at once. When free frames run
// low it raises the eviction flag and the eviction daemon runs: from the FIFO
// tail it skips frames still in the TLB, sends write-backs for dirty frames,
// restores the PTEs and frees the frames. Page tables, page descriptors and
// the TLB live in the testbench, in the PTE layout of nomad_pkg.
//
// Every read must return the value last written to that virtual block (or
// its initial memory value). At the end all frames are evicted and the whole
// of off-package memory is compared with the shadow. Each mechanism must
// occur at least once.
module tb_nomad_top;
  import nomad_pkg::*;
  localparam int unsigned NUM_BE = 2;
  localparam int unsigned VPAGES = 40;      // virtual pages used by the core
  localparam int unsigned NF     = 24;      // cache frames the OS manages
  localparam int unsigned TLB_N  = 4;
  localparam int unsigned THRESH = 6;       // eviction_threshold
  localparam int unsigned VICTIMS = 6;      // n of the eviction routine
  localparam int unsigned NACC   = 6000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic os_cmd_valid = 0, os_busy;
  os_cmd_t os_cmd = '0;
  logic [NUM_BE-1:0] be_busy;
  logic dc_req_valid = 0, dc_req_ready;
  dc_req_t dc_req = '0;
  logic [NUM_BE-1:0] dc_rsp_valid;
  dc_rsp_t dc_rsp [NUM_BE];
  logic [NUM_BE-1:0] on_req_valid, on_req_ready, on_rsp_valid;
  mem_req_t on_req [NUM_BE];
  mem_rsp_t on_rsp [NUM_BE];
  logic [NUM_BE-1:0] off_req_valid, off_req_ready, off_rsp_valid;
  mem_req_t off_req [NUM_BE];
  mem_rsp_t off_rsp [NUM_BE];

  nomad_top dut (.*);

  for (genvar g = 0; g < NUM_BE; g++) begin : g_hbm
    nomad_mem_model #(.LATENCY(8), .STALL_PCT(5), .SALT(8'hA0 + 8'(g))) u_hbm (
      .clk, .rst_n, .req_valid(on_req_valid[g]), .req_ready(on_req_ready[g]), .req(on_req[g]),
      .rsp_valid(on_rsp_valid[g]), .rsp(on_rsp[g]));
  end
  nomad_shared_mem #(.PORTS(NUM_BE), .LATENCY(30), .STALL_PCT(15), .SALT(8'hDD)) u_ddr (
    .clk, .rst_n, .req_valid(off_req_valid), .req_ready(off_req_ready), .req(off_req),
    .rsp_valid(off_rsp_valid), .rsp(off_rsp));

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---------------------------------------------------------------- OS state
  pte_t pt [VPAGES];
  typedef struct packed {
    logic             valid;
    logic             dirty;
    logic [PFN_W-1:0] pfn;
    logic             tlb_directory;   // one core, one bit
  } cpd_t;
  cpd_t cpd [NF];
  int unsigned head = 0, tail = 0, num_free = NF;
  bit eviction_flag = 0;
  int tlb_vp [TLB_N];
  int tlb_next = 0;

  // ---------------------------------------------------------------- shadow
  logic [DATA_W-1:0] sh [VPAGES][BLOCKS];
  logic [DATA_W-1:0] expect_rd [256];
  bit pending_rd [256];
  int n_pending = 0;

  // ---------------------------------------------------------------- counters
  int n_fill = 0, n_wb = 0, n_clean = 0, n_tlb_skip = 0, n_head_skip = 0, n_flag = 0;
  int n_busy_wait = 0, n_hit = 0, n_bufhit = 0, n_miss = 0, n_hold = 0, n_sub_stall = 0;
  int n_cross = 0, n_replay = 0, n_conflict = 0, n_tlb_hit = 0, n_walk_hit = 0, n_reads = 0;
  int n_fill_be [NUM_BE];

  function automatic logic [PFN_W-1:0] pfn_of(int vp);
    return PFN_W'(32'h2000 + vp);
  endfunction

  function automatic logic [DATA_W-1:0] rnd();
    logic [DATA_W-1:0] d;
    for (int k = 0; k < DATA_W / 32; k++) d[k*32 +: 32] = $urandom;
    return d;
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      for (int g = 0; g < NUM_BE; g++)
        if (dc_rsp_valid[g]) begin
          check(pending_rd[dc_rsp[g].id], "response for an outstanding read");
          check(dc_rsp[g].rdata == expect_rd[dc_rsp[g].id], "read data matches shadow");
          pending_rd[dc_rsp[g].id] = 0;
          n_pending--;
        end
      if (dut.g_be[0].u_be.rp_valid && dut.g_be[0].u_be.rp_ready) n_replay++;
      if (dut.g_be[1].u_be.rp_valid && dut.g_be[1].u_be.rp_ready) n_replay++;
      if (dut.g_be[0].u_be.alloc_valid && !dut.g_be[0].u_be.alloc_ready) n_conflict++;
      if (dut.g_be[1].u_be.alloc_valid && !dut.g_be[1].u_be.alloc_ready) n_conflict++;
    end
  end

  // classification seen by each back-end's comparator
  logic [NUM_BE-1:0] be_hold, be_miss, be_hit, be_bufhit;
  for (genvar g = 0; g < NUM_BE; g++) begin : g_probe
    assign be_hold[g]   = dut.g_be[g].u_be.hold_pending;
    assign be_miss[g]   = dut.g_be[g].u_be.data_miss;
    assign be_hit[g]    = dut.g_be[g].u_be.data_hit;
    assign be_bufhit[g] = dut.g_be[g].u_be.buf_hit;
  end

  // ---------------------------------------------------------------- hardware access
  task automatic os_send(input os_cmd_t c);
    @(negedge clk);
    os_cmd = c;
    #1;
    while (os_busy) begin n_busy_wait++; if (dut.cross_conflict) n_cross++; @(negedge clk); #1; end
    os_cmd_valid = 1;
    @(negedge clk);
    os_cmd_valid = 0;
  endtask

  int next_id = 0;
  task automatic llc_access(input bit we, input int cfn, input int vp, input int blk);
    @(negedge clk);
    while (n_pending > 200 || pending_rd[next_id]) @(negedge clk);
    dc_req.we = we; dc_req.cfn = CFN_W'(cfn); dc_req.blk = BLK_W'(blk);
    dc_req.id = ID_W'(next_id); dc_req.wdata = rnd();
    dc_req_valid = 1;
    #1;
    while (!dc_req_ready) begin
      if (be_hold[cfn % NUM_BE]) n_hold++;
      if (be_miss[cfn % NUM_BE]) n_sub_stall++;
      @(negedge clk); #1;
    end
    if (be_hit[cfn % NUM_BE]) n_hit++;
    else if (be_bufhit[cfn % NUM_BE]) n_bufhit++;
    else n_miss++;
    if (we) sh[vp][blk] = dc_req.wdata;
    else begin
      expect_rd[next_id] = sh[vp][blk];
      pending_rd[next_id] = 1;
      n_pending++;
      n_reads++;
    end
    next_id = (next_id + 1) % 256;
    @(posedge clk);
    #1 dc_req_valid = 0;
  endtask

  // ---------------------------------------------------------------- OS routines
  // DRAM cache tag miss handling routine
  task automatic tag_miss_handler(input int vp, input int blk);
    os_cmd_t c;
    while (cpd[head].valid) begin head = (head + 1) % NF; n_head_skip++; end
    c = '{t: CMD_FILL, pfn: pt[vp].fn, cfn: CFN_W'(head), offset: BLK_W'(blk)};
    os_send(c);
    n_fill++;
    n_fill_be[head % NUM_BE]++;
    cpd[head].valid = 1;
    cpd[head].dirty = 0;
    cpd[head].pfn   = pt[vp].fn;
    pt[vp].c  = 1;
    pt[vp].dc = 0;
    pt[vp].fn = PFN_W'(head);
    head = (head + 1) % NF;
    num_free--;
    if (num_free < THRESH) begin eviction_flag = 1; n_flag++; end
  endtask

  // background eviction routine
  task automatic eviction_daemon(input int n);
    int vp;
    eviction_flag = 0;
    for (int i = 0; i < n; i++) begin
      if (!cpd[tail].valid) begin tail = (tail + 1) % NF; continue; end
      if (cpd[tail].tlb_directory) begin tail = (tail + 1) % NF; n_tlb_skip++; continue; end
      if (cpd[tail].dirty) begin
        os_send('{t: CMD_WRITEBACK, pfn: cpd[tail].pfn, cfn: CFN_W'(tail), offset: '0});
        n_wb++;
      end else n_clean++;
      vp = int'(cpd[tail].pfn) - 32'h2000;     // reverse mapping
      pt[vp].fn = cpd[tail].pfn;
      pt[vp].c  = 0;
      cpd[tail].valid = 0;
      num_free++;
      tail = (tail + 1) % NF;
    end
  endtask

  task automatic tlb_insert(input int vp);
    if (tlb_vp[tlb_next] >= 0) cpd[pt[tlb_vp[tlb_next]].fn].tlb_directory = 0;
    tlb_vp[tlb_next] = vp;
    cpd[pt[vp].fn].tlb_directory = 1;
    tlb_next = (tlb_next + 1) % TLB_N;
  endtask

  // ---------------------------------------------------------------- core
  initial begin
    int vp, blk, cfn, hit;
    bit we;
    for (int v = 0; v < VPAGES; v++) begin
      pt[v] = '0; pt[v].fn = pfn_of(v);
      for (int k = 0; k < BLOCKS; k++) sh[v][k] = u_ddr.peek({pfn_of(v), BLK_W'(k)});
    end
    for (int f = 0; f < NF; f++) cpd[f] = '0;
    for (int t = 0; t < TLB_N; t++) tlb_vp[t] = -1;
    for (int i = 0; i < 256; i++) pending_rd[i] = 0;
    for (int g = 0; g < NUM_BE; g++) n_fill_be[g] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < NACC; a++) begin
      vp  = (a % 8 < 6) ? $urandom_range(VPAGES / 4 - 1) : $urandom_range(VPAGES - 1);
      blk = $urandom_range(BLOCKS - 1);
      we  = ($urandom_range(3) == 0);
      // TLB
      hit = -1;
      for (int t = 0; t < TLB_N; t++) if (tlb_vp[t] == vp) hit = t;
      if (hit >= 0) n_tlb_hit++;
      else begin
        if (pt[vp].c) n_walk_hit++;
        else tag_miss_handler(vp, blk);
        tlb_insert(vp);
      end
      cfn = int'(pt[vp].fn);
      if (we) begin cpd[cfn].dirty = 1; pt[vp].dc = 1; end
      llc_access(we, cfn, vp, blk);
      // now and then the opposite access to the same block right away
      if ($urandom_range(9) == 0) begin
        if (!we) begin cpd[cfn].dirty = 1; pt[vp].dc = 1; end
        llc_access(!we, cfn, vp, blk);
      end
      if (eviction_flag) eviction_daemon(VICTIMS);
    end
    // ---- flush: drop the TLB and evict every frame
    for (int t = 0; t < TLB_N; t++) if (tlb_vp[t] >= 0) begin
      cpd[pt[tlb_vp[t]].fn].tlb_directory = 0; tlb_vp[t] = -1;
    end
    eviction_daemon(NF);
    begin
      int n = 0;
      @(negedge clk);
      while ((dut.g_be[0].u_be.pc_valid != 0 || dut.g_be[1].u_be.pc_valid != 0 ||
              n_pending != 0) && n < 100000) begin @(negedge clk); n++; end
    end
    check(n_pending == 0, "every read answered");
    check(num_free == NF, "every frame free after the flush");
    for (int v = 0; v < VPAGES; v++)
      for (int k = 0; k < BLOCKS; k++)
        check(u_ddr.peek({pfn_of(v), BLK_W'(k)}) == sh[v][k], "off-package memory matches shadow");
    $display("fills=%0d (be0=%0d be1=%0d) writebacks=%0d clean_evictions=%0d tlb_skips=%0d head_skips=%0d eviction_flags=%0d",
             n_fill, n_fill_be[0], n_fill_be[1], n_wb, n_clean, n_tlb_skip, n_head_skip, n_flag);
    $display("tlb_hits=%0d walk_hits=%0d reads=%0d dram_hits=%0d buffer_hits=%0d misses=%0d replays=%0d",
             n_tlb_hit, n_walk_hit, n_reads, n_hit, n_bufhit, n_miss, n_replay);
    $display("cross_backend_waits=%0d", n_cross);
    $display("busy_waits=%0d held=%0d sub_stalls=%0d alloc_conflicts=%0d cycles=%0t",
             n_busy_wait, n_hold, n_sub_stall, n_conflict, $time / 10);
    check(n_fill > 0 && n_fill_be[0] > 0 && n_fill_be[1] > 0, "cache-fills on both back-ends");
    check(n_wb > 0, "dirty write-back");
    check(n_clean > 0, "clean eviction without write-back");
    check(n_tlb_skip > 0, "eviction skipped a frame in the TLB");
    check(n_head_skip > 0, "miss handler skipped a valid frame at the head");
    check(n_flag > 0, "eviction flag raised");
    check(n_busy_wait > 0, "OS waited for a busy interface");
    check(n_hit > 0, "data hit");
    check(n_bufhit > 0, "hit in page copy buffer");
    check(n_miss > 0, "data miss into a sub-entry");
    check(n_replay > 0, "sub-entry replay");
    check(n_hold > 0, "access held until its command was allocated");
    check(n_sub_stall > 0, "access waiting on a sub-entry");
    check(n_conflict > 0, "command waiting on a same-frame PCSHR");
    check(n_cross > 0, "command waiting on a page in flight in the other back-end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
