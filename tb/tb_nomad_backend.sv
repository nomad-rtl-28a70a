// tb_nomad_backend: random OS commands and LLC traffic on one back-end,
// checked against a shadow copy of every cache frame.
//
// The OS side fills frames from fresh physical pages and writes frames back
// to fresh physical pages; a written-back frame may be refilled at once, so a
// fill can meet a write-back of the same frame still in flight. The LLC side
// reads and writes blocks of filled frames right after the fill command, so
// accesses hit in DRAM, hit in the page copy buffer, wait in sub-entries, or
// are held while the command still sits in the interface. Every read must
// return the shadow value at the time it was accepted; every written-back
// page must land in off-package memory. Each mechanism must occur.
module tb_nomad_backend;
  import nomad_pkg::*;
  localparam int unsigned N_PCSHR = 4, N_PCB = 2, N_SUB = 2;
  localparam int unsigned FRAMES = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic os_cmd_valid = 0, os_busy, pfn_query_hit;
  logic [PFN_W-1:0] pfn_query;
  os_cmd_t os_cmd = '0;
  logic dc_req_valid = 0, dc_req_ready, dc_rsp_valid;
  dc_req_t dc_req = '0;
  dc_rsp_t dc_rsp;
  logic on_req_valid, on_req_ready, on_rsp_valid, off_req_valid, off_req_ready, off_rsp_valid;
  mem_req_t on_req, off_req;
  mem_rsp_t on_rsp, off_rsp;

  nomad_backend #(.N_PCSHR(N_PCSHR), .N_PCB(N_PCB), .N_SUB(N_SUB)) dut (.*);

  nomad_mem_model #(.LATENCY(6), .STALL_PCT(10), .SALT(8'hCC)) u_on (
    .clk, .rst_n, .req_valid(on_req_valid), .req_ready(on_req_ready), .req(on_req),
    .rsp_valid(on_rsp_valid), .rsp(on_rsp));
  nomad_mem_model #(.LATENCY(25), .STALL_PCT(20), .SALT(8'hDD)) u_off (
    .clk, .rst_n, .req_valid(off_req_valid), .req_ready(off_req_ready), .req(off_req),
    .rsp_valid(off_rsp_valid), .rsp(off_rsp));

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---- shadow state
  logic [DATA_W-1:0] sh [FRAMES][BLOCKS];
  bit                filled [FRAMES];
  logic [DATA_W-1:0] expect_rd [256];
  bit                pending_rd [256];
  int                n_pending = 0;
  // write-backs to check at the end
  logic [PFN_W-1:0]  wb_pfn [$];
  logic [DATA_W-1:0] wb_page [int];   // key: write-back number * BLOCKS + block

  // ---- mechanism counters
  int n_fill = 0, n_wb = 0, n_hit = 0, n_bufhit = 0, n_miss = 0, n_replay = 0, n_hold = 0;
  int n_os_busy = 0, n_sub_full = 0, n_alloc_conflict = 0, n_buf_wait = 0, n_reads = 0;

  function automatic logic [DATA_W-1:0] rnd();
    logic [DATA_W-1:0] d;
    for (int k = 0; k < DATA_W / 32; k++) d[k*32 +: 32] = $urandom;
    return d;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // responses (registered outputs, sampled mid-cycle)
  always @(negedge clk) begin
    if (rst_n && dc_rsp_valid) begin
      check(pending_rd[dc_rsp.id], "response for an outstanding read");
      check(dc_rsp.rdata == expect_rd[dc_rsp.id], "read data matches shadow");
      pending_rd[dc_rsp.id] = 0;
      n_pending--;
    end
    if (rst_n) begin
      if (dut.rp_valid && dut.rp_ready) n_replay++;
      if (dut.sub_ins_valid && !dut.sub_ins_ready) n_sub_full++;
      if (dut.alloc_valid && !dut.alloc_ready && dut.free_avail) n_alloc_conflict++;
      if ((dut.u_pcshr.v_q & ~dut.u_pcshr.pb_q) != 0) n_buf_wait++;
    end
  end

  // the lookup must see every physical page held or in flight
  always @(negedge clk) if (rst_n) begin
    bit e;
    pfn_query = PFN_W'($urandom_range(FRAMES - 1) + ($urandom_range(1) ? 1000 : 5000) + $urandom_range(200));
    #1;
    e = dut.held_valid && dut.held_cmd.pfn == pfn_query;
    for (int i = 0; i < N_PCSHR; i++) if (dut.u_pcshr.v_q[i] && dut.u_pcshr.pfn_q[i] == pfn_query) e = 1;
    check(pfn_query_hit == e, "physical-page lookup");
  end

  initial begin
    int unsigned next_pfn = 1000, next_wb = 5000;
    int frame, blk, id = 0, cyc = 0;
    bit req_live = 0;
    for (int f = 0; f < FRAMES; f++) filled[f] = 0;
    for (int i = 0; i < 256; i++) pending_rd[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (cyc < 30000) begin
      @(negedge clk);
      cyc++;
      // ---- OS: issue a command now and then (only when idle)
      os_cmd_valid = 0;
      if (os_busy) n_os_busy++;
      else if ($urandom_range(40) == 0) begin
        frame = $urandom_range(FRAMES - 1);
        // never touch the frame the LLC request in flight targets
        if (!(req_live && dc_req.cfn == CFN_W'(frame))) begin
          if (!filled[frame]) begin
            os_cmd = '{t: CMD_FILL, pfn: PFN_W'(next_pfn), cfn: CFN_W'(frame), offset: BLK_W'($urandom)};
            for (int k = 0; k < BLOCKS; k++) sh[frame][k] = u_off.peek({PFN_W'(next_pfn), BLK_W'(k)});
            next_pfn++;
            filled[frame] = 1;
            n_fill++;
          end else begin
            os_cmd = '{t: CMD_WRITEBACK, pfn: PFN_W'(next_wb), cfn: CFN_W'(frame), offset: '0};
            wb_pfn.push_back(PFN_W'(next_wb));
            for (int k = 0; k < BLOCKS; k++) wb_page[n_wb * BLOCKS + k] = sh[frame][k];
            next_wb++;
            filled[frame] = 0;
            n_wb++;
          end
          os_cmd_valid = 1;
        end
      end
      // ---- LLC: one request at a time, to a filled frame
      if (!req_live && n_pending < 200) begin
        frame = $urandom_range(FRAMES - 1);
        if (filled[frame] && !(os_cmd_valid && os_cmd.cfn == CFN_W'(frame) && os_cmd.t == CMD_WRITEBACK)) begin
          blk = ($urandom_range(1) == 0) ? $urandom_range(7) : $urandom_range(BLOCKS - 1);
          dc_req.we = ($urandom_range(2) == 0);
          dc_req.cfn = CFN_W'(frame);
          dc_req.blk = BLK_W'(blk);
          dc_req.wdata = rnd();
          while (pending_rd[id]) id = (id + 1) % 256;
          dc_req.id = ID_W'(id);
          id = (id + 1) % 256;
          req_live = 1;
        end
      end
      dc_req_valid = req_live;
      #1;
      if (req_live) begin
        if (dut.hold_pending) n_hold++;
        if (dc_req_ready) begin
          if (dut.data_hit) n_hit++;
          else if (dut.buf_hit) n_bufhit++;
          else n_miss++;
          if (dc_req.we) sh[dc_req.cfn][dc_req.blk] = dc_req.wdata;
          else begin
            expect_rd[dc_req.id] = sh[dc_req.cfn][dc_req.blk];
            pending_rd[dc_req.id] = 1;
            n_pending++;
            n_reads++;
          end
          req_live = 0;
        end
      end
    end
    @(negedge clk);
    os_cmd_valid = 0; dc_req_valid = 0;
    // drain: all PCSHRs idle and all reads answered
    begin
      int n = 0;
      while ((dut.pc_valid != 0 || n_pending != 0 || dut.held_valid) && n < 50000) begin @(negedge clk); n++; end
    end
    check(n_pending == 0, "every read answered");
    check(dut.pc_valid == 0, "every page copy finished");
    // filled frames hold the shadow values in DRAM
    for (int f = 0; f < FRAMES; f++)
      if (filled[f])
        for (int k = 0; k < BLOCKS; k++)
          check(u_on.peek(OFF_ADDR_W'({CFN_W'(f), BLK_W'(k)})) == sh[f][k], "cache frame contents");
    foreach (wb_pfn[i])
      for (int k = 0; k < BLOCKS; k++)
        check(u_off.peek({wb_pfn[i], BLK_W'(k)}) == wb_page[i * BLOCKS + k], "written-back page contents");
    $display("fills=%0d writebacks=%0d reads=%0d dram_hits=%0d buffer_hits=%0d misses=%0d replays=%0d held=%0d",
             n_fill, n_wb, n_reads, n_hit, n_bufhit, n_miss, n_replay, n_hold);
    $display("os_busy=%0d sub_full=%0d alloc_conflict=%0d buffer_wait=%0d", n_os_busy, n_sub_full, n_alloc_conflict, n_buf_wait);
    check(n_fill > 0,  "cache-fill occurred");
    check(n_wb > 0,    "write-back occurred");
    check(n_hit > 0,   "data hit occurred");
    check(n_bufhit > 0, "hit in page copy buffer occurred");
    check(n_miss > 0,  "data miss into a sub-entry occurred");
    check(n_replay > 0, "sub-entry replay occurred");
    check(n_hold > 0,  "access held for an unallocated command occurred");
    check(n_os_busy > 0, "interface busy occurred");
    check(n_sub_full > 0, "sub-entries full or ordered occurred");
    check(n_alloc_conflict > 0, "allocation waiting on a same-frame PCSHR occurred");
    check(n_buf_wait > 0, "PCSHR waiting for a page copy buffer occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
