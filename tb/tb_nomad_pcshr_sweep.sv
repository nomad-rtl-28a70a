// tb_nomad_pcshr_sweep: a burst of DRAM-cache tag misses run on the
// distributed back-end with (PCSHRs, page copy buffers) = (8, 8), (16, 8),
// (32, 8) and (32, 32), the configurations of the design's area study.
//
// For each configuration the OS model takes BURST misses back to back: for
// each it waits until the interface is idle, sends the cache-fill, and the
// core then reads the block it faulted on. The time from the miss to the
// accepted command is the tag-management latency seen by the thread. Checks:
// every faulting read returns the page's data, every page lands in the DRAM
// cache, and more PCSHRs give a shorter average latency for the burst
// (32 PCSHRs faster than 8).
module tb_nomad_pcshr_sweep;
  import nomad_pkg::*;
  localparam int unsigned NCFG   = 4;
  localparam int unsigned BURST  = 96;
  localparam int unsigned NUM_BE = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  longint lat_sum [NCFG];
  bit     done    [NCFG];

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int unsigned NP = (c == 0) ? 8 : (c == 1) ? 16 : 32;
    localparam int unsigned NB = (c == 3) ? 32 : 8;

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
    logic [DATA_W-1:0] expect_rd [256];
    bit pending [256];
    int n_pending = 0;

    nomad_top #(.NUM_BE(NUM_BE), .N_PCSHR(NP), .N_PCB(NB), .N_SUB(8)) dut (.*);

    for (genvar g = 0; g < NUM_BE; g++) begin : g_hbm
      nomad_mem_model #(.LATENCY(8), .SALT(8'hA0)) u_hbm (
        .clk, .rst_n, .req_valid(on_req_valid[g]), .req_ready(on_req_ready[g]), .req(on_req[g]),
        .rsp_valid(on_rsp_valid[g]), .rsp(on_rsp[g]));
    end
    // off-package bandwidth: one block every other cycle per port
    nomad_shared_mem #(.PORTS(NUM_BE), .LATENCY(40), .STALL_PCT(50), .SALT(8'hDD)) u_ddr (
      .clk, .rst_n, .req_valid(off_req_valid), .req_ready(off_req_ready), .req(off_req),
      .rsp_valid(off_rsp_valid), .rsp(off_rsp));

    always @(negedge clk) begin
      if (rst_n)
        for (int g = 0; g < NUM_BE; g++)
          if (dc_rsp_valid[g]) begin
            check(pending[dc_rsp[g].id] && dc_rsp[g].rdata == expect_rd[dc_rsp[g].id],
                  "faulting read returns the page's data");
            pending[dc_rsp[g].id] = 0;
            n_pending--;
          end
    end

    initial begin
      int t0, blk;
      logic [PFN_W-1:0] pfn;
      lat_sum[c] = 0;
      done[c] = 0;
      for (int i = 0; i < 256; i++) pending[i] = 0;
      wait (rst_n);
      for (int m = 0; m < BURST; m++) begin
        pfn = PFN_W'(32'h4000 + m);
        blk = $urandom_range(BLOCKS - 1);
        @(negedge clk);
        t0 = $time / 10;
        os_cmd = '{t: CMD_FILL, pfn: pfn, cfn: CFN_W'(m), offset: BLK_W'(blk)};
        #1;
        while (os_busy) begin @(negedge clk); #1; end
        os_cmd_valid = 1;
        @(negedge clk);
        os_cmd_valid = 0;
        lat_sum[c] += longint'($time / 10 - t0);
        // the thread resumes and reads the block it missed on
        dc_req = '0; dc_req.cfn = CFN_W'(m); dc_req.blk = BLK_W'(blk); dc_req.id = ID_W'(m);
        expect_rd[m] = u_ddr.peek({pfn, BLK_W'(blk)});
        pending[m] = 1; n_pending++;
        dc_req_valid = 1;
        #1;
        while (!dc_req_ready) begin @(negedge clk); #1; end
        @(posedge clk);
        #1 dc_req_valid = 0;
      end
      begin
        int n = 0;
        while ((dut.g_be[0].u_be.pc_valid != 0 || dut.g_be[1].u_be.pc_valid != 0 || n_pending != 0)
               && n < 200000) begin @(negedge clk); n++; end
      end
      check(n_pending == 0, "all faulting reads answered");
      for (int m = 0; m < BURST; m++)
        for (int k = 0; k < BLOCKS; k += 9)
          check(g_hbm[0].u_hbm.peek(OFF_ADDR_W'({CFN_W'(m), BLK_W'(k)})) == u_ddr.peek({PFN_W'(32'h4000 + m), BLK_W'(k)}) ||
                g_hbm[1].u_hbm.peek(OFF_ADDR_W'({CFN_W'(m), BLK_W'(k)})) == u_ddr.peek({PFN_W'(32'h4000 + m), BLK_W'(k)}),
                "page copied into the DRAM cache");
      done[c] = 1;
    end
  end

  initial begin
    wait (done[0] && done[1] && done[2] && done[3]);
    for (int c = 0; c < NCFG; c++)
      $display("config %0d: average tag-management wait %0d cycles per miss", c, lat_sum[c] / BURST);
    check(lat_sum[2] < lat_sum[0], "32 PCSHRs shorten the burst's tag-management latency against 8");
    check(lat_sum[1] <= lat_sum[0], "16 PCSHRs no slower than 8");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
