// tb_nomad_pcshr_file: drives the PCSHR file with page-copy commands and
// memory models on both sides, with fewer page copy buffers than PCSHRs.
// Checks: a fill copies the whole page into the DRAM cache and a write-back
// copies it out; the first block read of a fill is the block named by the
// command's offset; a PCSHR waits for a buffer when all are taken; a second
// command for a frame already in flight is refused; a queued access (a
// sub-entry) is offered for replay once its block is in the buffer, and its
// block is fetched ahead of the rest of the page.
module tb_nomad_pcshr_file;
  import nomad_pkg::*;
  localparam int unsigned N_PCSHR = 4, N_PCB = 2, N_SUB = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic alloc_valid = 0, alloc_ready, free_avail;
  os_cmd_t alloc_cmd = '0;
  logic [N_PCSHR-1:0] pc_valid, pc_fill;
  logic [CFN_W-1:0] pc_cfn [N_PCSHR];
  logic [PFN_W-1:0] pc_pfn [N_PCSHR];
  logic [BLOCKS-1:0] pc_b [N_PCSHR];
  logic [BLOCKS-1:0] pc_w [N_PCSHR];
  logic [0:0] pc_p [N_PCSHR];
  logic sub_ins_valid = 0, sub_ins_ready;
  logic [1:0] sub_ins_idx = 0;
  dc_req_t sub_ins_req = '0;
  logic rp_valid, rp_ready = 1;
  dc_req_t rp_req;
  logic [0:0] rp_buf;
  logic off_req_valid, off_req_ready, off_rsp_valid;
  mem_req_t off_req; mem_rsp_t off_rsp;
  logic eng_req_valid, eng_req_ready, eng_rsp_valid;
  mem_req_t eng_req; mem_rsp_t eng_rsp;
  logic [0:0] llc_r_buf = 0, llc_w_buf = 0;
  logic [BLK_W-1:0] llc_r_blk = 0, llc_w_blk = 0;
  logic [DATA_W-1:0] llc_r_data, llc_w_data = 0;
  logic llc_w_en = 0;

  int checks = 0, failures = 0;
  int buffer_waits = 0, replays = 0;

  nomad_pcshr_file #(.N_PCSHR(N_PCSHR), .N_PCB(N_PCB), .N_SUB(N_SUB)) dut (.*);

  nomad_mem_model #(.LATENCY(20), .STALL_PCT(10), .SALT(8'hDD)) u_off (
    .clk, .rst_n, .req_valid(off_req_valid), .req_ready(off_req_ready), .req(off_req),
    .rsp_valid(off_rsp_valid), .rsp(off_rsp));
  nomad_mem_model #(.LATENCY(8), .STALL_PCT(10), .SALT(8'hCC)) u_on (
    .clk, .rst_n, .req_valid(eng_req_valid), .req_ready(eng_req_ready), .req(eng_req),
    .rsp_valid(eng_rsp_valid), .rsp(eng_rsp));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // first off-package read after each fill allocation
  logic [PFN_W-1:0] want_pfn; logic [BLK_W-1:0] want_blk; bit want = 0;
  always @(posedge clk) begin
    if (rst_n && want && off_req_valid && off_req_ready && !off_req.we &&
        off_req.addr[OFF_ADDR_W-1:BLK_W] == want_pfn) begin
      check(off_req.addr[BLK_W-1:0] == want_blk, "critical block read first");
      want = 0;
    end
    if (rst_n && (pc_valid & ~dut.pb_q) != 0 && &dut.pcb_used_q) buffer_waits++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input cmd_type_e t, input logic [PFN_W-1:0] pfn,
                      input logic [CFN_W-1:0] cfn, input logic [BLK_W-1:0] off);
    @(negedge clk);
    alloc_cmd = '{t: t, pfn: pfn, cfn: cfn, offset: off};
    alloc_valid = 1;
    #1;
    while (!alloc_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 alloc_valid = 0;
  endtask

  task automatic wait_idle();
    int n = 0;
    while (pc_valid != 0 && n < 50000) begin @(negedge clk); n++; end
  endtask

  initial begin
    logic [DATA_W-1:0] exp_d;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- four fills at once: only two buffers
    for (int i = 0; i < 4; i++) begin
      if (i == 0) begin want = 1; want_pfn = PFN_W'(100); want_blk = 6'd37; end
      send(CMD_FILL, PFN_W'(100 + i), CFN_W'(10 + i), (i == 0) ? 6'd37 : BLK_W'(i * 5));
    end
    check(want == 0, "first fill read seen");
    // ---- refused duplicate frame while in flight
    @(negedge clk);
    if (pc_valid != 0) begin
      alloc_cmd = '{t: CMD_FILL, pfn: PFN_W'(999), cfn: CFN_W'(10 + 3), offset: 0};
      #1 check(!alloc_ready || !(pc_valid[0] || pc_valid[1] || pc_valid[2] || pc_valid[3]),
               "duplicate frame refused");
    end
    wait_idle();
    check(pc_valid == 0, "all fills completed");
    check(buffer_waits > 0, "a PCSHR waited for a page copy buffer");
    for (int i = 0; i < 4; i++)
      for (int k = 0; k < BLOCKS; k++)
        check(u_on.peek({CFN_W'(10 + i), BLK_W'(k)}) == u_off.peek({PFN_W'(100 + i), BLK_W'(k)}),
              "filled block equals source block");
    // ---- write-backs of two of the frames to new physical frames
    send(CMD_WRITEBACK, PFN_W'(500), CFN_W'(10), 6'd0);
    send(CMD_WRITEBACK, PFN_W'(501), CFN_W'(11), 6'd0);
    wait_idle();
    for (int i = 0; i < 2; i++)
      for (int k = 0; k < BLOCKS; k++)
        check(u_off.peek({PFN_W'(500 + i), BLK_W'(k)}) == u_on.peek(OFF_ADDR_W'({CFN_W'(10 + i), BLK_W'(k)})),
              "written-back block equals cache block");
    // ---- sub-entry: queue a read for block 63 of a new fill right away
    rp_ready = 0;
    send(CMD_FILL, PFN_W'(200), CFN_W'(20), 6'd0);
    @(negedge clk);
    sub_ins_idx = '0;
    for (int i = 0; i < N_PCSHR; i++) if (pc_valid[i] && pc_cfn[i] == CFN_W'(20)) sub_ins_idx = 2'(i);
    sub_ins_req = '0; sub_ins_req.cfn = CFN_W'(20); sub_ins_req.blk = 6'd63; sub_ins_req.id = 8'h5A;
    sub_ins_valid = 1;
    #1 check(sub_ins_ready, "sub-entry accepted");
    @(negedge clk);
    sub_ins_valid = 0;
    begin
      int n = 0;
      while (!rp_valid && n < 2000) begin @(negedge clk); n++; end
    end
    check(rp_valid && rp_req.id == 8'h5A && rp_req.blk == 6'd63, "replay offered with queued request");
    check(pc_b[sub_ins_idx][63] && $countones(pc_b[sub_ins_idx]) < 8,
          "demanded block fetched ahead of the rest of the page");
    check(pc_valid[sub_ins_idx], "entry kept while a sub-entry waits");
    llc_r_buf = rp_buf; llc_r_blk = 6'd63;
    #1 check(llc_r_data == u_off.peek({PFN_W'(200), 6'd63}), "buffer holds the demanded block");
    rp_ready = 1; replays++;
    wait_idle();
    check(pc_valid == 0, "fill with sub-entry completed");
    $display("buffer_waits=%0d replays=%0d", buffer_waits, replays);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
