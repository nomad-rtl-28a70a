// tb_nomad_comparator: random PCSHR states and accesses; the classification
// (data hit, hit in page copy buffer, data miss, hold) is compared with a
// reference written from the rules: only valid cache-fill PCSHRs match, W
// set means the block is in the DRAM cache, B set means it is in the buffer.
module tb_nomad_comparator;
  import nomad_pkg::*;
  localparam int unsigned N = 8;

  logic [CFN_W-1:0]  acc_cfn;
  logic [BLK_W-1:0]  acc_blk;
  logic [N-1:0]      pc_valid, pc_fill;
  logic [CFN_W-1:0]  pc_cfn [N];
  logic [BLOCKS-1:0] pc_b [N];
  logic [BLOCKS-1:0] pc_w [N];
  logic              held_valid;
  os_cmd_t           held_cmd;
  logic              match, data_hit, buf_hit, data_miss, hold_pending;
  logic [2:0]        match_idx;
  int checks = 0, failures = 0;
  int n_hit = 0, n_buf = 0, n_miss = 0, n_hold = 0;

  nomad_comparator #(.N_PCSHR(N)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e; bit m, h;
    for (int n = 0; n < 4000; n++) begin
      // distinct CFNs in a small range so that matches are frequent
      for (int i = 0; i < N; i++) begin
        pc_cfn[i]   = CFN_W'(i * 3 + 1);
        pc_valid[i] = $urandom_range(1);
        pc_fill[i]  = ($urandom_range(3) != 0);
        pc_b[i]     = {$urandom, $urandom};
        pc_w[i]     = pc_b[i] & {$urandom, $urandom};
      end
      acc_cfn = CFN_W'($urandom_range(3 * N + 2));
      acc_blk = BLK_W'($urandom);
      held_valid = ($urandom_range(7) == 0);
      held_cmd = '0;
      held_cmd.t = cmd_type_e'($urandom_range(1));
      held_cmd.cfn = ($urandom_range(1) == 1) ? acc_cfn : acc_cfn + 1;
      #1;
      e = -1;
      for (int i = 0; i < N; i++)
        if (pc_valid[i] && pc_fill[i] && pc_cfn[i] == acc_cfn) e = i;
      m = (e >= 0);
      h = held_valid && held_cmd.t == CMD_FILL && held_cmd.cfn == acc_cfn;
      check(hold_pending == h, "hold");
      check(match == m, "match");
      if (m) check(match_idx == 3'(e), "match index");
      if (h) check(!data_hit && !buf_hit && !data_miss, "held access not classified");
      else if (!m || pc_w[e][acc_blk]) check(data_hit && !buf_hit && !data_miss, "data hit");
      else if (pc_b[e][acc_blk]) check(!data_hit && buf_hit && !data_miss, "buffer hit");
      else check(!data_hit && !buf_hit && data_miss, "data miss");
      n_hit += int'(data_hit); n_buf += int'(buf_hit); n_miss += int'(data_miss); n_hold += int'(h);
    end
    check(n_hit > 0 && n_buf > 0 && n_miss > 0 && n_hold > 0, "every outcome seen");
    $display("hits=%0d buffer=%0d misses=%0d held=%0d", n_hit, n_buf, n_miss, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
