// tb_nomad_dram_arbiter: checks the 2:1 on-package DRAM arbiter against a
// reference round-robin model under random valid/ready traffic.
module tb_nomad_dram_arbiter;
  import nomad_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic a_valid = 0, b_valid = 0, m_ready = 0;
  mem_req_t a_req = '0, b_req = '0;
  logic a_ready, b_ready, m_valid;
  mem_req_t m_req;
  int checks = 0, failures = 0;
  bit prefer_b = 0;
  int ties = 0;

  nomad_dram_arbiter dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_b;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      a_valid = $urandom_range(1); b_valid = $urandom_range(1); m_ready = ($urandom_range(3) != 0);
      a_req.tag = TAG_W'($urandom); b_req.tag = TAG_W'($urandom);
      #1;
      exp_b = b_valid && (!a_valid || prefer_b);
      check(m_valid == (a_valid || b_valid), "m_valid");
      if (m_valid) check(m_req.tag == (exp_b ? b_req.tag : a_req.tag), "granted payload");
      check(a_ready == (m_ready && a_valid && !exp_b), "a_ready");
      check(b_ready == (m_ready && exp_b), "b_ready");
      check(!(a_ready && b_ready), "one grant per cycle");
      if (m_ready && a_valid && b_valid) begin prefer_b = !exp_b; ties++; end
    end
    check(ties > 100, "ties exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
