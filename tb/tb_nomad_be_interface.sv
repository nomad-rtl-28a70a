// tb_nomad_be_interface: checks the OS command register of a back-end.
// Busy must follow "holding a command or no PCSHR free"; a written command
// must appear on alloc_cmd unchanged and leave when alloc_ready is high; the
// held command is visible for the whole wait.
module tb_nomad_be_interface;
  import nomad_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic cmd_valid = 1'b0, free_avail = 1'b1, alloc_ready = 1'b0;
  os_cmd_t cmd = '0;
  logic busy, alloc_valid, held_valid;
  os_cmd_t alloc_cmd, held_cmd;

  int checks = 0, failures = 0;

  nomad_be_interface dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    os_cmd_t c;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!busy && !alloc_valid, "idle after reset");
    free_avail = 1'b0; #1;
    check(busy, "busy when no PCSHR is free");
    free_avail = 1'b1; #1;
    for (int n = 0; n < 50; n++) begin
      c.t = cmd_type_e'($urandom_range(1));
      c.pfn = {$urandom, $urandom};
      c.cfn = CFN_W'($urandom);
      c.offset = BLK_W'($urandom);
      // OS writes when idle
      cmd = c; cmd_valid = 1'b1;
      @(negedge clk);
      cmd_valid = 1'b0; cmd = '0;
      check(busy && alloc_valid && held_valid, "busy while a command is held");
      check(alloc_cmd == c && held_cmd == c, "held command unchanged");
      // the PCSHR file takes it after a random wait
      for (int w = $urandom_range(3); w > 0; w--) begin
        @(negedge clk);
        check(alloc_valid && alloc_cmd == c, "command held while not taken");
      end
      alloc_ready = 1'b1;
      @(negedge clk);
      alloc_ready = 1'b0;
      check(!alloc_valid && !busy, "released after allocation");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
