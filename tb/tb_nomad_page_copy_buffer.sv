// tb_nomad_page_copy_buffer: random writes on both write ports and reads on
// all three read ports, compared with a shadow copy of the buffers.
module tb_nomad_page_copy_buffer;
  import nomad_pkg::*;
  localparam int unsigned N_PCB = 4;
  localparam int unsigned PB_W  = 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic w0_en = 0, w1_en = 0;
  logic [PB_W-1:0] w0_buf = 0, w1_buf = 0, r0_buf = 0, r1_buf = 0, r2_buf = 0;
  logic [BLK_W-1:0] w0_blk = 0, w1_blk = 0, r0_blk = 0, r1_blk = 0, r2_blk = 0;
  logic [DATA_W-1:0] w0_data = 0, w1_data = 0, r0_data, r1_data, r2_data;
  logic [DATA_W-1:0] shadow [N_PCB][BLOCKS];
  int checks = 0, failures = 0;

  nomad_page_copy_buffer #(.N_PCB(N_PCB)) dut (.*);

  function automatic logic [DATA_W-1:0] rnd();
    logic [DATA_W-1:0] d;
    for (int k = 0; k < DATA_W / 32; k++) d[k*32 +: 32] = $urandom;
    return d;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill everything through alternating ports
    for (int b = 0; b < N_PCB; b++)
      for (int k = 0; k < BLOCKS; k++) begin
        @(negedge clk);
        shadow[b][k] = rnd();
        w0_en = (k % 2 == 0); w1_en = (k % 2 == 1);
        w0_buf = PB_W'(b); w0_blk = BLK_W'(k); w0_data = shadow[b][k];
        w1_buf = PB_W'(b); w1_blk = BLK_W'(k); w1_data = shadow[b][k];
      end
    @(negedge clk); w0_en = 0; w1_en = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      r0_buf = PB_W'($urandom); r0_blk = BLK_W'($urandom);
      r1_buf = PB_W'($urandom); r1_blk = BLK_W'($urandom);
      r2_buf = PB_W'($urandom); r2_blk = BLK_W'($urandom);
      #1;
      check(r0_data == shadow[r0_buf][r0_blk], "r0");
      check(r1_data == shadow[r1_buf][r1_blk], "r1");
      check(r2_data == shadow[r2_buf][r2_blk], "r2");
      // random write on each port to distinct buffers
      w0_en = $urandom_range(1); w1_en = $urandom_range(1);
      w0_buf = PB_W'($urandom); w0_blk = BLK_W'($urandom); w0_data = rnd();
      w1_buf = w0_buf + 1;      w1_blk = BLK_W'($urandom); w1_data = rnd();
      @(posedge clk);
      if (w0_en) shadow[w0_buf][w0_blk] = w0_data;
      if (w1_en) shadow[w1_buf][w1_blk] = w1_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
