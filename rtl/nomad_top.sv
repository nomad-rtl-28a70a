// nomad_top: NOMAD back-end distributed over the on-package DRAM stacks.
//
// NOMAD places one back-end beside each on-package DRAM stack (HBM). The OS
// allocates cache frames in FIFO order, so consecutive frames, and with them
// the page-copy work, spread evenly over the back-ends. Here a cache frame
// belongs to back-end (CFN mod NUM_BE); this module steers each OS command
// and each DRAM-cache access to that back-end. Because a page written back
// through one back-end may be refilled into a frame of another, a command is
// also reported busy (and not passed on) while another back-end still holds
// or copies the same physical page; within one back-end the PCSHR file
// enforces the same rule. Each back-end has its own
// on-package DRAM port, off-package memory port and LLC response port.
//
// Interface: os_cmd_valid/os_cmd with os_busy = S of the back-end that owns
// os_cmd.cfn, or the cross-back-end page conflict above (be_busy gives the S
// of every back-end); the OS writes only when os_busy is low; dc_req_valid/ready/dc_req for the
// LLC; per back-end arrays for responses and memory ports. Timing is that of
// nomad_backend; the steering is combinational.
// From the design description: one back-end per stack, two stacks as drawn.
// Own choice: the CFN-modulo mapping of frames to stacks.
module nomad_top
  import nomad_pkg::*;
#(
  parameter int unsigned NUM_BE  = 2,
  parameter int unsigned N_PCSHR = 8,
  parameter int unsigned N_PCB   = 8,
  parameter int unsigned N_SUB   = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              os_cmd_valid,
  input  os_cmd_t           os_cmd,
  output logic              os_busy,
  output logic [NUM_BE-1:0] be_busy,
  input  logic              dc_req_valid,
  output logic              dc_req_ready,
  input  dc_req_t           dc_req,
  output logic [NUM_BE-1:0] dc_rsp_valid,
  output dc_rsp_t           dc_rsp        [NUM_BE],
  output logic [NUM_BE-1:0] on_req_valid,
  input  logic [NUM_BE-1:0] on_req_ready,
  output mem_req_t          on_req        [NUM_BE],
  input  logic [NUM_BE-1:0] on_rsp_valid,
  input  mem_rsp_t          on_rsp        [NUM_BE],
  output logic [NUM_BE-1:0] off_req_valid,
  input  logic [NUM_BE-1:0] off_req_ready,
  output mem_req_t          off_req       [NUM_BE],
  input  logic [NUM_BE-1:0] off_rsp_valid,
  input  mem_rsp_t          off_rsp       [NUM_BE]
);

  int unsigned cmd_be, req_be;
  assign cmd_be = 32'(os_cmd.cfn) % NUM_BE;
  assign req_be = 32'(dc_req.cfn) % NUM_BE;

  logic [NUM_BE-1:0] req_ready;
  logic [NUM_BE-1:0] pfn_hit;
  logic              cross_conflict;

  always_comb begin
    cross_conflict = 1'b0;
    for (int b = 0; b < NUM_BE; b++)
      if (b != cmd_be && pfn_hit[b]) cross_conflict = 1'b1;
  end

  for (genvar g = 0; g < NUM_BE; g++) begin : g_be
    nomad_backend #(.N_PCSHR(N_PCSHR), .N_PCB(N_PCB), .N_SUB(N_SUB)) u_be (
      .clk, .rst_n,
      .os_cmd_valid (os_cmd_valid && cmd_be == g && !cross_conflict),
      .os_cmd       (os_cmd),
      .os_busy      (be_busy[g]),
      .pfn_query    (os_cmd.pfn),
      .pfn_query_hit(pfn_hit[g]),
      .dc_req_valid (dc_req_valid && req_be == g),
      .dc_req_ready (req_ready[g]),
      .dc_req       (dc_req),
      .dc_rsp_valid (dc_rsp_valid[g]),
      .dc_rsp       (dc_rsp[g]),
      .on_req_valid (on_req_valid[g]),
      .on_req_ready (on_req_ready[g]),
      .on_req       (on_req[g]),
      .on_rsp_valid (on_rsp_valid[g]),
      .on_rsp       (on_rsp[g]),
      .off_req_valid(off_req_valid[g]),
      .off_req_ready(off_req_ready[g]),
      .off_req      (off_req[g]),
      .off_rsp_valid(off_rsp_valid[g]),
      .off_rsp      (off_rsp[g])
    );
  end

  assign os_busy      = be_busy[cmd_be] || cross_conflict;
  assign dc_req_ready = req_ready[req_be];

endmodule
