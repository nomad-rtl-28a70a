// nomad_be_interface: the OS-visible command register of a NOMAD back-end.
//
// The OS miss handler and eviction daemon hand page copies to the hardware
// through this register: a type T (cache-fill or write-back), the physical
// frame PFN, the cache frame CFN and the block Offset the faulting access
// wants first. The state S reads "busy" while the register still holds a
// command that no PCSHR has taken yet, or while every PCSHR is in use; the OS
// writes only when S reads idle and then returns to the thread at once.
//
// Interface: cmd_valid/cmd is the OS write (one cycle, only when busy is low).
// The held command is offered to the PCSHR file on alloc_valid/alloc_cmd and
// leaves the register in the cycle alloc_ready is high. held_* exposes the
// held command so that accesses to its frame can be held back until a PCSHR
// tracks it.
// Timing: a write is held from the next cycle; allocation can happen in that
// same cycle, so an idle back-end takes one command per two cycles.
// From the design description: the fields and the busy rule. Own choices: the
// valid/ready hand-off and the one-entry register.
module nomad_be_interface
  import nomad_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    cmd_valid,
  input  os_cmd_t cmd,
  input  logic    free_avail,   // at least one PCSHR is free
  output logic    busy,         // S
  output logic    alloc_valid,
  input  logic    alloc_ready,
  output os_cmd_t alloc_cmd,
  output logic    held_valid,
  output os_cmd_t held_cmd
);

  logic    holding_q;
  os_cmd_t cmd_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      holding_q <= 1'b0;
      cmd_q     <= '0;
    end else if (holding_q) begin
      if (alloc_ready) holding_q <= 1'b0;
    end else if (cmd_valid && !busy) begin
      holding_q <= 1'b1;
      cmd_q     <= cmd;
    end
  end

  assign busy        = holding_q || !free_avail;
  assign alloc_valid = holding_q;
  assign alloc_cmd   = cmd_q;
  assign held_valid  = holding_q;
  assign held_cmd    = cmd_q;

  // The OS must poll S and write only when the back-end is idle.
  a_no_write_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    cmd_valid |-> !busy)
    else $error("OS wrote the back-end interface while it was busy");

endmodule
