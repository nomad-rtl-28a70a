// nomad_dram_arbiter: shares the on-package DRAM port of a back-end.
//
// Two requesters reach the DRAM cache: DRAM-cache accesses that hit (from the
// LLC, port a) and the page-copy engine (fills written in, write-backs read
// out, port b). The arbiter grants one request per cycle with round-robin
// priority: after a grant, the other port is preferred next time both ask.
// Responses are not routed here; the tag of each request says whose it is.
//
// Interface: valid/ready on each side, mem_req_t payloads. A grant is given
// only in a cycle the DRAM is ready. Purely combinational apart from the
// one-bit priority register. This arbiter is this design's own choice.
module nomad_dram_arbiter
  import nomad_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     a_valid,
  output logic     a_ready,
  input  mem_req_t a_req,
  input  logic     b_valid,
  output logic     b_ready,
  input  mem_req_t b_req,
  output logic     m_valid,
  input  logic     m_ready,
  output mem_req_t m_req
);

  logic prefer_b_q;   // 1: b wins a tie
  logic pick_b;

  assign pick_b  = b_valid && (!a_valid || prefer_b_q);
  assign m_valid = a_valid || b_valid;
  assign m_req   = pick_b ? b_req : a_req;
  assign a_ready = m_ready && a_valid && !pick_b;
  assign b_ready = m_ready && pick_b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          prefer_b_q <= 1'b0;
    else if (m_ready && a_valid && b_valid) prefer_b_q <= !pick_b;
  end

endmodule
