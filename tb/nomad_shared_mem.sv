// nomad_shared_mem: behavioural model of one memory reached through several
// ports (off-package DRAM shared by all back-ends). Not synthesizable.
// Same rules as nomad_mem_model: unwritten blocks read as a pattern of their
// address, reads answer in order per port after LATENCY cycles, writes are
// posted, ready drops at random when STALL_PCT > 0.
module nomad_shared_mem
  import nomad_pkg::*;
#(
  parameter int unsigned PORTS     = 2,
  parameter int unsigned LATENCY   = 20,
  parameter int unsigned STALL_PCT = 0,
  parameter logic [7:0]  SALT      = 8'h00
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [PORTS-1:0] req_valid,
  output logic [PORTS-1:0] req_ready,
  input  mem_req_t         req [PORTS],
  output logic [PORTS-1:0] rsp_valid,
  output mem_rsp_t         rsp [PORTS]
);

  logic [DATA_W-1:0] store [logic [OFF_ADDR_W-1:0]];
  typedef struct { int unsigned due; mem_rsp_t r; } pend_t;
  pend_t       q [PORTS][$];
  int unsigned cyc;

  function automatic logic [DATA_W-1:0] peek(input logic [OFF_ADDR_W-1:0] a);
    logic [DATA_W-1:0] d;
    if (store.exists(a)) return store[a];
    for (int k = 0; k < DATA_W / 64; k++) d[k*64 +: 64] = {SALT, 8'(k), 48'(a)};
    return d;
  endfunction

  always @(posedge clk) begin
    for (int p = 0; p < PORTS; p++)
      req_ready[p] <= !rst_n || ($urandom_range(99) >= STALL_PCT);
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      cyc       <= 0;
      rsp_valid <= '0;
      for (int p = 0; p < PORTS; p++) q[p].delete();
    end else begin
      cyc <= cyc + 1;
      for (int p = 0; p < PORTS; p++) begin
        if (req_valid[p] && req_ready[p]) begin
          if (req[p].we) store[req[p].addr] = req[p].wdata;
          else begin
            pend_t e;
            e.due = cyc + LATENCY; e.r.tag = req[p].tag; e.r.rdata = peek(req[p].addr);
            q[p].push_back(e);
          end
        end
        rsp_valid[p] <= 1'b0;
        if (q[p].size() > 0 && q[p][0].due <= cyc) begin
          rsp_valid[p] <= 1'b1;
          rsp[p]       <= q[p][0].r;
          void'(q[p].pop_front());
        end
      end
    end
  end
endmodule
