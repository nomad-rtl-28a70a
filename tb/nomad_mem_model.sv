// nomad_mem_model: behavioural model of a block-wide memory (on-package DRAM
// stack or off-package DIMMs) for the testbenches. Not synthesizable.
//
// Holds blocks in an associative array; a block never written reads as
// init_pattern(addr), so a test can predict every value. Requests are taken
// on valid&ready (ready drops at random when STALL_PCT > 0); read data comes
// back in order, LATENCY cycles later, with the request's tag. Writes are
// posted and give no response. Responses cannot be back-pressured.
module nomad_mem_model
  import nomad_pkg::*;
#(
  parameter int unsigned LATENCY   = 10,
  parameter int unsigned STALL_PCT = 0,
  parameter logic [7:0]  SALT      = 8'h00
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     req_valid,
  output logic     req_ready,
  input  mem_req_t req,
  output logic     rsp_valid,
  output mem_rsp_t rsp
);

  logic [DATA_W-1:0] store [logic [OFF_ADDR_W-1:0]];

  typedef struct { int unsigned due; mem_rsp_t r; } pend_t;
  pend_t       q[$];
  int unsigned cyc;
  int unsigned n_reads, n_writes;

  function automatic logic [DATA_W-1:0] init_pattern(input logic [OFF_ADDR_W-1:0] a);
    logic [DATA_W-1:0] d;
    for (int k = 0; k < DATA_W / 64; k++) d[k*64 +: 64] = {SALT, 8'(k), 48'(a)};
    return d;
  endfunction

  function automatic logic [DATA_W-1:0] peek(input logic [OFF_ADDR_W-1:0] a);
    return store.exists(a) ? store[a] : init_pattern(a);
  endfunction

  always @(posedge clk) begin
    if (!rst_n) req_ready <= 1'b1;
    else        req_ready <= ($urandom_range(99) >= STALL_PCT);
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      cyc       <= 0;
      rsp_valid <= 1'b0;
      q.delete();
      n_reads  = 0;
      n_writes = 0;
    end else begin
      cyc <= cyc + 1;
      if (req_valid && req_ready) begin
        if (req.we) begin
          store[req.addr] = req.wdata;
          n_writes++;
        end else begin
          pend_t p;
          p.due     = cyc + LATENCY;
          p.r.tag   = req.tag;
          p.r.rdata = peek(req.addr);
          q.push_back(p);
          n_reads++;
        end
      end
      rsp_valid <= 1'b0;
      if (q.size() > 0 && q[0].due <= cyc) begin
        rsp_valid <= 1'b1;
        rsp       <= q[0].r;
        void'(q.pop_front());
      end
    end
  end

endmodule
