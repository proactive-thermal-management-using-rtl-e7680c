// l2_arbiter: shares the single request port of the L2 among several requesters.
//
// The cores' L1 MBC caches and the conventional instruction/data side all miss into the one
// shared L2. This arbiter grants one requester at a time in round-robin order, holds the grant
// until the L2 has answered (the L2 is blocking) and returns the answer to the granted requester
// only. The partition class of a request is derived from its address (pmbc_pkg::addr_class), so
// LUT lines land in the L2's MBC multiply or add ways. Sharing one L2 follows the published
// architecture; the arbitration policy is this design's choice.
//
// Timing: a request is forwarded in the cycle it is granted; grant is decided when no request is
// outstanding. Fixed one-cycle decision, no added latency on the answer.
module l2_arbiter
  import pmbc_pkg::*;
#(
  parameter int N = 3           // number of requesters
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [N-1:0]                req_valid,
  output logic [N-1:0]                req_ready,
  input  logic [N-1:0][ADDR_W-1:0]    req_addr,
  input  logic [N-1:0]                req_we,
  input  logic [N-1:0][LINE_W-1:0]    req_wline,
  output logic [N-1:0]                resp_valid,
  output logic [LINE_W-1:0]           resp_line,
  // shared L2 port
  output logic                        l2_req_valid,
  input  logic                        l2_req_ready,
  output logic [ADDR_W-1:0]           l2_req_addr,
  output cls_e                        l2_req_cls,
  output logic                        l2_req_we,
  output logic [LINE_W-1:0]           l2_req_wline,
  input  logic                        l2_resp_valid,
  input  logic [LINE_W-1:0]           l2_resp_line
);

  localparam int SEL_W = (N > 1) ? $clog2(N) : 1;

  logic             busy_q;      // a request is outstanding at the L2
  logic [SEL_W-1:0] owner_q;     // requester that owns the outstanding request
  logic [SEL_W-1:0] last_q;      // last granted requester (round-robin pointer)
  logic             gnt_any;
  logic [SEL_W-1:0] gnt;

  always_comb begin
    gnt_any = 1'b0;
    gnt     = '0;
    for (int k = 1; k <= N; k++) begin
      int r;
      r = (int'(last_q) + k) % N;
      if (!gnt_any && req_valid[r]) begin
        gnt_any = 1'b1;
        gnt     = SEL_W'(r);
      end
    end
    l2_req_valid = !busy_q && gnt_any;
    l2_req_addr  = req_addr[gnt];
    l2_req_cls   = addr_class(req_addr[gnt]);
    l2_req_we    = req_we[gnt];
    l2_req_wline = req_wline[gnt];
    req_ready    = '0;
    if (!busy_q && gnt_any) req_ready[gnt] = l2_req_ready;
    resp_valid   = '0;
    if (busy_q) resp_valid[owner_q] = l2_resp_valid;
    resp_line    = l2_resp_line;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      owner_q <= '0;
      last_q  <= SEL_W'(N - 1);
    end else if (!busy_q) begin
      if (gnt_any && l2_req_ready) begin
        busy_q  <= 1'b1;
        owner_q <= gnt;
        last_q  <= gnt;
      end
    end else if (l2_resp_valid) begin
      busy_q <= 1'b0;
    end
  end

  // the L2 answers only a forwarded request, and at most one requester is served at a time
  assert property (@(posedge clk) disable iff (!rst_n) l2_resp_valid |-> busy_q);
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(req_ready));

endmodule
