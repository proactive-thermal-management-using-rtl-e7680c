// pmbc_top: a multicore system with proactive memory-based computing (MBC).
//
// NUM_CORES execution slices (mbc_core) each steer integer adds and multiplies whose operand
// pair lies in a per-application "most frequent" region to lookup tables in memory instead of the
// ALU, which moves switching activity, and so heat, away from the ALU before it reaches its
// temperature limit. Each slice has a private L1 MBC cache preloaded with the LUT lines of that
// region. All slices and the conventional instruction/data side share a way-partitioned L2; its
// way masks give the inst/data, MBC-multiply and MBC-add partition factors. The L2 misses to main
// memory through the mem_* port, where the two 128 KB LUTs sit at the top of the 256 MB space.
//
// Published: two cores, a 128 KB 16-way L2 with 32-byte lines, 1-cycle L1 and 20 ns / 200 ns L2
// and memory latencies at 500 MHz, MBC cache sizes of 1 to 4 KB, way-based partitioning, the
// decision function and preloading. This design's own: the 2 KB 4-way MBC cache default, the
// LUT layout, the one-instruction-at-a-time slice, and the arbitration. The cores' pipelines,
// their instruction/data L1 caches, main memory, temperature sensing and the policy that raises
// engage are outside this block: their signals are ports.
//
// Ports: per core, an issue/result handshake, engage, two decision-function configurations, a
// preload start and the L1 MBC way masks; one inst/data request port into the L2; the L2 way masks;
// one blocking line-wide memory port (a write is acknowledged by mem_resp_valid like a read).
module pmbc_top
  import pmbc_pkg::*;
#(
  parameter int NUM_CORES    = 2,
  parameter int L1_MBC_BYTES = 2048,
  parameter int L1_MBC_WAYS  = 4,
  parameter int L1_HIT_LAT   = 1,
  parameter int L2_BYTES     = 131072,
  parameter int L2_WAYS      = 16,
  parameter int L2_HIT_LAT   = 10
) (
  input  logic                                          clk,
  input  logic                                          rst_n,
  // per-core issue and result
  input  logic [NUM_CORES-1:0]                          iss_valid,
  output logic [NUM_CORES-1:0]                          iss_ready,
  input  op_e  [NUM_CORES-1:0]                          iss_op,
  input  logic [NUM_CORES-1:0][DATA_W-1:0]              iss_a,
  input  logic [NUM_CORES-1:0][DATA_W-1:0]              iss_b,
  output logic [NUM_CORES-1:0]                          res_valid,
  output logic [NUM_CORES-1:0][DATA_W-1:0]              res_data,
  output logic [NUM_CORES-1:0]                          res_via_mbc,
  // per-core proactive MBC control
  input  logic [NUM_CORES-1:0]                          engage,
  input  dfunc_cfg_t [NUM_CORES-1:0]                    cfg_add,
  input  dfunc_cfg_t [NUM_CORES-1:0]                    cfg_mul,
  input  logic [NUM_CORES-1:0]                          preload_start,
  output logic [NUM_CORES-1:0]                          preload_busy,
  output logic [NUM_CORES-1:0][15:0]                    preload_lines,
  input  logic [NUM_CORES-1:0][NUM_CLS-1:0][L1_MBC_WAYS-1:0] l1_way_mask,
  // per-core activity counters
  output logic [NUM_CORES-1:0][31:0]                    alu_ops,
  output logic [NUM_CORES-1:0][31:0]                    mbc_ops,
  output logic [NUM_CORES-1:0][31:0]                    sup_ops,
  output logic [NUM_CORES-1:0][31:0]                    mbc_hits,
  output logic [NUM_CORES-1:0][31:0]                    mbc_misses,
  // conventional inst/data requests into the shared L2
  input  logic                                          id_req_valid,
  output logic                                          id_req_ready,
  input  logic [ADDR_W-1:0]                             id_req_addr,
  input  logic                                          id_req_we,
  input  logic [LINE_W-1:0]                             id_req_wline,
  output logic                                          id_resp_valid,
  output logic [LINE_W-1:0]                             id_resp_line,
  // shared L2 partitioning and counters
  input  logic [NUM_CLS-1:0][L2_WAYS-1:0]               l2_way_mask,
  output logic [31:0]                                   l2_hits,
  output logic [31:0]                                   l2_misses,
  // main memory
  output logic                                          mem_req_valid,
  input  logic                                          mem_req_ready,
  output logic [ADDR_W-1:0]                             mem_req_addr,
  output logic                                          mem_req_we,
  output logic [LINE_W-1:0]                             mem_req_wline,
  input  logic                                          mem_resp_valid,
  input  logic [LINE_W-1:0]                             mem_resp_line
);

  localparam int NREQ = NUM_CORES + 1;   // requester 0: inst/data, 1..NUM_CORES: cores

  logic [NREQ-1:0]              a_req_valid, a_req_ready, a_req_we, a_resp_valid;
  logic [NREQ-1:0][ADDR_W-1:0]  a_req_addr;
  logic [NREQ-1:0][LINE_W-1:0]  a_req_wline;
  logic [LINE_W-1:0]            a_resp_line;

  assign a_req_valid[0] = id_req_valid;
  assign a_req_addr[0]  = id_req_addr;
  assign a_req_we[0]    = id_req_we;
  assign a_req_wline[0] = id_req_wline;
  assign id_req_ready   = a_req_ready[0];
  assign id_resp_valid  = a_resp_valid[0];
  assign id_resp_line   = a_resp_line;

  for (genvar c = 0; c < NUM_CORES; c++) begin : g_core
    mbc_core #(
      .L1_MBC_BYTES(L1_MBC_BYTES), .L1_MBC_WAYS(L1_MBC_WAYS), .L1_HIT_LAT(L1_HIT_LAT)
    ) u_core (
      .clk(clk), .rst_n(rst_n),
      .iss_valid(iss_valid[c]), .iss_ready(iss_ready[c]), .iss_op(iss_op[c]),
      .iss_a(iss_a[c]), .iss_b(iss_b[c]),
      .res_valid(res_valid[c]), .res_data(res_data[c]), .res_via_mbc(res_via_mbc[c]),
      .engage(engage[c]), .cfg_add(cfg_add[c]), .cfg_mul(cfg_mul[c]),
      .preload_start(preload_start[c]), .preload_busy(preload_busy[c]),
      .preload_lines(preload_lines[c]), .l1_way_mask(l1_way_mask[c]),
      .l2_req_valid(a_req_valid[c+1]), .l2_req_ready(a_req_ready[c+1]),
      .l2_req_addr(a_req_addr[c+1]),
      .l2_resp_valid(a_resp_valid[c+1]), .l2_resp_line(a_resp_line),
      .alu_ops(alu_ops[c]), .mbc_ops(mbc_ops[c]), .sup_ops(sup_ops[c]),
      .mbc_hits(mbc_hits[c]), .mbc_misses(mbc_misses[c])
    );
    assign a_req_we[c+1]    = 1'b0;
    assign a_req_wline[c+1] = '0;
  end

  logic              l2_req_valid, l2_req_ready, l2_req_we, l2_resp_valid;
  logic [ADDR_W-1:0] l2_req_addr;
  cls_e              l2_req_cls;
  logic [LINE_W-1:0] l2_req_wline, l2_resp_line;
  logic              l2_hit, l2_miss;

  l2_arbiter #(.N(NREQ)) u_arb (
    .clk(clk), .rst_n(rst_n),
    .req_valid(a_req_valid), .req_ready(a_req_ready), .req_addr(a_req_addr),
    .req_we(a_req_we), .req_wline(a_req_wline), .resp_valid(a_resp_valid), .resp_line(a_resp_line),
    .l2_req_valid(l2_req_valid), .l2_req_ready(l2_req_ready), .l2_req_addr(l2_req_addr),
    .l2_req_cls(l2_req_cls), .l2_req_we(l2_req_we), .l2_req_wline(l2_req_wline),
    .l2_resp_valid(l2_resp_valid), .l2_resp_line(l2_resp_line)
  );

  wp_cache #(.SIZE_BYTES(L2_BYTES), .WAYS(L2_WAYS), .HIT_LAT(L2_HIT_LAT)) u_l2 (
    .clk(clk), .rst_n(rst_n), .way_mask(l2_way_mask),
    .req_valid(l2_req_valid), .req_ready(l2_req_ready), .req_addr(l2_req_addr),
    .req_cls(l2_req_cls), .req_we(l2_req_we), .req_wline(l2_req_wline),
    .resp_valid(l2_resp_valid), .resp_line(l2_resp_line), .hit_pulse(l2_hit), .miss_pulse(l2_miss),
    .mem_req_valid(mem_req_valid), .mem_req_ready(mem_req_ready), .mem_req_addr(mem_req_addr),
    .mem_req_we(mem_req_we), .mem_req_wline(mem_req_wline),
    .mem_resp_valid(mem_resp_valid), .mem_resp_line(mem_resp_line)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l2_hits   <= '0;
      l2_misses <= '0;
    end else begin
      if (l2_hit)  l2_hits   <= l2_hits + 1;
      if (l2_miss) l2_misses <= l2_misses + 1;
    end
  end

endmodule
