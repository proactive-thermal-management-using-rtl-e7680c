// mbc_core: the MBC-capable execution slice of one core.
//
// Instructions arrive from the core's issue stage. issue_steer decides, per instruction, whether
// it runs in the integer ALU or in memory: an add or multiply whose operand pair satisfies that
// operation's decision function goes to the MBC unit while proactive MBC is engaged, everything
// else to the ALU. The MBC unit reads the result from the private L1 MBC cache, which misses into
// the shared L2 through the l2_* port. The preloader fills the L1 MBC cache with the lines of the
// selected operand region on preload_start, so that the operations sent to MBC hit and take one
// cycle. This arrangement is the published proactive MBC flow; the in-order, one-at-a-time issue
// and the priority of the MBC unit over the preloader at the cache are this design's choices.
//
// Timing: one instruction in flight. iss_ready is low while an instruction is executing. An ALU
// instruction answers one cycle after issue. An MBC instruction answers one cycle after issue on
// an L1 MBC hit, and after the L2 (and possibly memory) latency on a miss. res_via_mbc tells
// which unit produced the result. alu_ops and mbc_ops count the instructions each unit executed,
// sup_ops the issued adds and multiplies (so mbc_ops / sup_ops is the decision function's
// achieved benefit), mbc_hits and mbc_misses the L1 MBC cache outcomes of the MBC unit's lookups.
module mbc_core
  import pmbc_pkg::*;
#(
  parameter int L1_MBC_BYTES = 2048,   // private MBC cache size (2 KB)
  parameter int L1_MBC_WAYS  = 4,
  parameter int L1_HIT_LAT   = 1       // one-cycle LUT access on a hit
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // issue side
  input  logic                              iss_valid,
  output logic                              iss_ready,
  input  op_e                               iss_op,
  input  logic [DATA_W-1:0]                 iss_a,
  input  logic [DATA_W-1:0]                 iss_b,
  output logic                              res_valid,
  output logic [DATA_W-1:0]                 res_data,
  output logic                              res_via_mbc,
  // proactive MBC control
  input  logic                              engage,
  input  dfunc_cfg_t                        cfg_add,
  input  dfunc_cfg_t                        cfg_mul,
  input  logic                              preload_start,
  output logic                              preload_busy,
  output logic [15:0]                       preload_lines,
  input  logic [NUM_CLS-1:0][L1_MBC_WAYS-1:0] l1_way_mask,
  // miss port towards the shared L2 (read only)
  output logic                              l2_req_valid,
  input  logic                              l2_req_ready,
  output logic [ADDR_W-1:0]                 l2_req_addr,
  input  logic                              l2_resp_valid,
  input  logic [LINE_W-1:0]                 l2_resp_line,
  // activity counters
  output logic [31:0]                       alu_ops,
  output logic [31:0]                       mbc_ops,
  output logic [31:0]                       sup_ops,
  output logic [31:0]                       mbc_hits,
  output logic [31:0]                       mbc_misses
);

  // ---------------- steering ----------------
  logic supported, to_mbc, is_mul;

  issue_steer u_steer (
    .op(iss_op), .opnd_a(iss_a), .opnd_b(iss_b), .engage(engage),
    .cfg_add(cfg_add), .cfg_mul(cfg_mul),
    .supported(supported), .to_mbc(to_mbc), .is_mul(is_mul)
  );

  logic busy_q;
  logic mbc_in_ready;
  logic alu_in_valid, mbc_in_valid;
  logic alu_out_valid, mbc_out_valid;
  logic [DATA_W-1:0] alu_result, mbc_result;

  always_comb begin
    iss_ready    = !busy_q && (!to_mbc || mbc_in_ready);
    alu_in_valid = iss_valid && !busy_q && !to_mbc;
    mbc_in_valid = iss_valid && !busy_q && to_mbc;
    res_valid    = alu_out_valid || mbc_out_valid;
    res_data     = mbc_out_valid ? mbc_result : alu_result;
    res_via_mbc  = mbc_out_valid;
  end

  int_alu u_alu (
    .clk(clk), .rst_n(rst_n), .in_valid(alu_in_valid), .op(iss_op), .a(iss_a), .b(iss_b),
    .out_valid(alu_out_valid), .result(alu_result)
  );

  // ---------------- MBC unit and preloader share the L1 MBC cache ----------------
  logic              mu_req_valid, pl_req_valid;
  logic [ADDR_W-1:0] mu_req_addr, pl_req_addr;
  cls_e              mu_req_cls, pl_req_cls;
  logic              c_req_valid, c_req_ready;
  logic [ADDR_W-1:0] c_req_addr;
  cls_e              c_req_cls;
  logic              c_resp_valid;
  logic [LINE_W-1:0] c_resp_line;
  logic              c_hit, c_miss;
  logic              owner_mu_q;     // outstanding cache request belongs to the MBC unit

  mbc_unit u_mbc (
    .clk(clk), .rst_n(rst_n),
    .in_valid(mbc_in_valid), .in_ready(mbc_in_ready), .in_is_mul(is_mul),
    .in_i(iss_a[OPND_W-1:0]), .in_j(iss_b[OPND_W-1:0]),
    .out_valid(mbc_out_valid), .out_result(mbc_result),
    .c_req_valid(mu_req_valid), .c_req_ready(c_req_ready), .c_req_addr(mu_req_addr),
    .c_req_cls(mu_req_cls), .c_resp_valid(c_resp_valid && owner_mu_q), .c_resp_line(c_resp_line)
  );

  mbc_preloader u_pre (
    .clk(clk), .rst_n(rst_n), .start(preload_start), .cfg_add(cfg_add), .cfg_mul(cfg_mul),
    .busy(preload_busy), .lines(preload_lines),
    .c_req_valid(pl_req_valid), .c_req_ready(c_req_ready && !mu_req_valid),
    .c_req_addr(pl_req_addr), .c_req_cls(pl_req_cls), .c_resp_valid(c_resp_valid && !owner_mu_q)
  );

  always_comb begin
    c_req_valid = mu_req_valid || pl_req_valid;
    c_req_addr  = mu_req_valid ? mu_req_addr : pl_req_addr;
    c_req_cls   = mu_req_valid ? mu_req_cls  : pl_req_cls;
  end

  logic unused_we;
  logic [LINE_W-1:0] unused_wline;

  wp_cache #(.SIZE_BYTES(L1_MBC_BYTES), .WAYS(L1_MBC_WAYS), .HIT_LAT(L1_HIT_LAT)) u_l1mbc (
    .clk(clk), .rst_n(rst_n), .way_mask(l1_way_mask),
    .req_valid(c_req_valid), .req_ready(c_req_ready), .req_addr(c_req_addr), .req_cls(c_req_cls),
    .req_we(1'b0), .req_wline('0),
    .resp_valid(c_resp_valid), .resp_line(c_resp_line), .hit_pulse(c_hit), .miss_pulse(c_miss),
    .mem_req_valid(l2_req_valid), .mem_req_ready(l2_req_ready), .mem_req_addr(l2_req_addr),
    .mem_req_we(unused_we), .mem_req_wline(unused_wline),
    .mem_resp_valid(l2_resp_valid), .mem_resp_line(l2_resp_line)
  );

  // ---------------- bookkeeping ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q     <= 1'b0;
      owner_mu_q <= 1'b0;
      alu_ops    <= '0;
      mbc_ops    <= '0;
      sup_ops    <= '0;
      mbc_hits   <= '0;
      mbc_misses <= '0;
    end else begin
      if (iss_valid && iss_ready) busy_q <= 1'b1;
      else if (res_valid)         busy_q <= 1'b0;
      if (c_req_valid && c_req_ready) owner_mu_q <= mu_req_valid;
      if (alu_in_valid)               alu_ops    <= alu_ops + 1;
      if (mbc_in_valid && mbc_in_ready) mbc_ops  <= mbc_ops + 1;
      if (iss_valid && iss_ready && supported) sup_ops <= sup_ops + 1;
      if (c_hit && owner_mu_q)        mbc_hits   <= mbc_hits + 1;
      if (c_miss && owner_mu_q)       mbc_misses <= mbc_misses + 1;
    end
  end

  // a result only comes back for an instruction in flight
  assert property (@(posedge clk) disable iff (!rst_n) res_valid |-> busy_q);

endmodule
