// mbc_preloader: fills the L1 MBC cache with the LUT lines of the decision-function region.
//
// Proactive MBC only sends an operation to memory when its operands lie in the region selected
// by the decision function, and the results for that region are preloaded into the MBC cache so
// that these accesses hit. On a start pulse this block walks the multiply region and then the add
// region: it reads every LUT line (one 4x4 tile of operand pairs, see pmbc_pkg) that holds a pair
// with a <= i <= b and c <= j <= d, row of tiles by row of tiles. Each read is an ordinary cache read,
// so the cache allocates the line in that operation's partition. The diagonal term of the decision
// function is not preloaded (its lines are fetched on demand). Preloading the selected region
// follows the published idea; the walk order and the handshake are this design's choices.
//
// Timing: one read in flight; the next read is issued in the cycle after the previous answer.
// busy is high from the cycle after start until the last answer. An empty region (a > b or
// c > d) is skipped. lines counts the reads of the last run.
module mbc_preloader
  import pmbc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  dfunc_cfg_t        cfg_add,
  input  dfunc_cfg_t        cfg_mul,
  output logic              busy,
  output logic [15:0]       lines,
  // cache side
  output logic              c_req_valid,
  input  logic              c_req_ready,
  output logic [ADDR_W-1:0] c_req_addr,
  output cls_e              c_req_cls,
  input  logic              c_resp_valid
);

  localparam int T_W = OPND_W - TILE_W;   // tile index along one operand

  typedef enum logic [1:0] {P_IDLE, P_SETUP, P_REQ, P_WAIT} pstate_e;

  pstate_e            state_q;
  logic               mul_q;          // 1: walking the multiply region
  logic [T_W-1:0]     it_q;           // tile row (operand1 / 4)
  logic [T_W-1:0]     jt_q;           // tile column (operand2 / 4)
  dfunc_cfg_t         cfg;
  logic [T_W-1:0]     it_first, it_last, jt_first, jt_last;

  always_comb begin
    cfg         = mul_q ? cfg_mul : cfg_add;
    it_first    = cfg.a[OPND_W-1 -: T_W];
    it_last     = cfg.b[OPND_W-1 -: T_W];
    jt_first    = cfg.c[OPND_W-1 -: T_W];
    jt_last     = cfg.d[OPND_W-1 -: T_W];
    busy        = (state_q != P_IDLE);
    c_req_valid = (state_q == P_REQ);
    c_req_addr  = lut_addr(mul_q, {it_q, {TILE_W{1'b0}}}, {jt_q, {TILE_W{1'b0}}});
    c_req_cls   = mul_q ? CLS_MUL : CLS_ADD;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= P_IDLE;
      mul_q   <= 1'b1;
      it_q    <= '0;
      jt_q    <= '0;
      lines   <= '0;
    end else begin
      unique case (state_q)
        P_IDLE: if (start) begin
          mul_q   <= 1'b1;
          lines   <= '0;
          state_q <= P_SETUP;
        end
        P_SETUP: begin                       // start the walk of the current region
          it_q <= it_first;
          jt_q <= jt_first;
          if (cfg.a <= cfg.b && cfg.c <= cfg.d) state_q <= P_REQ;
          else if (mul_q) mul_q <= 1'b0;     // empty multiply region: go on with add
          else state_q <= P_IDLE;
        end
        P_REQ: if (c_req_ready) begin
          state_q <= P_WAIT;
          lines   <= lines + 1'b1;
        end
        P_WAIT: if (c_resp_valid) begin
          if (jt_q != jt_last) begin
            jt_q    <= jt_q + 1'b1;
            state_q <= P_REQ;
          end else if (it_q != it_last) begin
            it_q    <= it_q + 1'b1;
            jt_q    <= jt_first;
            state_q <= P_REQ;
          end else if (mul_q) begin
            mul_q   <= 1'b0;
            state_q <= P_SETUP;
          end else begin
            state_q <= P_IDLE;
          end
        end
        default: state_q <= P_IDLE;
      endcase
    end
  end

endmodule
