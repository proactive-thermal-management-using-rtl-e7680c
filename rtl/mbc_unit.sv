// mbc_unit: memory-based computing unit of one core.
//
// Instead of computing an add or multiply, it uses the operand pair to form the byte address of
// the entry in the operation's lookup table (LUT), reads the line holding that entry through the
// core's L1 MBC cache, and returns the 16-bit entry, zero-extended, as the 32-bit result. Forming
// the effective address from the operands and reading the result from cached LUTs follows the
// published scheme; the LUT layout (see pmbc_pkg) and the handshake are this design's choices.
// The unit handles 8-bit operand pairs, which is exactly what the decision function lets through.
//
// Timing: the request passes straight to the cache in the cycle in_valid is high (in_ready is
// the cache's req_ready), so with a 1-cycle L1 hit the result appears the next cycle. One
// operation is in flight at a time; out_valid is high for one cycle when the cache answers.
module mbc_unit
  import pmbc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // operation side
  input  logic              in_valid,
  output logic              in_ready,
  input  logic              in_is_mul,
  input  logic [OPND_W-1:0] in_i,       // operand1: LUT row
  input  logic [OPND_W-1:0] in_j,       // operand2: LUT column
  output logic              out_valid,
  output logic [DATA_W-1:0] out_result,
  // L1 MBC cache side
  output logic              c_req_valid,
  input  logic              c_req_ready,
  output logic [ADDR_W-1:0] c_req_addr,
  output cls_e              c_req_cls,
  input  logic              c_resp_valid,
  input  logic [LINE_W-1:0] c_resp_line
);

  localparam int IDX_W = $clog2(ENTRIES_PER_LINE);

  logic              busy_q;
  logic [IDX_W-1:0]  idx_q;     // entry position inside the returned line

  always_comb begin
    in_ready    = !busy_q && c_req_ready;
    c_req_valid = !busy_q && in_valid;
    c_req_addr  = lut_addr(in_is_mul, in_i, in_j);
    c_req_cls   = in_is_mul ? CLS_MUL : CLS_ADD;
    out_valid   = busy_q && c_resp_valid;
    out_result  = DATA_W'(c_resp_line[int'(idx_q) * ENTRY_W +: ENTRY_W]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      idx_q  <= '0;
    end else if (!busy_q) begin
      if (in_valid && c_req_ready) begin
        busy_q <= 1'b1;
        idx_q  <= lut_entry_idx(in_i, in_j);
      end
    end else if (c_resp_valid) begin
      busy_q <= 1'b0;
    end
  end

endmodule
