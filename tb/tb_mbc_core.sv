// tb_mbc_core: one execution slice with its L2 port served by the memory model (10-cycle
// latency). Phase 1 preloads the decision regions and then issues adds and multiplies inside the
// regions mixed with other operations: every MBC operation must hit the L1 MBC cache and answer
// in one cycle, as must every ALU operation. Phase 2 issues random operations (operands outside
// the regions, on the diagonal, wide operands, engage toggling) and checks every result and the
// unit that produced it against a reference model of the steering rule.
module tb_mbc_core;
  import pmbc_pkg::*;
  import tb_pkg::*;

  localparam int L1W = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              iss_valid, iss_ready, res_valid, res_via_mbc, engage, preload_start, preload_busy;
  op_e               iss_op;
  logic [31:0]       iss_a, iss_b, res_data;
  dfunc_cfg_t        cfg_add, cfg_mul;
  logic [15:0]       preload_lines;
  logic [NUM_CLS-1:0][L1W-1:0] l1_way_mask;
  logic              l2_req_valid, l2_req_ready, l2_resp_valid;
  logic [ADDR_W-1:0] l2_req_addr;
  logic [LINE_W-1:0] l2_resp_line;
  logic [31:0]       alu_ops, mbc_ops, sup_ops, mbc_hits, mbc_misses;
  int                mem_reads, mem_writes;
  int checks = 0, failures = 0;

  mbc_core dut (.*);

  main_mem_model #(.LAT(10)) u_mem (
    .clk(clk), .rst_n(rst_n), .req_valid(l2_req_valid), .req_ready(l2_req_ready),
    .req_addr(l2_req_addr), .req_we(1'b0), .req_wline('0),
    .resp_valid(l2_resp_valid), .resp_line(l2_resp_line), .reads(mem_reads), .writes(mem_writes)
  );

  function automatic bit in_region(input logic [31:0] ii, input logic [31:0] jj, input dfunc_cfg_t c);
    if (ii > 255 || jj > 255) return 0;
    return (c.diag_en && ii == jj) || (ii >= c.a && ii <= c.b && jj >= c.c && jj <= c.d);
  endfunction

  function automatic logic [31:0] ref_op(input op_e o, input logic [31:0] x, input logic [31:0] y);
    case (o)
      OP_ADD: return x + y;
      OP_SUB: return x - y;
      OP_MUL: return x * y;
      OP_AND: return x & y;
      OP_OR:  return x | y;
      default: return x ^ y;
    endcase
  endfunction

  task automatic issue(input op_e o, input logic [31:0] x, input logic [31:0] y, output int lat);
    bit exp_mbc;
    exp_mbc = engage && ((o == OP_ADD && in_region(x, y, cfg_add)) ||
                         (o == OP_MUL && in_region(x, y, cfg_mul)));
    @(negedge clk);
    iss_valid = 1; iss_op = o; iss_a = x; iss_b = y;
    while (!iss_ready) @(negedge clk);
    @(negedge clk);
    iss_valid = 0;
    lat = 1;
    while (!res_valid && lat < 500) begin @(negedge clk); lat++; end
    checks++;
    if (!res_valid || res_data !== ref_op(o, x, y) || res_via_mbc !== exp_mbc) begin
      failures++;
      $display("FAIL %s %0d,%0d -> %0d via_mbc=%0d, expected %0d via_mbc=%0d", o.name(), x, y,
               res_data, res_via_mbc, ref_op(o, x, y), exp_mbc);
    end
  endtask

  initial begin
    int lat, n_mbc1, n_alu1, t0;
    iss_valid = 0; iss_op = OP_ADD; iss_a = 0; iss_b = 0; engage = 0; preload_start = 0;
    cfg_add = '{a: 8'd12, b: 8'd20, c: 8'd0, d: 8'd31, diag_en: 1'b1};
    cfg_mul = '{a: 8'd0,  b: 8'd7,  c: 8'd0, d: 8'd15, diag_en: 1'b0};
    l1_way_mask[CLS_ID]  = 4'b0000;
    l1_way_mask[CLS_MUL] = 4'b0011;
    l1_way_mask[CLS_ADD] = 4'b1100;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // preload both regions
    @(negedge clk); preload_start = 1; @(negedge clk); preload_start = 0;
    t0 = 0;
    while (preload_busy && t0 < 10000) begin @(negedge clk); t0++; end
    checks++;
    if (preload_lines != 16'(2 * 4 + 3 * 8)) begin
      failures++; $display("FAIL preload read %0d lines, expected 32", preload_lines);
    end

    // phase 1: in-region MBC operations all hit and take one cycle
    engage = 1;
    n_mbc1 = 0; n_alu1 = 0;
    repeat (600) begin
      int k;
      k = $urandom % 3;
      if (k == 0) issue(OP_ADD, 12 + $urandom % 9, $urandom % 32, lat);
      else if (k == 1) issue(OP_MUL, $urandom % 8, $urandom % 16, lat);
      else issue(op_e'($urandom % 6), 1000 + $urandom % 100, $urandom, lat);
      checks++;
      if (lat != 1) begin failures++; $display("FAIL phase 1 latency %0d", lat); end
      if (res_via_mbc) n_mbc1++; else n_alu1++;
    end
    @(negedge clk);
    checks++;
    if (mbc_misses != 0 || mbc_hits != 32'(n_mbc1) || n_mbc1 < 300) begin
      failures++;
      $display("FAIL phase 1: %0d MBC ops, %0d hits, %0d misses", n_mbc1, mbc_hits, mbc_misses);
    end

    // phase 2: random traffic
    repeat (3000) begin
      logic [31:0] x, y;
      int k;
      if ($urandom % 50 == 0) engage = !engage;
      k = $urandom % 4;
      x = (k == 0) ? $urandom : $urandom % 40;
      y = (k == 1) ? x : (k == 0 ? $urandom : $urandom % 40);
      issue(op_e'($urandom % 6), x, y, lat);
    end
    checks++;
    if (mbc_misses == 0 || alu_ops == 0 || mbc_ops == 0 || sup_ops <= mbc_ops) begin
      failures++; $display("FAIL phase 2 counters: misses %0d alu %0d mbc %0d sup %0d", mbc_misses,
                           alu_ops, mbc_ops, sup_ops);
    end
    $display("alu_ops=%0d mbc_ops=%0d sup_ops=%0d hits=%0d misses=%0d", alu_ops, mbc_ops, sup_ops,
             mbc_hits, mbc_misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
