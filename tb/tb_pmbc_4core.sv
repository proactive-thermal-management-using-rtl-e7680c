// tb_pmbc_4core: the system built with four cores (the 4-core task-set configuration), otherwise
// at default sizes. Each core gets its own decision regions and L1 partition, all four preload at
// once and then run random instruction streams side by side through the shared L2. Every result
// and routing decision is checked; every core must have both MBC hits and ALU operations, and the
// L2 must see cycles with three or more cores waiting.
module tb_pmbc_4core;
  import pmbc_pkg::*;
  import tb_pkg::*;

  localparam int NC = 4, L1W = 4, L2W = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NC-1:0]              iss_valid, iss_ready, res_valid, res_via_mbc, engage;
  logic [NC-1:0]              preload_start, preload_busy;
  op_e  [NC-1:0]              iss_op;
  logic [NC-1:0][31:0]        iss_a, iss_b, res_data;
  dfunc_cfg_t [NC-1:0]        cfg_add, cfg_mul;
  logic [NC-1:0][15:0]        preload_lines;
  logic [NC-1:0][NUM_CLS-1:0][L1W-1:0] l1_way_mask;
  logic [NC-1:0][31:0]        alu_ops, mbc_ops, sup_ops, mbc_hits, mbc_misses;
  logic                       id_req_valid, id_req_ready, id_req_we, id_resp_valid;
  logic [ADDR_W-1:0]          id_req_addr;
  logic [LINE_W-1:0]          id_req_wline, id_resp_line;
  logic [NUM_CLS-1:0][L2W-1:0] l2_way_mask;
  logic [31:0]                l2_hits, l2_misses;
  logic                       mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  logic [ADDR_W-1:0]          mem_req_addr;
  logic [LINE_W-1:0]          mem_req_wline, mem_resp_line;
  int                         mem_reads, mem_writes;

  pmbc_top #(.NUM_CORES(NC)) dut (.*);

  main_mem_model #(.LAT(100)) u_mem (
    .clk(clk), .rst_n(rst_n), .req_valid(mem_req_valid), .req_ready(mem_req_ready),
    .req_addr(mem_req_addr), .req_we(mem_req_we), .req_wline(mem_req_wline),
    .resp_valid(mem_resp_valid), .resp_line(mem_resp_line), .reads(mem_reads), .writes(mem_writes)
  );

  int checks = 0, failures = 0, n_busy3 = 0;
  int done[NC];

  function automatic bit in_region(input logic [31:0] ii, input logic [31:0] jj, input dfunc_cfg_t c);
    if (ii > 255 || jj > 255) return 0;
    return (c.diag_en && ii == jj) || (ii >= c.a && ii <= c.b && jj >= c.c && jj <= c.d);
  endfunction

  always @(posedge clk) if (rst_n && $countones(dut.a_req_valid) >= 3) n_busy3++;

  for (genvar c = 0; c < NC; c++) begin : g_drv
    initial begin
      iss_valid[c] = 0; iss_op[c] = OP_ADD; iss_a[c] = 0; iss_b[c] = 0;
      engage[c] = 1; preload_start[c] = 0;
      // region of core c: operand1 around 16*c, operand2 0..31; multiply 0..7 x 0..15
      cfg_add[c] = '{a: 8'(16 * c), b: 8'(16 * c + 11), c: 8'd0, d: 8'd31, diag_en: 1'(c % 2)};
      cfg_mul[c] = '{a: 8'd0, b: 8'd7, c: 8'd0, d: 8'd15, diag_en: 1'b0};
      l1_way_mask[c][CLS_ID] = '0; l1_way_mask[c][CLS_MUL] = 4'b0001; l1_way_mask[c][CLS_ADD] = 4'b1110;
      wait (rst_n);
      repeat (3) @(negedge clk);
      preload_start[c] = 1; @(negedge clk); preload_start[c] = 0;
      @(negedge clk);
      while (preload_busy[c]) @(negedge clk);
      repeat (800) begin
        logic [31:0] x, y;
        op_e o;
        bit exp_mbc;
        int lat;
        o = ($urandom % 4 == 0) ? OP_XOR : (($urandom % 2) ? OP_MUL : OP_ADD);
        x = ($urandom % 8 == 0) ? $urandom : 16 * c + $urandom % 16;
        y = ($urandom % 8 == 0) ? x : $urandom % 40;
        exp_mbc = (o == OP_ADD && in_region(x, y, cfg_add[c])) ||
                  (o == OP_MUL && in_region(x, y, cfg_mul[c]));
        @(negedge clk);
        iss_valid[c] = 1; iss_op[c] = o; iss_a[c] = x; iss_b[c] = y;
        while (!iss_ready[c]) @(negedge clk);
        @(negedge clk);
        iss_valid[c] = 0;
        lat = 1;
        while (!res_valid[c] && lat < 3000) begin @(negedge clk); lat++; end
        checks++;
        if (!res_valid[c] || res_via_mbc[c] !== exp_mbc ||
            res_data[c] !== (o == OP_ADD ? x + y : o == OP_MUL ? x * y : x ^ y)) begin
          failures++;
          $display("FAIL core %0d %s %0d,%0d -> %0d via_mbc=%0d", c, o.name(), x, y, res_data[c],
                   res_via_mbc[c]);
        end
      end
      done[c] = 1;
    end
  end

  initial begin
    id_req_valid = 0; id_req_we = 0; id_req_addr = '0; id_req_wline = '0;
    l2_way_mask[CLS_ID] = 16'h03FF; l2_way_mask[CLS_MUL] = 16'h0C00; l2_way_mask[CLS_ADD] = 16'hF000;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done[0] && done[1] && done[2] && done[3]);
    repeat (5) @(negedge clk);
    for (int c = 0; c < NC; c++) begin
      checks++;
      if (mbc_hits[c] == 0 || alu_ops[c] == 0) begin
        failures++; $display("FAIL core %0d: %0d MBC hits, %0d ALU ops", c, mbc_hits[c], alu_ops[c]);
      end
      $display("core %0d: alu %0d mbc %0d (hits %0d misses %0d) preload %0d lines", c, alu_ops[c],
               mbc_ops[c], mbc_hits[c], mbc_misses[c], preload_lines[c]);
    end
    checks++;
    if (n_busy3 == 0) begin failures++; $display("FAIL never three cores waiting for the L2"); end
    $display("cycles with >=3 L2 requesters waiting: %0d, L2 hits %0d misses %0d", n_busy3, l2_hits, l2_misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
