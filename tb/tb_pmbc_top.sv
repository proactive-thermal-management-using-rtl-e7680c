// tb_pmbc_top: end-to-end test of the two-core proactive MBC system at its default size
// (2 cores, 2 KB 4-way L1 MBC caches, 128 KB 16-way L2 with 10-cycle hits, 100-cycle memory).
//
// The L2 is partitioned 10/2/4 ways (inst/data, MBC multiply, MBC add). Core 0 gets an operand
// profile concentrated at operand1 = 12..20 plus the diagonal; core 1 one along operand2 = 41 plus
// the diagonal, and a multiply region larger than its one-way multiply partition. Both cores
// preload at the same time, then run random instruction streams while the inst/data port reads
// and writes lines. Every result, the unit that produced it and every inst/data read are checked
// against reference models; after the preload, core 0's in-region operations must take one cycle.
// Each mechanism (preload, L1 MBC hit and miss, L2 hit and miss, arbitration conflict, routing of
// unsupported, out-of-region and disengaged operations, diagonal selection, write-through) is
// counted and must occur.
module tb_pmbc_top;
  import pmbc_pkg::*;
  import tb_pkg::*;

  localparam int NC = 2, L1W = 4, L2W = 16;
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

  pmbc_top dut (.*);

  main_mem_model #(.LAT(100)) u_mem (
    .clk(clk), .rst_n(rst_n), .req_valid(mem_req_valid), .req_ready(mem_req_ready),
    .req_addr(mem_req_addr), .req_we(mem_req_we), .req_wline(mem_req_wline),
    .resp_valid(mem_resp_valid), .resp_line(mem_resp_line), .reads(mem_reads), .writes(mem_writes)
  );

  int checks = 0, failures = 0;
  // mechanism counters
  int n_unsup_alu = 0, n_out_alu = 0, n_diseng_alu = 0, n_diag_mbc = 0, n_conflict = 0;
  int n_id_reads = 0, n_id_writes = 0;
  int done[NC];

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

  // two or more L2 requesters waiting in the same cycle
  always @(posedge clk) if (rst_n && $countones(dut.a_req_valid) > 1) n_conflict++;

  for (genvar c = 0; c < NC; c++) begin : g_drv
    task automatic issue(input op_e o, input logic [31:0] x, input logic [31:0] y, output int lat);
      bit exp_mbc, box;
      dfunc_cfg_t cf;
      cf = (o == OP_MUL) ? cfg_mul[c] : cfg_add[c];
      exp_mbc = engage[c] && (o == OP_ADD || o == OP_MUL) && in_region(x, y, cf);
      box = x <= 255 && y <= 255 && x >= cf.a && x <= cf.b && y >= cf.c && y <= cf.d;
      if (!(o == OP_ADD || o == OP_MUL)) n_unsup_alu++;
      else if (!engage[c] && in_region(x, y, cf)) n_diseng_alu++;
      else if (!exp_mbc) n_out_alu++;
      else if (!box) n_diag_mbc++;
      @(negedge clk);
      iss_valid[c] = 1; iss_op[c] = o; iss_a[c] = x; iss_b[c] = y;
      while (!iss_ready[c]) @(negedge clk);
      @(negedge clk);
      iss_valid[c] = 0;
      lat = 1;
      while (!res_valid[c] && lat < 2000) begin @(negedge clk); lat++; end
      checks++;
      if (!res_valid[c] || res_data[c] !== ref_op(o, x, y) || res_via_mbc[c] !== exp_mbc) begin
        failures++;
        $display("FAIL core %0d %s %0d,%0d -> %0d via_mbc=%0d, expected %0d via_mbc=%0d", c,
                 o.name(), x, y, res_data[c], res_via_mbc[c], ref_op(o, x, y), exp_mbc);
      end
    endtask

    initial begin
      int lat;
      iss_valid[c] = 0; iss_op[c] = OP_ADD; iss_a[c] = 0; iss_b[c] = 0;
      engage[c] = 0; preload_start[c] = 0;
      wait (rst_n);
      repeat (5) @(negedge clk);
      preload_start[c] = 1; @(negedge clk); preload_start[c] = 0;
      @(negedge clk);
      while (preload_busy[c]) @(negedge clk);
      engage[c] = 1;
      if (c == 0) begin
        // in-region operations right after the preload: one-cycle L1 MBC hits
        repeat (200) begin
          if ($urandom % 2) issue(OP_ADD, 12 + $urandom % 9, $urandom % 32, lat);
          else              issue(OP_MUL, $urandom % 8, $urandom % 16, lat);
          checks++;
          if (lat != 1) begin failures++; $display("FAIL core 0 in-region latency %0d", lat); end
        end
      end
      repeat (1500) begin
        logic [31:0] x, y;
        int k;
        if ($urandom % 100 == 0) engage[c] = !engage[c];
        k = $urandom % 6;
        if (c == 0) begin
          x = (k == 0) ? $urandom : 8 + $urandom % 20;
          y = (k == 1) ? x : ((k == 0) ? $urandom : $urandom % 40);
        end else begin
          x = (k == 0) ? $urandom : $urandom % 64;
          y = (k == 1) ? x : ((k < 4) ? 41 : $urandom % 256);
        end
        issue(($urandom % 5 == 0) ? op_e'(1 + 2 * ($urandom % 2) + ($urandom % 2)) :
              (($urandom % 2) ? OP_MUL : OP_ADD), x, y, lat);
      end
      done[c] = 1;
    end
  end

  // inst/data port traffic
  logic [LINE_W-1:0] image [logic [ADDR_W-1:0]];
  initial begin
    id_req_valid = 0; id_req_we = 0; id_req_addr = '0; id_req_wline = '0;
    wait (rst_n);
    while (!(done[0] && done[1])) begin
      logic [ADDR_W-1:0] a;
      bit we;
      repeat ($urandom % 50) @(negedge clk);
      a  = ADDR_W'(($urandom % 2048) * LINE_BYTES);
      we = ($urandom % 3 == 0);
      @(negedge clk);
      id_req_valid = 1; id_req_addr = a; id_req_we = we; id_req_wline = {8{$urandom}};
      while (!id_req_ready) @(negedge clk);
      @(negedge clk);
      id_req_valid = 0;
      while (!id_resp_valid) @(negedge clk);
      if (we) begin
        image[a] = id_req_wline;
        n_id_writes++;
      end else begin
        checks++;
        n_id_reads++;
        if (id_resp_line !== (image.exists(a) ? image[a] : tb_fill_line(a))) begin
          failures++; $display("FAIL inst/data read %h", a);
        end
      end
    end
  end

  task automatic need(input string what, input longint n);
    checks++;
    $display("  %-34s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  initial begin
    for (int c = 0; c < NC; c++) begin
      cfg_add[c] = '0; cfg_mul[c] = '0;
    end
    cfg_add[0] = '{a: 8'd12, b: 8'd20, c: 8'd0,  d: 8'd31, diag_en: 1'b1};
    cfg_mul[0] = '{a: 8'd0,  b: 8'd7,  c: 8'd0,  d: 8'd15, diag_en: 1'b0};
    cfg_add[1] = '{a: 8'd0,  b: 8'd63, c: 8'd41, d: 8'd41, diag_en: 1'b1};
    cfg_mul[1] = '{a: 8'd0,  b: 8'd3,  c: 8'd0,  d: 8'd255, diag_en: 1'b0};
    l1_way_mask[0][CLS_ID] = '0; l1_way_mask[0][CLS_MUL] = 4'b0011; l1_way_mask[0][CLS_ADD] = 4'b1100;
    l1_way_mask[1][CLS_ID] = '0; l1_way_mask[1][CLS_MUL] = 4'b0001; l1_way_mask[1][CLS_ADD] = 4'b1110;
    l2_way_mask[CLS_ID]  = 16'h03FF;
    l2_way_mask[CLS_MUL] = 16'h0C00;
    l2_way_mask[CLS_ADD] = 16'hF000;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done[0] && done[1]);
    repeat (300) @(negedge clk);
    $display("mechanisms:");
    need("core 0 preload lines", preload_lines[0]);
    need("core 1 preload lines", preload_lines[1]);
    for (int c = 0; c < NC; c++) begin
      need($sformatf("core %0d L1 MBC hits", c), mbc_hits[c]);
      need($sformatf("core %0d L1 MBC misses", c), mbc_misses[c]);
      need($sformatf("core %0d MBC operations", c), mbc_ops[c]);
    end
    need("L2 hits", l2_hits);
    need("L2 misses", l2_misses);
    need("L2 arbitration conflicts (cycles)", n_conflict);
    need("unsupported op -> ALU", n_unsup_alu);
    need("out-of-region add/mul -> ALU", n_out_alu);
    need("disengaged in-region -> ALU", n_diseng_alu);
    need("diagonal-only operand pair -> MBC", n_diag_mbc);
    need("inst/data reads", n_id_reads);
    need("inst/data writes (write-through)", mem_writes);
    $display("benefit core0 %0d/%0d core1 %0d/%0d", mbc_ops[0], sup_ops[0], mbc_ops[1], sup_ops[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
