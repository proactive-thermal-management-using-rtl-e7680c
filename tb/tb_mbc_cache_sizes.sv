// tb_mbc_cache_sizes: the four evaluated L1 MBC cache sizes (1, 2, 3 and 4 KB), each in its own
// execution slice with a memory model behind it (10-cycle latency, standing for the L2).
// For each size an add region that exactly fills the cache is preloaded with all ways given to the
// add class; then every operand pair of the region is issued and each must be a one-cycle L1 MBC
// hit with the right result (the region fits). On the 2 KB slice, the regions of two published
// decision functions are then run the same way: 0<=i<13, 7<j<11 (4 lines) must fit as well, and
// 0<=i<=20, 0<=j<=100 (156 lines) must not: it must miss, while every result stays correct.
module tb_mbc_cache_sizes;
  import pmbc_pkg::*;
  import tb_pkg::*;

  localparam int NS = 4;
  localparam int SIZE [NS] = '{1024, 2048, 3072, 4096};
  localparam int WAYS [NS] = '{4, 4, 3, 4};
  // regions filling each cache exactly, as {a, b, c, d}
  localparam int REG [NS][4] = '{'{0, 15, 0, 31}, '{0, 30, 0, 30}, '{0, 15, 0, 95}, '{0, 31, 0, 63}};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int done[NS];

  function automatic int tiles(input int lo, input int hi);
    return hi / 4 - lo / 4 + 1;
  endfunction

  for (genvar s = 0; s < NS; s++) begin : g_sz
    logic              iss_valid, iss_ready, res_valid, res_via_mbc, engage, preload_start, preload_busy;
    op_e               iss_op;
    logic [31:0]       iss_a, iss_b, res_data;
    dfunc_cfg_t        cfg_add, cfg_mul;
    logic [15:0]       preload_lines;
    logic [NUM_CLS-1:0][WAYS[s]-1:0] l1_way_mask;
    logic              l2_req_valid, l2_req_ready, l2_resp_valid;
    logic [ADDR_W-1:0] l2_req_addr;
    logic [LINE_W-1:0] l2_resp_line;
    logic [31:0]       alu_ops, mbc_ops, sup_ops, mbc_hits, mbc_misses;
    int                mem_reads, mem_writes;

    mbc_core #(.L1_MBC_BYTES(SIZE[s]), .L1_MBC_WAYS(WAYS[s])) u_core (.*);

    main_mem_model #(.LAT(10)) u_mem (
      .clk(clk), .rst_n(rst_n), .req_valid(l2_req_valid), .req_ready(l2_req_ready),
      .req_addr(l2_req_addr), .req_we(1'b0), .req_wline('0),
      .resp_valid(l2_resp_valid), .resp_line(l2_resp_line), .reads(mem_reads), .writes(mem_writes)
    );

    // preload region a..b x c..d, then issue every pair once; returns the misses it caused
    task automatic run_region(input int a, input int b, input int c, input int d,
                              input bit must_fit, input string what);
      int m0, slow;
      cfg_add = '{a: 8'(a), b: 8'(b), c: 8'(c), d: 8'(d), diag_en: 1'b0};
      @(negedge clk); preload_start = 1; @(negedge clk); preload_start = 0;
      @(negedge clk);
      while (preload_busy) @(negedge clk);
      checks++;
      if (preload_lines != 16'(tiles(a, b) * tiles(c, d))) begin
        failures++;
        $display("FAIL %0d B %s: preload %0d lines, expected %0d", SIZE[s], what, preload_lines,
                 tiles(a, b) * tiles(c, d));
      end
      @(negedge clk);
      m0 = int'(mbc_misses); slow = 0;
      for (int i = a; i <= b; i++) begin
        for (int j = c; j <= d; j++) begin
          int lat;
          iss_valid = 1; iss_op = OP_ADD; iss_a = i; iss_b = j;
          while (!iss_ready) @(negedge clk);
          @(negedge clk);
          iss_valid = 0;
          lat = 1;
          while (!res_valid && lat < 500) begin @(negedge clk); lat++; end
          checks++;
          if (!res_valid || !res_via_mbc || res_data !== 32'(i + j)) begin
            failures++;
            $display("FAIL %0d B %s: %0d+%0d -> %0d via_mbc=%0d", SIZE[s], what, i, j, res_data,
                     res_via_mbc);
          end
          if (lat != 1) slow++;
        end
      end
      @(negedge clk);
      checks++;
      if (must_fit && (int'(mbc_misses) != m0 || slow != 0)) begin
        failures++;
        $display("FAIL %0d B %s should fit: %0d misses, %0d slow", SIZE[s], what,
                 int'(mbc_misses) - m0, slow);
      end else if (!must_fit && int'(mbc_misses) == m0) begin
        failures++;
        $display("FAIL %0d B %s should not fit but never missed", SIZE[s], what);
      end
      $display("%0d B cache, %-28s %4d lines, %4d pairs, %4d misses", SIZE[s], what,
               tiles(a, b) * tiles(c, d), (b - a + 1) * (d - c + 1), int'(mbc_misses) - m0);
    endtask

    initial begin
      iss_valid = 0; iss_op = OP_ADD; iss_a = 0; iss_b = 0; engage = 1; preload_start = 0;
      cfg_mul = '{a: 8'd1, b: 8'd0, c: 8'd0, d: 8'd0, diag_en: 1'b0};   // empty region
      l1_way_mask = '0;
      l1_way_mask[CLS_ADD] = '1;
      wait (rst_n);
      run_region(REG[s][0], REG[s][1], REG[s][2], REG[s][3], 1, "region filling the cache");
      if (SIZE[s] == 2048) begin
        run_region(0, 12, 8, 10, 1, "0<=i<13, 7<j<11");
        run_region(0, 20, 0, 100, 0, "0<=i<=20, 0<=j<=100");
      end
      done[s] = 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done[0] && done[1] && done[2] && done[3]);
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
