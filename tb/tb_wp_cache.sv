// tb_wp_cache: directed and random test of the way-partitioned cache (small configuration:
// 1 KB, 4 ways, 8 sets, 2-cycle hits) in front of the main-memory model.
//  - read miss then read hit, data checked against the memory reference, hit latency = HIT_LAT;
//  - partitioning: with MUL owning ways 0-1 and ADD ways 2-3, three ADD lines of one set evict
//    the least recently used ADD line while both MUL lines of that set stay resident;
//  - a class with no ways is served without allocation (it misses again);
//  - write-through: a written line reads back and the memory saw the write;
//  - random mixed traffic compared with a reference memory image.
module tb_wp_cache;
  import pmbc_pkg::*;
  import tb_pkg::*;

  localparam int SIZE = 1024, WAYS = 4, HLAT = 2, MLAT = 6;
  localparam int SETS = SIZE / (LINE_BYTES * WAYS);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NUM_CLS-1:0][WAYS-1:0] way_mask;
  logic              req_valid, req_ready, req_we, resp_valid, hit_pulse, miss_pulse;
  logic [ADDR_W-1:0] req_addr;
  cls_e              req_cls;
  logic [LINE_W-1:0] req_wline, resp_line;
  logic              mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  logic [ADDR_W-1:0] mem_req_addr;
  logic [LINE_W-1:0] mem_req_wline, mem_resp_line;
  int                mem_reads, mem_writes;
  int checks = 0, failures = 0;

  wp_cache #(.SIZE_BYTES(SIZE), .WAYS(WAYS), .HIT_LAT(HLAT)) dut (.*);

  main_mem_model #(.LAT(MLAT)) u_mem (
    .clk(clk), .rst_n(rst_n), .req_valid(mem_req_valid), .req_ready(mem_req_ready),
    .req_addr(mem_req_addr), .req_we(mem_req_we), .req_wline(mem_req_wline),
    .resp_valid(mem_resp_valid), .resp_line(mem_resp_line), .reads(mem_reads), .writes(mem_writes)
  );

  logic [LINE_W-1:0] image [logic [ADDR_W-1:0]];

  function automatic logic [LINE_W-1:0] ref_line(input logic [ADDR_W-1:0] a);
    if (a >= MUL_LUT_BASE) return tb_lut_line(a);
    if (image.exists(a)) return image[a];
    return tb_fill_line(a);
  endfunction

  // one access; returns latency in cycles and whether the cache reported a hit
  task automatic access(input logic [ADDR_W-1:0] a, input cls_e c, input bit we,
                        input logic [LINE_W-1:0] wl, output int lat, output bit was_hit);
    @(negedge clk);
    req_valid = 1; req_addr = a; req_cls = c; req_we = we; req_wline = wl;
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req_valid = 0;
    lat = 1; was_hit = 0;
    while (!resp_valid && lat < 1000) begin
      @(negedge clk); lat++;
    end
    was_hit = hit_pulse;
    if (we) image[a] = wl;
    else begin
      checks++;
      if (resp_line !== ref_line(a)) begin
        failures++;
        $display("FAIL data at %h", a);
      end
    end
  endtask

  function automatic logic [ADDR_W-1:0] set_addr(input int set, input int tagv);
    return ADDR_W'((tagv * SETS + set) * LINE_BYTES);
  endfunction

  task automatic expect_hit(input logic [ADDR_W-1:0] a, input cls_e c, input bit exp_hit,
                            input string what);
    int lat; bit h;
    access(a, c, 0, '0, lat, h);
    checks++;
    if (h != exp_hit || (exp_hit && lat != HLAT)) begin
      failures++;
      $display("FAIL %s: addr %h hit=%0d (exp %0d) latency %0d", what, a, h, exp_hit, lat);
    end
  endtask

  initial begin
    int lat; bit h;
    req_valid = 0; req_addr = '0; req_cls = CLS_ID; req_we = 0; req_wline = '0;
    way_mask[CLS_ID]  = 4'b1111;
    way_mask[CLS_MUL] = 4'b0011;
    way_mask[CLS_ADD] = 4'b1100;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // miss then hit
    expect_hit(set_addr(1, 5), CLS_ID, 0, "cold miss");
    expect_hit(set_addr(1, 5), CLS_ID, 1, "hit after fill");

    // partitioning in set 3
    expect_hit(set_addr(3, 10), CLS_MUL, 0, "mul A miss");
    expect_hit(set_addr(3, 11), CLS_MUL, 0, "mul B miss");
    expect_hit(set_addr(3, 20), CLS_ADD, 0, "add A miss");
    expect_hit(set_addr(3, 21), CLS_ADD, 0, "add B miss");
    expect_hit(set_addr(3, 20), CLS_ADD, 1, "add A hit (now MRU)");
    expect_hit(set_addr(3, 22), CLS_ADD, 0, "add C miss evicts add B");
    expect_hit(set_addr(3, 10), CLS_MUL, 1, "mul A stays");
    expect_hit(set_addr(3, 11), CLS_MUL, 1, "mul B stays");
    expect_hit(set_addr(3, 20), CLS_ADD, 1, "add A stays (was MRU)");
    expect_hit(set_addr(3, 21), CLS_ADD, 0, "add B was the LRU victim");

    // class with no ways: no allocation
    way_mask[CLS_ID] = 4'b0000;
    expect_hit(set_addr(5, 30), CLS_ID, 0, "no-way class miss");
    expect_hit(set_addr(5, 30), CLS_ID, 0, "no-way class misses again");
    way_mask[CLS_ID] = 4'b1111;

    // write-through
    begin
      int wr0;
      logic [LINE_W-1:0] wl;
      wr0 = mem_writes;
      wl = {8{$urandom}};
      access(set_addr(1, 5), CLS_ID, 1, wl, lat, h);
      checks++;
      if (mem_writes != wr0 + 1) begin failures++; $display("FAIL write not forwarded"); end
      expect_hit(set_addr(1, 5), CLS_ID, 1, "written line still resident");
      access(set_addr(6, 40), CLS_ID, 1, ~wl, lat, h);    // write miss: no allocate
      expect_hit(set_addr(6, 40), CLS_ID, 0, "write miss did not allocate");
    end

    // random traffic over a small address pool, including the LUT regions
    repeat (3000) begin
      logic [ADDR_W-1:0] a;
      int r;
      r = $urandom % 3;
      if (r == 0)      a = set_addr($urandom % SETS, $urandom % 12);
      else if (r == 1) a = {MUL_LUT_BASE[ADDR_W-1:9], 4'($urandom), 5'd0};
      else             a = {ADD_LUT_BASE[ADDR_W-1:9], 4'($urandom), 5'd0};
      if (r == 0 && $urandom % 4 == 0) access(a, CLS_ID, 1, {8{$urandom}}, lat, h);
      else access(a, addr_class(a), 0, '0, lat, h);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
