// tb_mbc_preloader: starts preloads for random regions and checks the exact sequence of LUT line
// reads (multiply region first, then add, tile row by tile row) against a list built from the
// region bounds, and that an empty region issues nothing. The cache is modelled by a responder
// with a random delay.
module tb_mbc_preloader;
  import pmbc_pkg::*;
  import tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              start, busy, c_req_valid, c_req_ready, c_resp_valid;
  dfunc_cfg_t        cfg_add, cfg_mul;
  logic [15:0]       lines;
  logic [ADDR_W-1:0] c_req_addr;
  cls_e              c_req_cls;
  int checks = 0, failures = 0;

  mbc_preloader dut (.*);

  logic [ADDR_W-1:0] seen[$];
  cls_e              seen_cls[$];
  int                cnt;
  logic              pend;
  assign c_req_ready = !pend;
  always_ff @(posedge clk) begin
    c_resp_valid <= 1'b0;
    if (!rst_n) pend <= 1'b0;
    else if (!pend && c_req_valid) begin
      seen.push_back(c_req_addr);
      seen_cls.push_back(c_req_cls);
      pend <= 1'b1;
      cnt  <= $urandom % 4;
    end else if (pend) begin
      if (cnt == 0) begin c_resp_valid <= 1'b1; pend <= 1'b0; end
      else cnt <= cnt - 1;
    end
  end

  task automatic expect_region(input bit is_mul, input dfunc_cfg_t c,
                               ref logic [ADDR_W-1:0] exp[$]);
    if (c.a > c.b || c.c > c.d) return;
    for (int it = c.a / 4; it <= c.b / 4; it++)
      for (int jt = c.c / 4; jt <= c.d / 4; jt++)
        exp.push_back(tb_ref_addr(is_mul, 8'(it * 4), 8'(jt * 4)));
  endtask

  initial begin
    start = 0; cfg_add = '0; cfg_mul = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      logic [ADDR_W-1:0] exp[$];
      int n;
      exp.delete();
      // small random regions; some empty
      cfg_mul.a = 8'($urandom % 256); cfg_mul.b = cfg_mul.a + 8'($urandom % 24) - ((t % 7 == 0) ? 8'd30 : 8'd0);
      cfg_mul.c = 8'($urandom % 256); cfg_mul.d = cfg_mul.c + 8'($urandom % 24);
      cfg_add.a = 8'($urandom % 256); cfg_add.b = cfg_add.a + 8'($urandom % 24);
      cfg_add.c = 8'($urandom % 256); cfg_add.d = cfg_add.c + 8'($urandom % 24) - ((t % 5 == 0) ? 8'd40 : 8'd0);
      if (cfg_mul.b < cfg_mul.a && t % 7 != 0) cfg_mul.b = 8'd255;
      if (cfg_mul.d < cfg_mul.c) cfg_mul.d = 8'd255;
      if (cfg_add.b < cfg_add.a) cfg_add.b = 8'd255;
      if (cfg_add.d < cfg_add.c && t % 5 != 0) cfg_add.d = 8'd255;
      expect_region(1, cfg_mul, exp);
      expect_region(0, cfg_add, exp);
      seen.delete(); seen_cls.delete();
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      n = 0;
      while (busy && n < 100000) begin @(negedge clk); n++; end
      checks++;
      if (seen.size() != exp.size() || lines != 16'(exp.size())) begin
        failures++;
        $display("FAIL run %0d: %0d reads (lines=%0d), expected %0d", t, seen.size(), lines, exp.size());
      end else begin
        foreach (exp[k]) begin
          checks++;
          if (seen[k] !== exp[k] || seen_cls[k] !== addr_class(exp[k])) begin
            failures++;
            $display("FAIL run %0d read %0d: %h expected %h", t, k, seen[k], exp[k]);
          end
        end
      end
    end
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
