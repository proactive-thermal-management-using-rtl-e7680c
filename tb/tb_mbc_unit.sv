// tb_mbc_unit: drives random 8-bit add and multiply operations into the MBC unit, answers its
// cache reads from a reference LUT after a random delay, and checks the address it forms, the
// partition class, the returned result and that the result arrives in the cycle of the answer
// (one cycle after issue when the cache answers at once, as an L1 hit does).
module tb_mbc_unit;
  import pmbc_pkg::*;
  import tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              in_valid, in_ready, in_is_mul, out_valid;
  logic [7:0]        in_i, in_j;
  logic [31:0]       out_result;
  logic              c_req_valid, c_req_ready, c_resp_valid;
  logic [ADDR_W-1:0] c_req_addr;
  cls_e              c_req_cls;
  logic [LINE_W-1:0] c_resp_line;
  int checks = 0, failures = 0;

  mbc_unit dut (.*);

  // cache model: accepts when idle, answers after 'delay' cycles
  int                delay, wait_cnt;
  logic              pend;
  logic [ADDR_W-1:0] pend_addr;
  assign c_req_ready = !pend;
  always_ff @(posedge clk) begin
    c_resp_valid <= 1'b0;
    if (!rst_n) begin
      pend <= 1'b0;
    end else if (!pend && c_req_valid) begin
      pend      <= 1'b1;
      pend_addr <= c_req_addr;
      wait_cnt  <= delay;
      if (delay == 0) begin
        c_resp_valid <= 1'b1;
        c_resp_line  <= tb_lut_line({c_req_addr[ADDR_W-1:OFFS_W], 5'd0});
        pend         <= 1'b0;
      end
    end else if (pend) begin
      if (wait_cnt <= 1) begin
        c_resp_valid <= 1'b1;
        c_resp_line  <= tb_lut_line({pend_addr[ADDR_W-1:OFFS_W], 5'd0});
        pend         <= 1'b0;
      end else wait_cnt <= wait_cnt - 1;
    end
  end

  initial begin
    in_valid = 0; in_is_mul = 0; in_i = 0; in_j = 0; delay = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3000) begin
      logic [31:0] exp;
      int          lat;
      @(negedge clk);
      in_is_mul = 1'($urandom); in_i = 8'($urandom); in_j = 8'($urandom);
      delay     = ($urandom % 3 == 0) ? 0 : $urandom % 12;
      in_valid  = 1;
      exp = in_is_mul ? 32'(in_i) * 32'(in_j) : 32'(in_i) + 32'(in_j);
      #1;
      checks++;
      if (!c_req_valid || c_req_addr !== tb_ref_addr(in_is_mul, in_i, in_j) ||
          c_req_cls !== (in_is_mul ? CLS_MUL : CLS_ADD)) begin
        failures++;
        $display("FAIL address %h exp %h", c_req_addr, tb_ref_addr(in_is_mul, in_i, in_j));
      end
      @(negedge clk);
      in_valid = 0;
      lat = 1;
      while (!out_valid && lat < 40) begin @(negedge clk); lat++; end
      checks++;
      if (!out_valid || out_result !== exp || lat != (delay == 0 ? 1 : delay + 1)) begin
        failures++;
        $display("FAIL %s %0d,%0d -> %0d exp %0d, latency %0d (delay %0d)",
                 in_is_mul ? "mul" : "add", in_i, in_j, out_result, exp, lat, delay);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
