// tb_l2_arbiter: three requesters issue random line requests into the arbiter, which feeds an L2
// model answering after a random delay with a line derived from the address. Checks: every
// requester gets its own answers, in order and only its own; the class sent to the L2 matches the
// address region; and when all three wait, grants rotate round-robin.
module tb_l2_arbiter;
  import pmbc_pkg::*;
  import tb_pkg::*;

  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0]              req_valid, req_ready, req_we, resp_valid;
  logic [N-1:0][ADDR_W-1:0]  req_addr;
  logic [N-1:0][LINE_W-1:0]  req_wline;
  logic [LINE_W-1:0]         resp_line;
  logic                      l2_req_valid, l2_req_ready, l2_req_we, l2_resp_valid;
  logic [ADDR_W-1:0]         l2_req_addr;
  cls_e                      l2_req_cls;
  logic [LINE_W-1:0]         l2_req_wline, l2_resp_line;
  int checks = 0, failures = 0;

  l2_arbiter #(.N(N)) dut (.*);

  // L2 model
  logic pend; int cnt; logic [ADDR_W-1:0] pa;
  int grants[$];
  assign l2_req_ready = !pend;
  always_ff @(posedge clk) begin
    l2_resp_valid <= 1'b0;
    if (!rst_n) pend <= 1'b0;
    else if (!pend && l2_req_valid) begin
      pend <= 1'b1; pa <= l2_req_addr; cnt <= $urandom % 5;
      checks++;
      if (l2_req_cls !== addr_class(l2_req_addr)) begin failures++; $display("FAIL class"); end
      for (int r = 0; r < N; r++) if (req_ready[r]) grants.push_back(r);
    end else if (pend) begin
      if (cnt == 0) begin
        l2_resp_valid <= 1'b1; l2_resp_line <= tb_fill_line(pa); pend <= 1'b0;
      end else cnt <= cnt - 1;
    end
  end

  int done_cnt[N];
  for (genvar r = 0; r < N; r++) begin : g_req
    initial begin
      req_valid[r] = 0; req_we[r] = 0; req_wline[r] = '0; req_addr[r] = '0;
      wait (rst_n);
      repeat (400) begin
        logic [ADDR_W-1:0] a;
        int k;
        @(negedge clk);
        k = $urandom % 3;
        a = (k == 0) ? ADDR_W'($urandom) & ~ADDR_W'(31) :
            (k == 1) ? (MUL_LUT_BASE | ADDR_W'($urandom % 4096) << 5) :
                       (ADD_LUT_BASE | ADDR_W'($urandom % 4096) << 5);
        req_valid[r] = 1; req_addr[r] = a;
        while (!req_ready[r]) @(negedge clk);
        @(negedge clk);
        req_valid[r] = 0;
        while (!resp_valid[r]) @(negedge clk);
        checks++;
        if (resp_line !== tb_fill_line(a)) begin
          failures++; $display("FAIL requester %0d got wrong line for %h", r, a);
        end
        done_cnt[r]++;
      end
    end
  end

  // a response strobe for exactly one requester at a time
  always @(negedge clk) if (rst_n && resp_valid != 0) begin
    checks++;
    if (!$onehot(resp_valid)) begin failures++; $display("FAIL resp to several"); end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done_cnt[0] == 400 && done_cnt[1] == 400 && done_cnt[2] == 400);
    // fairness: with all three busy most of the time, no requester is granted twice in a row
    // while another has waited; approximate by checking every window of 3 grants early on
    begin
      int rr_ok = 0;
      for (int k = 0; k + 2 < 30; k++)
        if (grants[k] != grants[k+1] && grants[k+1] != grants[k+2] && grants[k] != grants[k+2])
          rr_ok++;
      checks++;
      if (rr_ok < 20) begin failures++; $display("FAIL grants do not rotate (%0d)", rr_ok); end
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
