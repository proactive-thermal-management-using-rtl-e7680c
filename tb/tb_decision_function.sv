// tb_decision_function: random and directed check of the decision function D(i,j) against a
// reference written from its definition (box a..b x c..d, optional diagonal, 8-bit operands).
module tb_decision_function;
  import pmbc_pkg::*;

  logic [31:0] i, j;
  dfunc_cfg_t  cfg;
  logic        d;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  decision_function dut (.i(i), .j(j), .cfg(cfg), .d(d));

  function automatic bit ref_d(input logic [31:0] ii, input logic [31:0] jj, input dfunc_cfg_t c);
    if (ii > 255 || jj > 255) return 0;
    if (c.diag_en && ii == jj) return 1;
    return (ii >= c.a && ii <= c.b && jj >= c.c && jj <= c.d);
  endfunction

  task automatic check_one(input logic [31:0] ii, input logic [31:0] jj, input dfunc_cfg_t c);
    i = ii; j = jj; cfg = c;
    #1;
    checks++;
    if (d !== ref_d(ii, jj, c)) begin
      failures++;
      $display("FAIL i=%0d j=%0d a=%0d b=%0d c=%0d d=%0d diag=%0d -> %0d", ii, jj, c.a, c.b, c.c,
               c.d, c.diag_en, d);
    end
  endtask

  initial begin
    dfunc_cfg_t c;
    // The published example: 0 <= i <= 20 and 0 <= j <= 100.
    c = '{a: 8'd0, b: 8'd20, c: 8'd0, d: 8'd100, diag_en: 1'b0};
    check_one(0, 0, c);    check_one(20, 100, c); check_one(21, 100, c); check_one(20, 101, c);
    check_one(5, 300, c);  check_one(256, 3, c);
    // diagonal plus a box: i = j or (0 <= i <= 100 and 0 <= j <= 37)
    c = '{a: 8'd0, b: 8'd100, c: 8'd0, d: 8'd37, diag_en: 1'b1};
    check_one(200, 200, c); check_one(200, 201, c); check_one(100, 37, c); check_one(101, 37, c);
    check_one(255, 255, c); check_one(511, 511, c);
    repeat (4000) begin
      c = dfunc_cfg_t'($urandom);
      check_one(($urandom % 8 == 0) ? $urandom : $urandom % 256,
                ($urandom % 8 == 0) ? $urandom : $urandom % 256, c);
      check_one({24'd0, c.a}, {24'd0, c.c}, c);
      check_one({24'd0, c.b}, {24'd0, c.d}, c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
