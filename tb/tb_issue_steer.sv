// tb_issue_steer: random check of the ALU/MBC routing: only engaged adds and multiplies whose
// operands satisfy the decision function of their own operation go to MBC.
module tb_issue_steer;
  import pmbc_pkg::*;

  op_e         op;
  logic [31:0] a, b;
  logic        engage;
  dfunc_cfg_t  cfg_add, cfg_mul;
  logic        supported, to_mbc, is_mul;
  int checks = 0, failures = 0, n_mbc = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  issue_steer dut (.op(op), .opnd_a(a), .opnd_b(b), .engage(engage), .cfg_add(cfg_add),
                   .cfg_mul(cfg_mul), .supported(supported), .to_mbc(to_mbc), .is_mul(is_mul));

  function automatic bit in_region(input logic [31:0] ii, input logic [31:0] jj, input dfunc_cfg_t c);
    if (ii > 255 || jj > 255) return 0;
    return (c.diag_en && ii == jj) || (ii >= c.a && ii <= c.b && jj >= c.c && jj <= c.d);
  endfunction

  initial begin
    repeat (5000) begin
      bit exp_sup, exp_mbc;
      op      = op_e'($urandom % 6);
      a       = ($urandom % 4 == 0) ? $urandom : $urandom % 64;
      b       = ($urandom % 4 == 0) ? $urandom : $urandom % 64;
      engage  = ($urandom % 4) != 0;
      cfg_add = '{a: 8'($urandom % 32), b: 8'($urandom % 64), c: 8'($urandom % 32),
                  d: 8'($urandom % 64), diag_en: 1'($urandom)};
      cfg_mul = '{a: 8'($urandom % 32), b: 8'($urandom % 64), c: 8'($urandom % 32),
                  d: 8'($urandom % 64), diag_en: 1'($urandom)};
      #1;
      exp_sup = (op == OP_ADD) || (op == OP_MUL);
      exp_mbc = engage && ((op == OP_ADD && in_region(a, b, cfg_add)) ||
                           (op == OP_MUL && in_region(a, b, cfg_mul)));
      checks++;
      if (supported !== exp_sup || to_mbc !== exp_mbc || (exp_mbc && is_mul !== (op == OP_MUL))) begin
        failures++;
        $display("FAIL op=%s a=%0d b=%0d engage=%0d -> sup=%0d mbc=%0d", op.name(), a, b, engage,
                 supported, to_mbc);
      end
      if (exp_mbc) n_mbc++;
    end
    checks++;
    if (n_mbc < 50) begin failures++; $display("FAIL too few MBC routings: %0d", n_mbc); end
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
