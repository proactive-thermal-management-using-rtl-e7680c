// tb_int_alu: random operations on the ALU, checking each result and its one-cycle latency.
module tb_int_alu;
  import pmbc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        in_valid, out_valid;
  op_e         op;
  logic [31:0] a, b, result;
  int checks = 0, failures = 0;

  int_alu dut (.*);

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

  initial begin
    in_valid = 0; op = OP_ADD; a = 0; b = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2000) begin
      logic [31:0] exp;
      @(negedge clk);
      op = op_e'($urandom % 6); a = $urandom; b = $urandom; in_valid = 1;
      exp = ref_op(op, a, b);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || result !== exp) begin
        failures++;
        $display("FAIL op=%s a=%h b=%h got v=%0d %h exp %h", op.name(), a, b, out_valid, result, exp);
      end
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("FAIL out_valid held"); end
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
