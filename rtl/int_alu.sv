// int_alu: the integer execution unit whose add and multiply activity MBC offloads.
//
// Executes add, subtract, multiply and the bitwise logic operations on 32-bit operands. The
// result is registered: out_valid rises one cycle after in_valid, for every operation. The
// operation set and the one-cycle latency are this design's choices; only the existence of the
// integer adder/multiplier as the unit being relieved comes from the published architecture.
module int_alu
  import pmbc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  op_e               op,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  output logic              out_valid,
  output logic [DATA_W-1:0] result
);

  logic [DATA_W-1:0] res_d;

  always_comb begin
    unique case (op)
      OP_ADD:  res_d = a + b;
      OP_SUB:  res_d = a - b;
      OP_MUL:  res_d = a * b;
      OP_AND:  res_d = a & b;
      OP_OR:   res_d = a | b;
      OP_XOR:  res_d = a ^ b;
      default: res_d = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      result    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) result <= res_d;
    end
  end

endmodule
