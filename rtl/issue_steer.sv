// issue_steer: issue-side routing between the ALU and the MBC unit.
//
// For each instruction it asks two questions in order: is the operation supported by MBC
// (integer add and multiply), and do its operands satisfy that operation's decision function?
// Only when both are true, and proactive MBC is engaged, is the instruction sent to MBC; every
// other instruction executes in the ALU. The two questions and their order follow the published
// flow; the separate decision function per operation and the engage input (driven by the
// thermal-management policy outside this block) are this design's choices.
//
// Purely combinational.
module issue_steer
  import pmbc_pkg::*;
(
  input  op_e               op,
  input  logic [DATA_W-1:0] opnd_a,
  input  logic [DATA_W-1:0] opnd_b,
  input  logic              engage,    // proactive MBC enabled for this core
  input  dfunc_cfg_t        cfg_add,   // decision function for additions
  input  dfunc_cfg_t        cfg_mul,   // decision function for multiplications
  output logic              supported, // operation has an MBC LUT
  output logic              to_mbc,    // 1: execute in MBC, 0: execute in ALU
  output logic              is_mul     // MBC operation is a multiply
);

  logic d_add, d_mul;

  decision_function #(.OPW(DATA_W)) u_dadd (.i(opnd_a), .j(opnd_b), .cfg(cfg_add), .d(d_add));
  decision_function #(.OPW(DATA_W)) u_dmul (.i(opnd_a), .j(opnd_b), .cfg(cfg_mul), .d(d_mul));

  always_comb begin
    supported = (op == OP_ADD) || (op == OP_MUL);
    is_mul    = (op == OP_MUL);
    to_mbc    = engage && supported && (is_mul ? d_mul : d_add);
  end

endmodule
