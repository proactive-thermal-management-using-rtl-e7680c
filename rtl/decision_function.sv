// decision_function: the proactive-MBC operand filter.
//
// Evaluates D(i,j) = 1 when a <= i <= b and c <= j <= d, or, when diag_en is set, when i == j
// (the optional diagonal term). i and j are operand1 and operand2 of the instruction; the bounds
// a..d are 8-bit values loaded per application from static profiling. The box and the diagonal
// condition follow the published decision function. An operand pair is only eligible when both
// operands fit in 8 bits, because only then does a single LUT entry hold the exact result; this
// eligibility rule is this design's choice.
//
// Purely combinational: two pairs of magnitude comparators, one equality comparator.
module decision_function
  import pmbc_pkg::*;
#(
  parameter int OPW = DATA_W   // width of the operands being tested
) (
  input  logic [OPW-1:0] i,     // operand1
  input  logic [OPW-1:0] j,     // operand2
  input  dfunc_cfg_t     cfg,   // bounds a, b, c, d and diagonal enable
  output logic           d      // 1: operands lie in the selected region
);

  logic       small_i, small_j;
  logic [OPND_W-1:0] i8, j8;
  logic       in_box, on_diag;

  always_comb begin
    small_i = (i >> OPND_W) == '0;
    small_j = (j >> OPND_W) == '0;
    i8      = i[OPND_W-1:0];
    j8      = j[OPND_W-1:0];
    in_box  = (i8 >= cfg.a) && (i8 <= cfg.b) && (j8 >= cfg.c) && (j8 <= cfg.d);
    on_diag = cfg.diag_en && (i8 == j8);
    d       = small_i && small_j && (in_box || on_diag);
  end

endmodule
