// decision_alu: the operation units and output multiplexer of a decision block.
//
// Purely combinational. Given the two operand registers of the centre being
// served, it computes every operation and the operation code picks the result:
//   AND, OR  logical: an operand is true when non-zero; result 0 or 1.
//   NOT      logical negation of the operand named by operand_sel[0].
//   =        r0 == r1, 0 or 1.
//   >        r0 >  r1, signed, 0 or 1.
//   LOAD     the operand named by operand_sel[0], unchanged.
//   NULL     0 (also for the unused code).
// The operation set follows the published decision block; the logical (not
// bitwise) AND/OR/NOT and the signed ">" of REG 0 against REG 1 are this
// design's reading of how the published CD program uses them.
module decision_alu
  import cn_pkg::*;
#(
  parameter int unsigned DATA_W = 32
) (
  input  op_e                 op,
  input  logic                operand_sel,
  input  logic [DATA_W-1:0]   r0,
  input  logic [DATA_W-1:0]   r1,
  output logic [DATA_W-1:0]   result
);

  logic [DATA_W-1:0] single;

  always_comb begin
    single = operand_sel ? r1 : r0;
    unique case (op)
      OP_LOAD: result = single;
      OP_AND:  result = DATA_W'((|r0) && (|r1));
      OP_OR:   result = DATA_W'((|r0) || (|r1));
      OP_NOT:  result = DATA_W'(~|single);
      OP_EQ:   result = DATA_W'(r0 == r1);
      OP_GT:   result = DATA_W'($signed(r0) > $signed(r1));
      default: result = '0;
    endcase
  end

endmodule
