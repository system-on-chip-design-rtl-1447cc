// decision_block: a decision block (ALU) dedicated to one nerve centre.
//
// Two operand registers (REG 0, REG 1) are loaded through a demultiplexer:
// load_sel picks which one takes load_data on a clock edge with load_en set.
// The operation units of decision_alu work on the registers all the time and
// the operation code picks the result, combinationally, so a micro-instruction
// that reads the ALU gets its result in the cycle it is issued. reg0_q is
// brought out as the target of conditional "go to" instructions. Registers
// reset to 0. The structure (two registers behind a demultiplexer, operation
// units, output multiplexer) follows the published block.
module decision_block
  import cn_pkg::*;
#(
  parameter int unsigned DATA_W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  // register load (demultiplexer)
  input  logic                load_en,
  input  logic                load_sel,
  input  logic [DATA_W-1:0]   load_data,
  // operation select (output multiplexer)
  input  op_e                 op,
  input  logic                operand_sel,
  output logic [DATA_W-1:0]   result,
  output logic [DATA_W-1:0]   reg0_q
);

  logic [DATA_W-1:0] regs [2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs[0] <= '0;
      regs[1] <= '0;
    end else if (load_en) begin
      regs[load_sel] <= load_data;
    end
  end

  decision_alu #(.DATA_W(DATA_W)) u_alu (
    .op, .operand_sel, .r0(regs[0]), .r1(regs[1]), .result
  );

  assign reg0_q = regs[0];

endmodule
