// program_pointer: the pointer ("Stack P") that walks a nerve centre's
// program memory.
//
// While `run` is low (Config mode) the pointer is held at 0. While it is high
// the pointer moves one position every clock; when `jump` is set it loads
// `target` instead, which is how the decision block steers the program with
// "go to" instructions and how the NULL instruction restarts the program at
// 0. `hold` freezes the pointer for a clock, used when the centre waits for a
// shared decision block. Stepping once per clock and jumping on command follow
// the published design; holding at 0 during configuration and the hold input
// are this design's choices.
module program_pointer #(
  parameter int unsigned PC_W = 7
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run,
  input  logic            hold,
  input  logic            jump,
  input  logic [PC_W-1:0] target,
  output logic [PC_W-1:0] pc
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     pc <= '0;
    else if (!run)  pc <= '0;
    else if (hold)  pc <= pc;
    else if (jump)  pc <= target;
    else            pc <= pc + 1'b1;
  end

endmodule
