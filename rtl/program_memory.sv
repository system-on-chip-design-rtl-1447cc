// program_memory: holds a nerve centre's micro-program.
//
// DEPTH words of INSTR_W bits. In Config mode (mode = 0) the configuration
// port (Config program_memory) writes words; in Work mode the contents are
// protected and the word at rd_addr, the program pointer, is read
// combinationally and placed on the control bus. Unwritten words are not
// reset and must not be executed. The two modes follow the published block;
// the depth (128, the smallest power of two holding the 98-word CD-centre
// program) and the combinational read are this design's choices.
module program_memory
  import cn_pkg::*;
#(
  parameter int unsigned PC_W  = 7,
  parameter int unsigned DEPTH = 2**PC_W
) (
  input  logic               clk,
  input  logic               mode,
  input  logic               cfg_we,
  input  logic [PC_W-1:0]    cfg_addr,
  input  logic [INSTR_W-1:0] cfg_data,
  input  logic [PC_W-1:0]    rd_addr,
  output instr_t             instr
);

  logic [INSTR_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (!mode && cfg_we && int'(cfg_addr) < DEPTH)
      mem[cfg_addr] <= cfg_data;
  end

  assign instr = instr_t'(mem[rd_addr]);

endmodule
