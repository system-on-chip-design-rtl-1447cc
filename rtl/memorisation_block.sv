// memorisation_block: a nerve centre's data memory.
//
// 2**ADDR_W words of DATA_W bits. It holds the thresholds, the possible
// output values, the centre's previous state, the program addresses to jump
// to and the accumulators the micro-program uses. The published layout keeps
// the lower half for configuration values and the upper half for working data.
// mode = 0 (Config): only the configuration port writes.
// mode = 1 (Work):   only the micro-program writes (wr_en, from an instruction
//                    whose terminal component is MEMORY).
// Reads are combinational at rd_addr; writes take effect on the clock edge,
// so a value written by one instruction is read by the next. The words are
// not reset: every word that is read must be written first, by configuration
// or by the program. The two modes and x-bit words follow the published
// block; the single read and single write port are this design's choice.
module memorisation_block #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned ADDR_W = 6
) (
  input  logic              clk,
  input  logic              mode,
  // configuration port (Config Data_Memory)
  input  logic              cfg_we,
  input  logic [ADDR_W-1:0] cfg_addr,
  input  logic [DATA_W-1:0] cfg_data,
  // work port
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [DATA_W-1:0] rd_data,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [DATA_W-1:0] wr_data
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (!mode && cfg_we)
      mem[cfg_addr] <= cfg_data;
    else if (mode && wr_en)
      mem[wr_addr] <= wr_data;
  end

  assign rd_data = mem[rd_addr];

endmodule
