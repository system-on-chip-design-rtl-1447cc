// execution_block: drives a nerve centre's output signals.
//
// N_OUT output registers of DATA_W bits. An instruction whose terminal
// component is OUTPUT writes `data` into the register named by its 6-bit
// internal address (demultiplexer) on the clock edge; the other registers
// hold their value, so each output keeps the last value the program gave it.
// Writes to an address beyond N_OUT are ignored. Outputs reset to 0.
// Routing one value to one of n outputs under program control follows the
// published block; the holding registers and reset value are this design's.
module execution_block
  import cn_pkg::*;
#(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned N_OUT  = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               wr_en,
  input  logic [IADDR_W-1:0] sel,
  input  logic [DATA_W-1:0]  data,
  output logic [DATA_W-1:0]  out_sig [N_OUT]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_OUT; i++) out_sig[i] <= '0;
    end else if (wr_en) begin
      for (int i = 0; i < N_OUT; i++)
        if (int'(sel) == i) out_sig[i] <= data;
    end
  end

endmodule
