// perception_block: selects which of a nerve centre's input signals the
// micro-program reads.
//
// N_IN input signals of DATA_W bits are captured into registers while `sample`
// is high, so that one pass of the micro-program sees one consistent snapshot
// of the inputs. The 6-bit internal address of an instruction whose source is
// INPUT picks one register through a multiplexer (combinational read); an
// address beyond N_IN reads 0. Selecting one of n inputs by the program follows
// the published block; the snapshot registers and the zero for an unused
// address are choices of this design.
module perception_block
  import cn_pkg::*;
#(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned N_IN   = 3
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               sample,
  input  logic [DATA_W-1:0]  in_sig [N_IN],
  input  logic [IADDR_W-1:0] sel,
  output logic [DATA_W-1:0]  out
);

  logic [DATA_W-1:0] snap [N_IN];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_IN; i++) snap[i] <= '0;
    end else if (sample) begin
      for (int i = 0; i < N_IN; i++) snap[i] <= in_sig[i];
    end
  end

  always_comb begin
    out = '0;
    for (int i = 0; i < N_IN; i++)
      if (int'(sel) == i) out = snap[i];
  end

endmodule
