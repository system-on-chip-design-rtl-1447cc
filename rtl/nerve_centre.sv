// nerve_centre: one nerve centre with a decision block of its own; with its
// default sizes (three inputs, two outputs) it is the cortical-diencephalic
// (CD) centre prototype.
//
// It joins a cn_block (perception, memorisation and execution blocks, program
// memory and pointer) to a dedicated decision_block. Since the decision block
// is never shared here, its grant is always given and the centre executes one
// micro-instruction per clock without stalls. Loaded with the CD program and
// data-memory table, a pass takes 24 clocks when the first truth-table row
// holds, 51 for the second and 88 for the third or for no row.
//
// Interface: mode (0 Config, 1 Work), the program and data configuration
// ports, in_sig (DA, MI, RI for the CD centre), out_sig (signals to the
// preoptic area and to the pontine storage centre for the CD centre),
// out_we/out_sel/out_data (each output write, for a shared signal memory),
// pass_done (one clock at the end of each pass) and the program pointer pc.
// neuronal_soc uses this module for every centre when it is built with one
// decision block per centre (CN_PER_DEC = 1).
// The structure follows the published CN block and CD prototype; widths and
// the pass_done strobe are this design's choices.
module nerve_centre
  import cn_pkg::*;
#(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned N_IN   = 3,
  parameter int unsigned N_OUT  = 2,
  parameter int unsigned MEM_AW = IADDR_W,
  parameter int unsigned PC_W   = 7
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               mode,
  input  logic               cfg_prog_we,
  input  logic [PC_W-1:0]    cfg_prog_addr,
  input  logic [INSTR_W-1:0] cfg_prog_data,
  input  logic               cfg_mem_we,
  input  logic [MEM_AW-1:0]  cfg_mem_addr,
  input  logic [DATA_W-1:0]  cfg_mem_data,
  input  logic [DATA_W-1:0]  in_sig  [N_IN],
  output logic [DATA_W-1:0]  out_sig [N_OUT],
  output logic               out_we,
  output logic [IADDR_W-1:0] out_sel,
  output logic [DATA_W-1:0]  out_data,
  output logic               pass_done,
  output logic [PC_W-1:0]    pc
);

  op_e               dec_op;
  logic              dec_req, dec_operand_sel, dec_load_en, dec_load_sel;
  logic [DATA_W-1:0] dec_result, dec_reg0, dec_load_data;
  logic              stall;

  cn_block #(
    .DATA_W(DATA_W), .N_IN(N_IN), .N_OUT(N_OUT), .MEM_AW(MEM_AW), .PC_W(PC_W)
  ) u_cn (
    .clk, .rst_n, .mode,
    .cfg_prog_we, .cfg_prog_addr, .cfg_prog_data,
    .cfg_mem_we, .cfg_mem_addr, .cfg_mem_data,
    .in_sig, .out_sig, .out_we, .out_sel, .out_data,
    .dec_req, .dec_gnt(1'b1), .dec_op, .dec_operand_sel, .dec_result, .dec_reg0,
    .dec_load_en, .dec_load_sel, .dec_load_data,
    .pass_done, .stall, .pc
  );

  decision_block #(.DATA_W(DATA_W)) u_decision (
    .clk, .rst_n,
    .load_en    (dec_load_en),
    .load_sel   (dec_load_sel),
    .load_data  (dec_load_data),
    .op         (dec_op),
    .operand_sel(dec_operand_sel),
    .result     (dec_result),
    .reg0_q     (dec_reg0)
  );

endmodule
