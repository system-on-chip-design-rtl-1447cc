// cn_block: a programmable nerve-centre (CN) block, without its decision block.
//
// The block is a one-instruction-per-clock machine. Its program pointer reads
// a 19-bit micro-instruction from the program memory (the control bus); the
// instruction moves one value from a starting component (INPUT = perception
// block, MEMORY = memorisation block, ALU = decision block) to a terminal
// component (OUTPUT = execution block, STACK P = program pointer, MEMORY,
// ALU). When the source is the ALU the value is the decision block's result
// for the instruction's operation. Reads are combinational; writes take effect
// on the next rising edge, so the next instruction sees them.
//
// Writes to STACK P steer the program:
//   NULL           -> pointer back to 0, the end of one pass: `pass_done`
//                     pulses and the inputs are sampled for the next pass.
//   LOAD           -> unconditional jump to the value.
//   AND/OR/NOT/=/> -> conditional jump: if the result is non-zero, jump to
//                     the address held in ALU REG 0, else fall through.
//
// The decision block sits outside, as in the published SoC where several
// centres share one. An instruction that reads the ALU raises dec_req; until
// dec_gnt comes back the block stalls: the pointer holds and nothing is
// written. Loads into the ALU registers (dec_load_*) need no grant. A centre
// with a decision block of its own ties dec_gnt high and never stalls.
// Every write to an output is also shown on out_we/out_sel/out_data, so a
// shared signal memory can follow it.
//
// mode = 0 (Config): the pointer is held at 0, the configuration ports write
// the program and data memories and the inputs are sampled every clock.
// mode = 1 (Work): the program runs and configuration writes are ignored.
//
// Components, instruction format, codes, the two modes and the conditional
// jump through ALU REG 0 follow the published design and its CD program.
// The widths, the program depth, the snapshot of the inputs once per pass,
// the request/grant stall and the status outputs are this design's choices.
module cn_block
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
  input  logic               mode,          // 0 = Config, 1 = Work
  // Config program_memory
  input  logic               cfg_prog_we,
  input  logic [PC_W-1:0]    cfg_prog_addr,
  input  logic [INSTR_W-1:0] cfg_prog_data,
  // Config Data_Memory
  input  logic               cfg_mem_we,
  input  logic [MEM_AW-1:0]  cfg_mem_addr,
  input  logic [DATA_W-1:0]  cfg_mem_data,
  // nerve signals
  input  logic [DATA_W-1:0]  in_sig  [N_IN],
  output logic [DATA_W-1:0]  out_sig [N_OUT],
  output logic               out_we,
  output logic [IADDR_W-1:0] out_sel,
  output logic [DATA_W-1:0]  out_data,
  // decision block port
  output logic               dec_req,
  input  logic               dec_gnt,
  output op_e                dec_op,
  output logic               dec_operand_sel,
  input  logic [DATA_W-1:0]  dec_result,
  input  logic [DATA_W-1:0]  dec_reg0,
  output logic               dec_load_en,
  output logic               dec_load_sel,
  output logic [DATA_W-1:0]  dec_load_data,
  // status
  output logic               pass_done,
  output logic               stall,
  output logic [PC_W-1:0]    pc
);

  instr_t             instr;
  logic               run, active, go;
  logic [DATA_W-1:0]  in_val, mem_val, value;
  logic               wr_mem, wr_sp, jump;
  logic [PC_W-1:0]    target;

  assign run = mode;

  // ---------------------------------------------------------------- control
  always_comb begin
    unique case (instr.src_blk)
      SRC_INPUT:  value = in_val;
      SRC_MEMORY: value = mem_val;
      SRC_ALU:    value = dec_result;
      default:    value = '0;
    endcase
  end

  // an instruction that moves a value
  assign active  = run && instr.op != OP_NULL && instr.op != OP_RSVD
                   && instr.src_blk != SRC_RSVD;
  assign dec_req = active && instr.src_blk == SRC_ALU;
  assign stall   = dec_req && !dec_gnt;
  assign go      = active && !stall;

  assign dec_op          = instr.op;
  assign dec_operand_sel = instr.src_addr[0];
  assign dec_load_en     = go && instr.dst_blk == DST_ALU;
  assign dec_load_sel    = instr.dst_addr[0];
  assign dec_load_data   = value;

  assign out_we   = go && instr.dst_blk == DST_OUTPUT;
  assign out_sel  = instr.dst_addr;
  assign out_data = value;
  assign wr_mem   = go && instr.dst_blk == DST_MEMORY;
  assign wr_sp    = run && !stall && instr.dst_blk == DST_STACKP;

  always_comb begin
    jump      = 1'b0;
    target    = '0;
    pass_done = 1'b0;
    if (wr_sp) begin
      unique case (instr.op)
        OP_NULL: begin
          jump      = 1'b1;
          pass_done = 1'b1;
        end
        OP_LOAD: begin
          jump   = 1'b1;
          target = value[PC_W-1:0];
        end
        OP_RSVD: ;
        default: begin
          jump   = |value;
          target = dec_reg0[PC_W-1:0];
        end
      endcase
    end
  end

  // ---------------------------------------------------------------- blocks
  program_pointer #(.PC_W(PC_W)) u_sp (
    .clk, .rst_n, .run, .hold(stall), .jump, .target, .pc
  );

  program_memory #(.PC_W(PC_W)) u_prog (
    .clk, .mode,
    .cfg_we  (cfg_prog_we),
    .cfg_addr(cfg_prog_addr),
    .cfg_data(cfg_prog_data),
    .rd_addr (pc),
    .instr   (instr)
  );

  perception_block #(.DATA_W(DATA_W), .N_IN(N_IN)) u_perception (
    .clk, .rst_n,
    .sample(!run || pass_done),
    .in_sig,
    .sel   (instr.src_addr),
    .out   (in_val)
  );

  memorisation_block #(.DATA_W(DATA_W), .ADDR_W(MEM_AW)) u_memory (
    .clk, .mode,
    .cfg_we  (cfg_mem_we),
    .cfg_addr(cfg_mem_addr),
    .cfg_data(cfg_mem_data),
    .rd_addr (MEM_AW'(instr.src_addr)),
    .rd_data (mem_val),
    .wr_en   (wr_mem),
    .wr_addr (MEM_AW'(instr.dst_addr)),
    .wr_data (value)
  );

  execution_block #(.DATA_W(DATA_W), .N_OUT(N_OUT)) u_execution (
    .clk, .rst_n,
    .wr_en(out_we),
    .sel  (out_sel),
    .data (out_data),
    .out_sig
  );

  // ---------------------------------------------------------------- checks
  // A running program must only hold defined operation and source codes.
  a_legal_op: assert property (@(posedge clk) disable iff (!rst_n)
    run |-> (instr.op != OP_RSVD && instr.src_blk != SRC_RSVD));

  // A stalled instruction stays in place until it is granted.
  a_stall_holds: assert property (@(posedge clk) disable iff (!rst_n)
    (run && stall) |=> (!run || $stable(pc)));

endmodule
