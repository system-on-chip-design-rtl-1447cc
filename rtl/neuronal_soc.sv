// neuronal_soc: the neuroregulatory system-on-chip for the lower urinary tract.
//
// Nine programmable nerve-centre blocks (cn_block), one per centre of the
// lower-urinary-tract model, run their own micro-programs side by side. Every
// three centres share one decision block (decision_cluster), so the chip has
// three. With CN_PER_DEC = 1 each centre is instead built as a nerve_centre
// with a decision block of its own (nine decision blocks, never a stall),
// the arrangement sharing is measured against. All nerve signals live in a compartmentalised shared memory: the
// chip's afferent and voluntary inputs are captured into its input
// compartment every clock, centres exchange internal signals through it, and
// the efferent compartment drives the chip's outputs.
//
// Which signals a centre perceives and which it drives are programmable: each
// centre has an input map (slot read by each of its N_IN perception inputs)
// and an output map (slot written by each of its N_OUT execution outputs).
// A centre's output write reaches its slot on the same clock edge as its own
// output register.
//
// Configuration (mode = 0): cfg_cn picks the centre; cfg_prog_* writes its
// program memory, cfg_mem_* its data memory, cfg_map_* one entry of its input
// (cfg_map_out = 0) or output (cfg_map_out = 1) map. Work (mode = 1): all
// centres run; pass_done[c] pulses at the end of each pass of centre c and
// stall[c] is high for each clock centre c waits for its decision block.
//
// The nine CN blocks, three shared decision blocks, shared memory for
// afferent, internal and efferent signals, a Mode signal and a single clock
// follow the published SoC. The signal counts (9 afferent + 2 voluntary
// inputs, 8 efferent outputs) are the model's; the slot layout, the
// programmable maps, the per-centre sizes (those of the CD centre) and the
// configuration port are this design's choices.
module neuronal_soc
  import cn_pkg::*;
#(
  parameter int unsigned DATA_W     = 32,
  parameter int unsigned N_CN       = 9,
  parameter int unsigned CN_PER_DEC = 3,
  parameter int unsigned N_IN       = 3,
  parameter int unsigned N_OUT      = 2,
  parameter int unsigned N_EXT_IN   = 11,
  parameter int unsigned N_EFF      = 8,
  parameter int unsigned SLOT_AW    = 6,
  parameter int unsigned EFF_BASE   = 32,
  parameter int unsigned MEM_AW     = IADDR_W,
  parameter int unsigned PC_W       = 7,
  localparam int unsigned CN_W      = (N_CN > 1) ? $clog2(N_CN) : 1,
  localparam int unsigned N_DEC     = (N_CN + CN_PER_DEC - 1) / CN_PER_DEC
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               mode,          // 0 = Config, 1 = Work
  // configuration
  input  logic [CN_W-1:0]    cfg_cn,
  input  logic               cfg_prog_we,
  input  logic [PC_W-1:0]    cfg_prog_addr,
  input  logic [INSTR_W-1:0] cfg_prog_data,
  input  logic               cfg_mem_we,
  input  logic [MEM_AW-1:0]  cfg_mem_addr,
  input  logic [DATA_W-1:0]  cfg_mem_data,
  input  logic               cfg_map_we,
  input  logic               cfg_map_out,
  input  logic [IADDR_W-1:0] cfg_map_idx,
  input  logic [SLOT_AW-1:0] cfg_map_slot,
  // nerve signals
  input  logic [DATA_W-1:0]  ext_in   [N_EXT_IN],
  output logic [DATA_W-1:0]  efferent [N_EFF],
  // status
  output logic [N_CN-1:0]    pass_done,
  output logic [N_CN-1:0]    stall
);

  // ---------------------------------------------------------------- signal maps
  logic [SLOT_AW-1:0] in_map  [N_CN][N_IN];
  logic [SLOT_AW-1:0] out_map [N_CN][N_OUT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CN; c++) begin
        for (int i = 0; i < N_IN; i++)  in_map[c][i]  <= '0;
        for (int j = 0; j < N_OUT; j++) out_map[c][j] <= '0;
      end
    end else if (!mode && cfg_map_we && int'(cfg_cn) < N_CN) begin
      if (!cfg_map_out) begin
        for (int i = 0; i < N_IN; i++)
          if (int'(cfg_map_idx) == i) in_map[cfg_cn][i] <= cfg_map_slot;
      end else begin
        for (int j = 0; j < N_OUT; j++)
          if (int'(cfg_map_idx) == j) out_map[cfg_cn][j] <= cfg_map_slot;
      end
    end
  end

  // ---------------------------------------------------------------- shared memory
  logic [DATA_W-1:0]  slot_q  [2**SLOT_AW];
  logic [N_CN-1:0]    wr_en;
  logic [SLOT_AW-1:0] wr_slot [N_CN];
  logic [DATA_W-1:0]  wr_data [N_CN];

  shared_memory #(
    .DATA_W(DATA_W), .SLOT_AW(SLOT_AW), .N_EXT_IN(N_EXT_IN), .N_EFF(N_EFF),
    .EFF_BASE(EFF_BASE), .N_WR(N_CN)
  ) u_shmem (
    .clk, .rst_n, .ext_in, .wr_en, .wr_slot, .wr_data, .slot_q, .efferent
  );

  // ---------------------------------------------------------------- decision port wires
  localparam int unsigned N_SLOT = N_DEC * CN_PER_DEC;   // cluster ports, N_CN rounded up

  logic [N_SLOT-1:0] dec_req, dec_gnt, dec_operand_sel, dec_load_en, dec_load_sel;
  op_e               dec_op        [N_SLOT];
  logic [DATA_W-1:0] dec_result    [N_SLOT];
  logic [DATA_W-1:0] dec_reg0      [N_SLOT];
  logic [DATA_W-1:0] dec_load_data [N_SLOT];

  // ---------------------------------------------------------------- nerve centres
  for (genvar c = 0; c < N_CN; c++) begin : g_cn
    logic [DATA_W-1:0]  in_sig  [N_IN];
    logic [DATA_W-1:0]  out_sig [N_OUT];
    logic               out_we;
    logic [IADDR_W-1:0] out_sel;
    logic [DATA_W-1:0]  out_data;
    logic [PC_W-1:0]    pc;
    logic               sel_me;

    assign sel_me = int'(cfg_cn) == c;

    always_comb
      for (int i = 0; i < N_IN; i++) in_sig[i] = slot_q[in_map[c][i]];

    if (CN_PER_DEC == 1) begin : g_own
      // one decision block per centre: no sharing, no stalls
      nerve_centre #(
        .DATA_W(DATA_W), .N_IN(N_IN), .N_OUT(N_OUT), .MEM_AW(MEM_AW), .PC_W(PC_W)
      ) u_cn (
        .clk, .rst_n, .mode,
        .cfg_prog_we  (cfg_prog_we && sel_me),
        .cfg_prog_addr, .cfg_prog_data,
        .cfg_mem_we   (cfg_mem_we && sel_me),
        .cfg_mem_addr, .cfg_mem_data,
        .in_sig, .out_sig, .out_we, .out_sel, .out_data,
        .pass_done    (pass_done[c]),
        .pc
      );
      assign stall[c]           = 1'b0;
      assign dec_gnt[c]         = 1'b0;
      assign dec_result[c]      = '0;
      assign dec_reg0[c]        = '0;
      assign dec_req[c]         = 1'b0;
      assign dec_op[c]          = OP_NULL;
      assign dec_operand_sel[c] = 1'b0;
      assign dec_load_en[c]     = 1'b0;
      assign dec_load_sel[c]    = 1'b0;
      assign dec_load_data[c]   = '0;
    end else begin : g_shared
      cn_block #(
        .DATA_W(DATA_W), .N_IN(N_IN), .N_OUT(N_OUT), .MEM_AW(MEM_AW), .PC_W(PC_W)
      ) u_cn (
        .clk, .rst_n, .mode,
        .cfg_prog_we  (cfg_prog_we && sel_me),
        .cfg_prog_addr, .cfg_prog_data,
        .cfg_mem_we   (cfg_mem_we && sel_me),
        .cfg_mem_addr, .cfg_mem_data,
        .in_sig, .out_sig, .out_we, .out_sel, .out_data,
        .dec_req        (dec_req[c]),
        .dec_gnt        (dec_gnt[c]),
        .dec_op         (dec_op[c]),
        .dec_operand_sel(dec_operand_sel[c]),
        .dec_result     (dec_result[c]),
        .dec_reg0       (dec_reg0[c]),
        .dec_load_en    (dec_load_en[c]),
        .dec_load_sel   (dec_load_sel[c]),
        .dec_load_data  (dec_load_data[c]),
        .pass_done      (pass_done[c]),
        .stall          (stall[c]),
        .pc
      );
    end

    // the execution block's write, routed to the shared memory
    always_comb begin
      wr_en[c]   = out_we && int'(out_sel) < N_OUT;
      wr_slot[c] = '0;
      for (int j = 0; j < N_OUT; j++)
        if (int'(out_sel) == j) wr_slot[c] = out_map[c][j];
      wr_data[c] = out_data;
    end
  end

  // unused cluster ports when N_CN is not a multiple of CN_PER_DEC
  for (genvar c = N_CN; c < N_SLOT; c++) begin : g_pad
    assign dec_req[c]         = 1'b0;
    assign dec_op[c]          = OP_NULL;
    assign dec_operand_sel[c] = 1'b0;
    assign dec_load_en[c]     = 1'b0;
    assign dec_load_sel[c]    = 1'b0;
    assign dec_load_data[c]   = '0;
  end

  // ---------------------------------------------------------------- shared decision blocks
  for (genvar d = 0; d < N_DEC && CN_PER_DEC > 1; d++) begin : g_dec
    localparam int unsigned B = d * CN_PER_DEC;
    op_e               op_l   [CN_PER_DEC];
    logic [DATA_W-1:0] res_l  [CN_PER_DEC];
    logic [DATA_W-1:0] r0_l   [CN_PER_DEC];
    logic [DATA_W-1:0] ld_l   [CN_PER_DEC];

    always_comb
      for (int p = 0; p < CN_PER_DEC; p++) begin
        op_l[p]           = dec_op[B + p];
        ld_l[p]           = dec_load_data[B + p];
        dec_result[B + p] = res_l[p];
        dec_reg0[B + p]   = r0_l[p];
      end

    decision_cluster #(.DATA_W(DATA_W), .N_PORTS(CN_PER_DEC)) u_dec (
      .clk, .rst_n,
      .req        (dec_req[B +: CN_PER_DEC]),
      .gnt        (dec_gnt[B +: CN_PER_DEC]),
      .op         (op_l),
      .operand_sel(dec_operand_sel[B +: CN_PER_DEC]),
      .result     (res_l),
      .reg0_q     (r0_l),
      .load_en    (dec_load_en[B +: CN_PER_DEC]),
      .load_sel   (dec_load_sel[B +: CN_PER_DEC]),
      .load_data  (ld_l)
    );
  end

endmodule
