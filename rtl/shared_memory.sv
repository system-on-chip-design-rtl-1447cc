// shared_memory: the SoC's compartmentalised signal memory.
//
// SLOTS words of DATA_W bits, one per nerve signal, kept in registers so that
// every centre can read every signal at once. Three compartments:
//   slots 0 .. N_EXT_IN-1          input compartment: the chip's afferent
//                                  signals and the voluntary signals from other
//                                  subsystems, captured from the pins on every
//                                  clock (the INPUT side of the chip);
//   slots EFF_BASE .. +N_EFF-1     efferent compartment, driven onto the
//                                  chip's output pins (the OUTPUT side);
//   all other slots                internal signals between centres.
// Centres write through N_WR write ports (enable, slot, data): the control,
// address and data buses. A port aimed at the input compartment is ignored;
// when two ports hit the same slot in one clock the lower-numbered one wins.
// Everything resets to 0. That a shared memory holds the afferent, internal
// and efferent signals follows the published SoC; the layout, the register
// implementation and the write priority are this design's choices.
module shared_memory #(
  parameter int unsigned DATA_W   = 32,
  parameter int unsigned SLOT_AW  = 6,
  parameter int unsigned N_EXT_IN = 11,
  parameter int unsigned N_EFF    = 8,
  parameter int unsigned EFF_BASE = 32,
  parameter int unsigned N_WR     = 9
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [DATA_W-1:0]   ext_in   [N_EXT_IN],
  input  logic [N_WR-1:0]     wr_en,
  input  logic [SLOT_AW-1:0]  wr_slot  [N_WR],
  input  logic [DATA_W-1:0]   wr_data  [N_WR],
  output logic [DATA_W-1:0]   slot_q   [2**SLOT_AW],
  output logic [DATA_W-1:0]   efferent [N_EFF]
);

  localparam int unsigned SLOTS = 2**SLOT_AW;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SLOTS; s++) slot_q[s] <= '0;
    end else begin
      for (int w = N_WR - 1; w >= 0; w--)
        if (wr_en[w] && int'(wr_slot[w]) >= N_EXT_IN)
          slot_q[wr_slot[w]] <= wr_data[w];
      for (int i = 0; i < N_EXT_IN; i++) slot_q[i] <= ext_in[i];
    end
  end

  always_comb begin
    for (int j = 0; j < N_EFF; j++) efferent[j] = slot_q[EFF_BASE + j];
  end

endmodule
