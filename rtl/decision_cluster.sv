// decision_cluster: one decision block shared by several nerve centres.
//
// The published SoC gives every three CN blocks one decision block, because
// the centres seldom need the operation units at the same moment. Here the
// costly part, the operation units and output multiplexer (decision_alu), is
// built once per cluster, while each centre keeps its own pair of operand
// registers (REG 0, REG 1) so that centres interleaving their instructions do
// not disturb each other's operands. Loading a register needs no arbitration:
// each centre writes its own pair. An instruction that needs a result raises
// req; a round-robin arbiter grants one requester per clock, the ALU computes
// with that centre's registers and its operation, and the result goes back to
// it in the same cycle. A centre that is not granted stalls and asks again.
//
// Sharing one decision block among three centres follows the published
// design; the per-centre operand registers, the round-robin order and the
// same-cycle grant are this design's choices (the document does not say how
// the sharing works).
module decision_cluster
  import cn_pkg::*;
#(
  parameter int unsigned DATA_W  = 32,
  parameter int unsigned N_PORTS = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N_PORTS-1:0]   req,
  output logic [N_PORTS-1:0]   gnt,
  input  op_e                  op          [N_PORTS],
  input  logic [N_PORTS-1:0]   operand_sel,
  output logic [DATA_W-1:0]    result      [N_PORTS],
  output logic [DATA_W-1:0]    reg0_q      [N_PORTS],
  input  logic [N_PORTS-1:0]   load_en,
  input  logic [N_PORTS-1:0]   load_sel,
  input  logic [DATA_W-1:0]    load_data   [N_PORTS]
);

  localparam int unsigned PW = (N_PORTS > 1) ? $clog2(N_PORTS) : 1;

  logic [DATA_W-1:0] r0 [N_PORTS];
  logic [DATA_W-1:0] r1 [N_PORTS];

  // per-centre operand registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < N_PORTS; p++) begin
        r0[p] <= '0;
        r1[p] <= '0;
      end
    end else begin
      for (int p = 0; p < N_PORTS; p++)
        if (load_en[p]) begin
          if (load_sel[p]) r1[p] <= load_data[p];
          else             r0[p] <= load_data[p];
        end
    end
  end

  // round-robin arbiter: search starts one past the last granted port
  logic [PW-1:0] last, sel;
  logic          any;

  always_comb begin
    gnt = '0;
    sel = last;
    any = 1'b0;
    for (int k = 1; k <= N_PORTS; k++) begin
      int p;
      p = (int'(last) + k) % N_PORTS;
      if (!any && req[p]) begin
        any    = 1'b1;
        sel    = PW'(p);
        gnt[p] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   last <= PW'(N_PORTS - 1);
    else if (any) last <= sel;
  end

  // the shared operation units
  logic [DATA_W-1:0] alu_out;

  decision_alu #(.DATA_W(DATA_W)) u_alu (
    .op         (op[sel]),
    .operand_sel(operand_sel[sel]),
    .r0         (r0[sel]),
    .r1         (r1[sel]),
    .result     (alu_out)
  );

  always_comb begin
    for (int p = 0; p < N_PORTS; p++) begin
      result[p] = gnt[p] ? alu_out : '0;
      reg0_q[p] = r0[p];
    end
  end

  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  a_grant_requested: assert property (@(posedge clk) disable iff (!rst_n) (gnt & ~req) == '0);

endmodule
