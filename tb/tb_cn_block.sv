// tb_cn_block: test of a CN block that must wait for a shared decision block.
//
// The testbench plays the decision block itself: it keeps the two operand
// registers, computes the operations, and grants requests at random (about
// two in three). The CN block runs the CD program on random samples; after
// every pass its outputs, its stored state and its pass length (the stall-free
// length plus the clocks it was refused) are compared with the reference
// model, and every refused request must leave the pointer and all state
// untouched. Stalls, all three truth-table rows and the no-row case must occur.
module tb_cn_block;
  import cn_pkg::*;
  import cd_ref_pkg::*;

  localparam int unsigned W = 32, PC_W = 7, PROG_LEN = 98;

  logic clk = 0, rst_n = 0, mode = 0;
  logic cfg_prog_we = 0, cfg_mem_we = 0;
  logic [PC_W-1:0] cfg_prog_addr = '0;
  logic [INSTR_W-1:0] cfg_prog_data = '0;
  logic [5:0] cfg_mem_addr = '0;
  logic [W-1:0] cfg_mem_data = '0;
  logic [W-1:0] in_sig [3];
  logic [W-1:0] out_sig [2];
  logic out_we, dec_req, dec_gnt = 0, dec_operand_sel, dec_load_en, dec_load_sel;
  logic [IADDR_W-1:0] out_sel;
  logic [W-1:0] out_data, dec_result, dec_reg0, dec_load_data;
  op_e dec_op;
  logic pass_done, stall;
  logic [PC_W-1:0] pc;

  logic [INSTR_W-1:0] image [PROG_LEN];
  logic [W-1:0] r0 = '0, r1 = '0;
  int checks = 0, failures = 0;
  int rows [4] = '{0, 0, 0, 0};
  int n_stall = 0;

  cn_block dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // the decision block, played by the testbench
  always_comb begin
    logic [W-1:0] s;
    s = dec_operand_sel ? r1 : r0;
    case (dec_op)
      OP_LOAD: dec_result = s;
      OP_AND:  dec_result = W'(r0 != 0 && r1 != 0);
      OP_OR:   dec_result = W'(r0 != 0 || r1 != 0);
      OP_NOT:  dec_result = W'(s == 0);
      OP_EQ:   dec_result = W'(r0 == r1);
      OP_GT:   dec_result = W'($signed(r0) > $signed(r1));
      default: dec_result = '0;
    endcase
    if (!dec_gnt) dec_result = 'x;
  end
  assign dec_reg0 = r0;
  always_ff @(posedge clk)
    if (dec_load_en) begin
      if (dec_load_sel) r1 <= dec_load_data; else r0 <= dec_load_data;
    end

  always @(negedge clk) dec_gnt <= ($urandom_range(0, 2) != 0);

  task automatic cfg_mem(int a, int d);
    @(negedge clk);
    cfg_mem_we = 1; cfg_mem_addr = 6'(a); cfg_mem_data = W'(d);
    @(negedge clk);
    cfg_mem_we = 0;
  endtask

  int sda[$], smi[$], sri[$];

  initial begin
    int k, cycles, stalls, m_state, pc_before;
    cd_expect_t e;
    for (int i = 0; i < 200; i++) begin
      int kind;
      kind = $urandom_range(0, 3);
      case (kind)
        0: sda.push_back($urandom_range(0, H1 - 1));
        1, 2: sda.push_back($urandom_range(H1, H2 - 1));
        default: sda.push_back($urandom_range(H2, 30000));
      endcase
      smi.push_back($urandom_range(0, 2) == 0 ? 1000 : 0);
      sri.push_back($urandom_range(0, 1) == 0 ? 1000 : 0);
      if (i % 10 == 9) begin   // pull the state back up now and then
        sda[i] = 25000;
      end
    end
    for (int i = 0; i < 3; i++) in_sig[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    $readmemh("tb/cd_program.hex", image);
    for (int a = 0; a < PROG_LEN; a++) begin
      @(negedge clk);
      cfg_prog_we = 1; cfg_prog_addr = PC_W'(a); cfg_prog_data = image[a];
    end
    @(negedge clk); cfg_prog_we = 0;
    cfg_mem(0, H1); cfg_mem(1, H2);
    cfg_mem(2, 0); cfg_mem(3, 0); cfg_mem(4, 0); cfg_mem(5, 1); cfg_mem(6, 1); cfg_mem(7, 0);
    cfg_mem('h20, 1); cfg_mem('h3A, 83); cfg_mem('h3B, 88); cfg_mem('h3C, 93);
    @(negedge clk);
    in_sig[0] = W'(sda[0]); in_sig[1] = W'(smi[0]); in_sig[2] = W'(sri[0]);
    @(negedge clk);
    mode = 1;
    in_sig[0] = W'(sda[1]); in_sig[1] = W'(smi[1]); in_sig[2] = W'(sri[1]);
    k = 0; cycles = 0; stalls = 0; m_state = 1;
    while (k < sda.size()) begin
      @(posedge clk);
      cycles++;
      pc_before = int'(pc);
      if (stall) begin
        stalls++; n_stall++;
        checks++;
        if (out_we || dec_load_en || pass_done || dut.wr_mem) begin
          failures++; $display("FAIL write while stalled");
        end
      end
      if (pass_done) begin
        e = cd_model(sda[k], smi[k], sri[k], m_state, H1, H2, 1);
        check($sformatf("pass %0d PA", k), int'(out_sig[0]), e.pa);
        check($sformatf("pass %0d PS", k), int'(out_sig[1]), e.ps);
        check($sformatf("pass %0d clocks", k), cycles, e.len + stalls);
        check($sformatf("pass %0d state", k), int'(dut.u_memory.mem[6'h20]), e.state);
        m_state = e.state;
        rows[e.row]++;
        k++; cycles = 0; stalls = 0;
        if (k + 1 < sda.size()) begin
          in_sig[0] <= W'(sda[k+1]); in_sig[1] <= W'(smi[k+1]); in_sig[2] <= W'(sri[k+1]);
        end
      end
      if (stall) begin
        #1 check("pointer held", int'(pc), pc_before);
      end
    end
    $display("rows: none=%0d r1=%0d r2=%0d r3=%0d stalls=%0d", rows[0], rows[1], rows[2], rows[3], n_stall);
    for (int r = 0; r < 4; r++) if (rows[r] == 0) begin failures++; $display("FAIL row %0d never seen", r); end
    if (n_stall == 0) begin failures++; $display("FAIL no stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
