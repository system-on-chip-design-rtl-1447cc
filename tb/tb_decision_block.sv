// tb_decision_block: self-checking test of the decision block (ALU).
// Loads random and corner values into REG 0 and REG 1 through the load port
// and compares every operation's result with values computed here: logical
// AND/OR/NOT (non-zero is true), equality and signed greater-than, plus the
// LOAD pass-through of either register.
module tb_decision_block;
  import cn_pkg::*;
  localparam int unsigned W = 32;

  logic clk = 0, rst_n = 0;
  logic load_en = 0, load_sel = 0;
  logic [W-1:0] load_data = '0;
  op_e op = OP_NULL;
  logic operand_sel = 0;
  logic [W-1:0] result, reg0_q;
  int checks = 0, failures = 0;

  decision_block #(.DATA_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic load(logic sel, logic [W-1:0] d);
    load_en <= 1; load_sel <= sel; load_data <= d;
    @(posedge clk);
    load_en <= 0;
    @(negedge clk);
  endtask

  task automatic run_ops(logic signed [W-1:0] a, logic signed [W-1:0] b);
    load(0, a);
    load(1, b);
    check("reg0_q", reg0_q, a);
    op = OP_AND;  operand_sel = 1; #1 check("AND", result, W'(a != 0 && b != 0));
    op = OP_OR;   #1 check("OR",  result, W'(a != 0 || b != 0));
    op = OP_EQ;   #1 check("EQ",  result, W'(a == b));
    op = OP_GT;   #1 check("GT",  result, W'(a > b));
    op = OP_NOT;  operand_sel = 0; #1 check("NOT0", result, W'(a == 0));
    operand_sel = 1; #1 check("NOT1", result, W'(b == 0));
    op = OP_LOAD; operand_sel = 0; #1 check("LOAD0", result, a);
    operand_sel = 1; #1 check("LOAD1", result, b);
    op = OP_NULL; #1 check("NULL", result, '0);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check("reset reg0", reg0_q, '0);
    run_ops(2000, 1500);
    run_ops(1500, 2000);
    run_ops(18200, 18200);
    run_ops(0, 1000);
    run_ops(1000, 0);
    run_ops(0, 0);
    run_ops(-5, 3);
    run_ops(88, 1);
    for (int i = 0; i < 200; i++) begin
      logic [W-1:0] a, b;
      a = $urandom_range(0, 3) == 0 ? '0 : W'($urandom);
      b = $urandom_range(0, 3) == 0 ? a  : W'($urandom);
      run_ops(a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
