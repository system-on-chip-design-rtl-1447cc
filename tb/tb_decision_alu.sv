// tb_decision_alu: self-checking test of the decision block's operation units.
// Applies corner and random operand pairs and every operation code, and
// compares the result with values computed here.
module tb_decision_alu;
  import cn_pkg::*;
  localparam int unsigned W = 32;

  op_e op;
  logic operand_sel;
  logic [W-1:0] r0, r1, result;
  int checks = 0, failures = 0;
  logic clk = 0;

  decision_alu #(.DATA_W(W)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] ref_model(op_e o, logic s, logic signed [W-1:0] a, logic signed [W-1:0] b);
    case (o)
      OP_LOAD: return s ? b : a;
      OP_AND:  return (a != 0 && b != 0) ? 1 : 0;
      OP_OR:   return (a != 0 || b != 0) ? 1 : 0;
      OP_NOT:  return ((s ? b : a) == 0) ? 1 : 0;
      OP_EQ:   return (a == b) ? 1 : 0;
      OP_GT:   return (a > b) ? 1 : 0;
      default: return 0;
    endcase
  endfunction

  task automatic try_all(logic [W-1:0] a, logic [W-1:0] b);
    r0 = a; r1 = b;
    for (int o = 0; o < 8; o++)
      for (int s = 0; s < 2; s++) begin
        op = op_e'(o); operand_sel = s[0];
        #1;
        checks++;
        if (result !== ref_model(op, operand_sel, a, b)) begin
          failures++;
          $display("FAIL op=%0d sel=%0d a=%0d b=%0d got %0d", o, s, a, b, result);
        end
      end
  endtask

  initial begin
    #2;
    try_all(2000, 1999); try_all(1999, 2000); try_all(2000, 2000);
    try_all(0, 0); try_all(0, 1000); try_all(1000, 0);
    try_all(32'hFFFF_FFFF, 1); try_all(1, 32'h8000_0000); try_all(88, 1);
    for (int i = 0; i < 500; i++) begin
      logic [W-1:0] a, b;
      a = ($urandom_range(0, 3) == 0) ? '0 : W'($urandom);
      b = ($urandom_range(0, 3) == 0) ? a  : W'($urandom);
      try_all(a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
