// tb_decision_cluster: self-checking test of a decision block shared by three
// centres. Random requests, operations and register loads on all ports every
// clock. Checked here: at most one grant per clock, a grant only to a
// requester, round-robin order (a requester is served within N_PORTS clocks),
// the granted port's result computed with its own registers, and that a
// register load on one port never changes another port's registers.
module tb_decision_cluster;
  import cn_pkg::*;
  localparam int unsigned W = 32, N = 3;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] req = '0, gnt, operand_sel = '0, load_en = '0, load_sel = '0;
  op_e op [N];
  logic [W-1:0] result [N], reg0_q [N], load_data [N];
  logic [W-1:0] m0 [N], m1 [N];
  int wait_cnt [N];
  int checks = 0, failures = 0, n_conflict = 0;

  decision_cluster #(.DATA_W(W), .N_PORTS(N)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
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

  initial begin
    for (int p = 0; p < N; p++) begin
      op[p] = OP_NULL; load_data[p] = '0; m0[p] = '0; m1[p] = '0; wait_cnt[p] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      for (int p = 0; p < N; p++) begin
        // a port keeps asking until it is served, like a stalled centre
        if (!req[p] || wait_cnt[p] == 0) begin
          req[p] = ($urandom_range(0, 2) != 0);
          op[p]  = op_e'($urandom_range(1, 6));
          operand_sel[p] = $urandom_range(0, 1);
        end
        load_en[p]   = ($urandom_range(0, 1) == 0);
        load_sel[p]  = $urandom_range(0, 1);
        load_data[p] = ($urandom_range(0, 3) == 0) ? W'($urandom_range(0, 3)) : W'($urandom);
      end
      #1;
      checks++;
      if (!$onehot0(gnt) || (gnt & ~req) != 0 || (req != 0 && gnt == 0)) begin
        failures++; $display("FAIL grant %b for req %b", gnt, req);
      end
      if ($countones(req) > 1) n_conflict++;
      for (int p = 0; p < N; p++) begin
        check($sformatf("reg0 %0d", p), reg0_q[p], m0[p]);
        if (gnt[p]) check($sformatf("result %0d", p), result[p], ref_model(op[p], operand_sel[p], m0[p], m1[p]));
      end
      @(posedge clk);
      for (int p = 0; p < N; p++) begin
        if (load_en[p]) begin
          if (load_sel[p]) m1[p] = load_data[p]; else m0[p] = load_data[p];
        end
        if (req[p] && !gnt[p]) begin
          wait_cnt[p]++;
          checks++;
          if (wait_cnt[p] >= N) begin failures++; $display("FAIL port %0d starved", p); end
        end else wait_cnt[p] = 0;
      end
    end
    checks++;
    if (n_conflict == 0) begin failures++; $display("FAIL no conflicting requests"); end
    $display("conflicts=%0d", n_conflict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
