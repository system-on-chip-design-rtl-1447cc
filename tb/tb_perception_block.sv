// tb_perception_block: self-checking test of the perception block.
// Drives random input signals, checks that the selected output shows the
// snapshot taken on the last clock with `sample` high (and not the live
// inputs), and that an address beyond the number of inputs reads 0.
module tb_perception_block;
  import cn_pkg::*;
  localparam int unsigned W = 32, N = 3;

  logic clk = 0, rst_n = 0, sample = 0;
  logic [W-1:0] in_sig [N];
  logic [IADDR_W-1:0] sel = '0;
  logic [W-1:0] out;
  logic [W-1:0] model [N];
  int checks = 0, failures = 0;

  perception_block #(.DATA_W(W), .N_IN(N)) dut (.*);

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

  initial begin
    for (int i = 0; i < N; i++) begin in_sig[i] = '0; model[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) in_sig[i] = W'($urandom);
      sample = ($urandom_range(0, 2) == 0);
      @(posedge clk);
      if (sample) for (int i = 0; i < N; i++) model[i] = in_sig[i];
      @(negedge clk);
      sample = 0;
      for (int i = 0; i < N; i++) in_sig[i] = W'($urandom);   // live change must not show
      for (int s = 0; s < N + 2; s++) begin
        sel = IADDR_W'(s);
        #1 check($sformatf("sel %0d", s), out, s < N ? model[s] : '0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
