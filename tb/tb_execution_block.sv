// tb_execution_block: self-checking test of the execution block.
// Random writes to output registers (including addresses beyond the number of
// outputs, which must be ignored); after every clock each output must hold
// the last value written to it.
module tb_execution_block;
  import cn_pkg::*;
  localparam int unsigned W = 32, N = 2;

  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [IADDR_W-1:0] sel = '0;
  logic [W-1:0] data = '0;
  logic [W-1:0] out_sig [N];
  logic [W-1:0] model [N];
  int checks = 0, failures = 0;

  execution_block #(.DATA_W(W), .N_OUT(N)) dut (.*);

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
    for (int i = 0; i < N; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    for (int i = 0; i < N; i++) check("reset", out_sig[i], '0);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      wr_en = $urandom_range(0, 1);
      sel   = IADDR_W'($urandom_range(0, N + 1));
      data  = W'($urandom);
      @(posedge clk);
      if (wr_en && sel < N) model[sel] = data;
      #1;
      for (int i = 0; i < N; i++) check($sformatf("out%0d", i), out_sig[i], model[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
