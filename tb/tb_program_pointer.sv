// tb_program_pointer: self-checking test of the program pointer (Stack P).
// Checks hold-at-0 while not running, one step per clock, jumps to random
// targets, freezing with `hold`, and wrap-around at the top of the address range.
module tb_program_pointer;
  localparam int unsigned PC_W = 7;

  logic clk = 0, rst_n = 0, run = 0, hold = 0, jump = 0;
  logic [PC_W-1:0] target = '0, pc;
  logic [PC_W-1:0] model = '0;
  int checks = 0, failures = 0;

  program_pointer #(.PC_W(PC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      run    = (t < 5) ? 0 : ($urandom_range(0, 19) != 0);
      jump   = ($urandom_range(0, 9) == 0);
      hold   = ($urandom_range(0, 7) == 0);
      target = PC_W'($urandom);
      @(posedge clk);
      if (!run)      model = '0;
      else if (hold) model = model;
      else if (jump) model = target;
      else           model = model + 1'b1;
      #1;
      checks++;
      if (pc !== model) begin
        failures++;
        $display("FAIL t=%0d pc=%0d expected %0d", t, pc, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
