// tb_program_memory: self-checking test of the program memory.
// Loads the CD-centre program from tb/cd_program.hex through the
// configuration port, reads it back word by word and field by field, then
// checks that configuration writes are ignored in Work mode.
module tb_program_memory;
  import cn_pkg::*;
  localparam int unsigned PC_W = 7, LEN = 98;

  logic clk = 0, mode = 0, cfg_we = 0;
  logic [PC_W-1:0] cfg_addr = '0, rd_addr = '0;
  logic [INSTR_W-1:0] cfg_data = '0;
  instr_t instr;
  logic [INSTR_W-1:0] image [LEN];
  int checks = 0, failures = 0;

  program_memory #(.PC_W(PC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [INSTR_W-1:0] got, logic [INSTR_W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %05h expected %05h", what, got, exp);
    end
  endtask

  initial begin
    $readmemh("tb/cd_program.hex", image);
    for (int a = 0; a < LEN; a++) begin
      @(negedge clk);
      cfg_we = 1; cfg_addr = PC_W'(a); cfg_data = image[a];
    end
    @(negedge clk); cfg_we = 0;
    for (int a = 0; a < LEN; a++) begin
      rd_addr = PC_W'(a);
      #1 check($sformatf("word %0d", a), instr, image[a]);
    end
    // field decode of word 2: GT, ALU both registers -> MEMORY 3D
    rd_addr = 2;
    #1;
    checks++;
    if (instr.op != OP_GT || instr.src_blk != SRC_ALU || instr.src_addr != 6'd3
        || instr.dst_blk != DST_MEMORY || instr.dst_addr != 6'h3D) begin
      failures++; $display("FAIL field decode");
    end
    mode = 1;
    @(negedge clk); cfg_we = 1; cfg_addr = 0; cfg_data = '0;
    @(negedge clk); cfg_we = 0;
    rd_addr = 0; #1 check("locked in Work", instr, image[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
