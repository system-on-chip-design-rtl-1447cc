// tb_memorisation_block: self-checking test of the data memory.
// Writes the CD-centre configuration table through the configuration port in
// Config mode, checks that work-port writes are ignored there, then in Work
// mode checks that configuration writes are ignored, that work writes land,
// and that random read/write traffic matches a reference array.
module tb_memorisation_block;
  localparam int unsigned W = 32, AW = 6;

  logic clk = 0, mode = 0;
  logic cfg_we = 0, wr_en = 0;
  logic [AW-1:0] cfg_addr = '0, rd_addr = '0, wr_addr = '0;
  logic [W-1:0] cfg_data = '0, wr_data = '0, rd_data;
  logic [W-1:0] model [2**AW];
  int checks = 0, failures = 0;

  memorisation_block #(.DATA_W(W), .ADDR_W(AW)) dut (.*);

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

  task automatic cfg_write(int a, logic [W-1:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_addr = AW'(a); cfg_data = d;
    wr_en = 1; wr_addr = AW'(a); wr_data = ~d;   // must be ignored in Config mode
    @(posedge clk);
    model[a] = d;
    @(negedge clk);
    cfg_we = 0; wr_en = 0;
  endtask

  task automatic read_all();
    for (int a = 0; a < 2**AW; a++) begin
      rd_addr = AW'(a);
      #1 check($sformatf("mem[%0h]", a), rd_data, model[a]);
    end
  endtask

  initial begin
    for (int a = 0; a < 2**AW; a++) cfg_write(a, W'($urandom));
    cfg_write(0, 2000); cfg_write(1, 18200);
    cfg_write('h3A, 83); cfg_write('h3B, 88); cfg_write('h3C, 93); cfg_write('h20, 1);
    read_all();
    mode = 1;
    // configuration port is locked in Work mode
    @(negedge clk); cfg_we = 1; cfg_addr = 0; cfg_data = 7;
    @(posedge clk); @(negedge clk); cfg_we = 0;
    rd_addr = 0; #1 check("cfg locked", rd_data, 2000);
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      wr_en = $urandom_range(0, 1);
      wr_addr = AW'($urandom); wr_data = W'($urandom);
      rd_addr = AW'($urandom);
      #1 check("read", rd_data, model[rd_addr]);
      @(posedge clk);
      if (wr_en) model[wr_addr] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
