// tb_shared_memory: self-checking test of the compartmentalised signal memory.
// Random pin inputs and random writes from nine ports (often colliding, often
// aimed at the input compartment) every clock; the whole memory and the
// efferent outputs are compared with a reference after each clock.
module tb_shared_memory;
  localparam int unsigned W = 32, AW = 6, NX = 11, NE = 8, EB = 32, NW = 9;

  logic clk = 0, rst_n = 0;
  logic [W-1:0] ext_in [NX];
  logic [NW-1:0] wr_en = '0;
  logic [AW-1:0] wr_slot [NW];
  logic [W-1:0] wr_data [NW];
  logic [W-1:0] slot_q [2**AW];
  logic [W-1:0] efferent [NE];
  logic [W-1:0] model [2**AW];
  int checks = 0, failures = 0, n_collide = 0, n_blocked = 0;

  shared_memory #(.DATA_W(W), .SLOT_AW(AW), .N_EXT_IN(NX), .N_EFF(NE), .EFF_BASE(EB), .N_WR(NW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2**AW; s++) model[s] = '0;
    for (int i = 0; i < NX; i++) ext_in[i] = '0;
    for (int w = 0; w < NW; w++) begin wr_slot[w] = '0; wr_data[w] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      for (int i = 0; i < NX; i++) ext_in[i] = W'($urandom);
      for (int w = 0; w < NW; w++) begin
        wr_en[w]   = $urandom_range(0, 1);
        wr_slot[w] = AW'($urandom_range(0, 15) == 0 ? $urandom_range(0, NX - 1) : $urandom_range(NX, 45));
        wr_data[w] = W'($urandom);
      end
      @(posedge clk);
      // reference: lowest-numbered writer wins, input compartment belongs to the pins
      for (int w = NW - 1; w >= 0; w--)
        if (wr_en[w]) begin
          if (wr_slot[w] < NX) n_blocked++;
          else model[wr_slot[w]] = wr_data[w];
          for (int v = 0; v < w; v++) if (wr_en[v] && wr_slot[v] == wr_slot[w]) n_collide++;
        end
      for (int i = 0; i < NX; i++) model[i] = ext_in[i];
      #1;
      for (int s = 0; s < 2**AW; s++) begin
        checks++;
        if (slot_q[s] !== model[s]) begin failures++; $display("FAIL slot %0d", s); end
      end
      for (int j = 0; j < NE; j++) begin
        checks++;
        if (efferent[j] !== model[EB + j]) begin failures++; $display("FAIL efferent %0d", j); end
      end
    end
    checks += 2;
    if (n_collide == 0) failures++;
    if (n_blocked == 0) failures++;
    $display("collisions=%0d blocked=%0d", n_collide, n_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
