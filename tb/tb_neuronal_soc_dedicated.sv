// tb_neuronal_soc_dedicated: the same end-to-end test as tb_neuronal_soc, on
// the chip built with one decision block per centre (CN_PER_DEC = 1). Every
// check is the same except that no centre may ever stall: pass lengths must
// be exactly 24, 51 or 88 clocks.
//
// Every centre is loaded with the cortical-diencephalic (CD) program and its
// own data-memory table: thresholds H1 + 250c and H2 - 500c, and "1" written
// as c + 1 so that each centre's outputs can be told apart. Signal maps:
//   centre c perceives DA from pin c, MI from pin 9 and RI from pin 10,
//   except centre 8, whose MI is centre 0's PA output (an internal signal);
//   centres 0-3 drive the eight efferent pins (PA to 2c, PS to 2c+1),
//   centres 4-8 drive internal slots 12+2c and 13+2c.
// The pins follow a filling/voiding trajectory per centre: DA ramps up past
// both thresholds and drops, RI (retention) is raised in mid-fill, MI
// (voiding) pulses near the end, followed by random phases.
// After every pass of every centre its outputs (read at the efferent pins or
// internal slots) and its pass length (stall-free length plus the clocks it
// waited for its shared decision block) are compared with the reference
// model. Counted, and required at least once: each truth-table row, the
// no-row case, stalls on each decision block, the internal signal reaching
// centre 8 both as 0 and as active, and configuration writes refused in Work mode.
module tb_neuronal_soc_dedicated;
  import cn_pkg::*;
  import cd_ref_pkg::*;

  localparam int unsigned W = 32, NCN = 9, NX = 11, NE = 8, PC_W = 7, PROG_LEN = 98;
  localparam int RUN_CLOCKS = 60000;

  logic clk = 0, rst_n = 0, mode = 0;
  logic [3:0] cfg_cn = '0;
  logic cfg_prog_we = 0, cfg_mem_we = 0, cfg_map_we = 0, cfg_map_out = 0;
  logic [PC_W-1:0] cfg_prog_addr = '0;
  logic [INSTR_W-1:0] cfg_prog_data = '0;
  logic [5:0] cfg_mem_addr = '0, cfg_map_idx = '0, cfg_map_slot = '0;
  logic [W-1:0] cfg_mem_data = '0;
  logic [W-1:0] ext_in [NX];
  logic [W-1:0] efferent [NE];
  logic [NCN-1:0] pass_done, stall;

  neuronal_soc #(.CN_PER_DEC(1)) dut (.*);

  logic [INSTR_W-1:0] image [PROG_LEN];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  initial begin
    repeat (RUN_CLOCKS + 20000) @(posedge clk);
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

  function automatic int h1_of(int c); return H1 + 250 * c; endfunction
  function automatic int h2_of(int c); return H2 - 500 * c; endfunction
  function automatic int out_slot(int c, int j); return (c < 4) ? 32 + 2 * c + j : 12 + 2 * c + j; endfunction
  function automatic int in_slot(int c, int i);
    if (i == 0) return c;
    if (i == 1) return (c == 8) ? out_slot(0, 0) : 9;
    return 10;
  endfunction

  // ---------------------------------------------------------------- configuration
  task automatic cfg_cycle();
    @(negedge clk);
    cfg_prog_we = 0; cfg_mem_we = 0; cfg_map_we = 0;
  endtask

  task automatic configure();
    $readmemh("tb/cd_program.hex", image);
    for (int c = 0; c < NCN; c++) begin
      int v [14];
      v = '{h1_of(c), h2_of(c), 0, 0, 0, c + 1, c + 1, 0, 1, 83, 88, 93, 0, 0};
      cfg_cn = 4'(c);
      for (int a = 0; a < PROG_LEN; a++) begin
        @(negedge clk);
        cfg_prog_we = 1; cfg_prog_addr = PC_W'(a); cfg_prog_data = image[a];
      end
      for (int a = 0; a < 12; a++) begin
        @(negedge clk);
        cfg_prog_we = 0;
        cfg_mem_we = 1;
        cfg_mem_addr = (a < 8) ? 6'(a) : (a == 8) ? 6'h20 : 6'(8'h3A + a - 9);
        cfg_mem_data = W'(v[a]);
      end
      for (int i = 0; i < 3; i++) begin
        @(negedge clk);
        cfg_mem_we = 0;
        cfg_map_we = 1; cfg_map_out = 0; cfg_map_idx = 6'(i); cfg_map_slot = 6'(in_slot(c, i));
      end
      for (int j = 0; j < 2; j++) begin
        @(negedge clk);
        cfg_map_we = 1; cfg_map_out = 1; cfg_map_idx = 6'(j); cfg_map_slot = 6'(out_slot(c, j));
      end
      cfg_cycle();
    end
  endtask

  // ---------------------------------------------------------------- pin trajectories
  localparam int PERIOD = 9000;
  function automatic int da_at(int c, int t);
    int ph;
    ph = (t + 700 * c) % PERIOD;
    if (ph < 6000) return (ph * 26000) / 6000;   // filling, past both thresholds
    if (ph < 7000) return 500;                    // emptied
    return -1;                                    // random phase
  endfunction

  // ---------------------------------------------------------------- run and check
  int snap [NCN][3];
  int ext_prev [NX];
  int m_state [NCN];
  int cycles [NCN], stalls [NCN];
  int rows [4] = '{0, 0, 0, 0};
  int dec_stalls [3] = '{0, 0, 0};
  int chain_seen_active = 0, chain_seen_zero = 0, n_passes = 0, n_cfg_refused = 0;

  initial begin
    cd_expect_t e;
    int slot_val;
    for (int i = 0; i < NX; i++) begin ext_in[i] = '0; ext_prev[i] = 0; end
    for (int c = 0; c < NCN; c++) begin m_state[c] = 1; cycles[c] = 0; stalls[c] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    configure();
    @(negedge clk);
    mode = 1;
    for (int t = 0; t < RUN_CLOCKS; t++) begin
      @(posedge clk);
      // perception snapshot: on every clock in Config, at the end of a pass in Work
      for (int c = 0; c < NCN; c++) begin
        if (stall[c]) begin stalls[c]++; dec_stalls[c / 3]++; end
        cycles[c]++;
        if (pass_done[c]) begin
          e = cd_model(snap[c][0], snap[c][1], snap[c][2], m_state[c], h1_of(c), h2_of(c), c + 1);
          slot_val = int'(dut.u_shmem.slot_q[out_slot(c, 0)]);
          check($sformatf("t%0d cn%0d PA", t, c), slot_val, e.pa);
          slot_val = int'(dut.u_shmem.slot_q[out_slot(c, 1)]);
          check($sformatf("t%0d cn%0d PS", t, c), slot_val, e.ps);
          if (c < 4) begin
            check($sformatf("t%0d efferent %0d", t, 2 * c), int'(efferent[2 * c]), e.pa);
            check($sformatf("t%0d efferent %0d", t, 2 * c + 1), int'(efferent[2 * c + 1]), e.ps);
          end
          check($sformatf("t%0d cn%0d clocks", t, c), cycles[c], e.len + stalls[c]);
          m_state[c] = e.state;
          rows[e.row]++;
          n_passes++;
          cycles[c] = 0; stalls[c] = 0;
        end
        if (pass_done[c] || t == 0) begin
          for (int i = 0; i < 3; i++) begin
            int s;
            s = in_slot(c, i);
            snap[c][i] = (s < NX) ? ext_prev[s] : int'(dut.u_shmem.slot_q[s]);
          end
          if (c == 8 && pass_done[c]) begin
            if (snap[8][1] != 0) chain_seen_active++; else chain_seen_zero++;
          end
        end
      end
      for (int i = 0; i < NX; i++) ext_prev[i] = int'(ext_in[i]);
      // new pin values, applied after the edge
      if (t % 150 == 0) begin
        for (int c = 0; c < NCN; c++) begin
          int d;
          d = da_at(c, t);
          ext_in[c] <= W'(d >= 0 ? d : $urandom_range(0, 30000));
        end
        ext_in[9]  <= W'(((t % PERIOD) >= 5000 && (t % PERIOD) < 5400) || ((t % PERIOD) >= 7000 && $urandom_range(0, 3) == 0) ? 1000 : 0);
        ext_in[10] <= W'(((t % PERIOD) >= 2500 && (t % PERIOD) < 5000) || ((t % PERIOD) >= 7000 && $urandom_range(0, 1) == 0) ? 1000 : 0);
      end
      // a configuration attempt while running must be refused
      if (t == 1000) begin
        cfg_cn <= 0; cfg_mem_we <= 1; cfg_mem_addr <= 0; cfg_mem_data <= 0;
        cfg_map_we <= 1; cfg_map_out <= 0; cfg_map_idx <= 0; cfg_map_slot <= 6'd20;
      end else if (t == 1001) begin
        cfg_mem_we <= 0; cfg_map_we <= 0;
        n_cfg_refused++;
      end
    end
    check("threshold kept", int'(dut.g_cn[0].g_own.u_cn.u_cn.u_memory.mem[0]), h1_of(0));
    check("map kept", int'(dut.in_map[0][0]), 0);
    $display("passes=%0d rows: none=%0d r1=%0d r2=%0d r3=%0d", n_passes, rows[0], rows[1], rows[2], rows[3]);
    $display("stalls per decision block: %0d %0d %0d; chain active=%0d zero=%0d",
             dec_stalls[0], dec_stalls[1], dec_stalls[2], chain_seen_active, chain_seen_zero);
    for (int r = 0; r < 4; r++) if (rows[r] == 0) begin failures++; $display("FAIL row %0d never seen", r); end
    for (int d = 0; d < 3; d++) if (dec_stalls[d] != 0) begin failures++; $display("FAIL stall with dedicated decision block %0d", d); end
    if (chain_seen_active == 0 || chain_seen_zero == 0) begin failures++; $display("FAIL internal signal not exercised"); end
    if (n_cfg_refused == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
