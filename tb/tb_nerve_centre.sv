// tb_nerve_centre: end-to-end test of the nerve-centre core running the
// cortical-diencephalic (CD) centre, with every parameter at its default.
//
// 1. Config mode: the CD micro-program (tb/cd_program.hex, 98 words) is
//    written into the program memory and the CD data-memory table into the
//    data memory (thresholds 2.00 and 18.2 scaled by 1000, output values,
//    previous state 1, jump addresses 83/88/93).
// 2. Work mode: a synthetic urodynamic trace is applied, one sample per
//    program pass: detrusor afferent DA ramps up while the retention signal
//    RI is raised, the micturition signal MI fires, DA crosses the upper
//    threshold and drops back; random samples and samples that match no row
//    of the truth table follow.
// 3. After every pass the outputs (to PA and PS), the pass length in clocks
//    and the stored state are compared with a model of the truth table
//    written here.
// Each behaviour of the centre is counted (storage, retention, micturition
// by MI, micturition by DA >= upper threshold, no matching row with the
// state dropping to 0, recovery from state 0, configuration lock) and one
// that never happened counts as a failure.
module tb_nerve_centre;
  import cn_pkg::*;

  localparam int unsigned W = 32, NI = 3, NO = 2, PC_W = 7, PROG_LEN = 98;
  localparam int H1 = 2000, H2 = 18200;   // 2.00 and 18.2, times 1000

  logic clk = 0, rst_n = 0, mode = 0;
  logic cfg_prog_we = 0, cfg_mem_we = 0;
  logic [PC_W-1:0] cfg_prog_addr = '0;
  logic [INSTR_W-1:0] cfg_prog_data = '0;
  logic [5:0] cfg_mem_addr = '0;
  logic [W-1:0] cfg_mem_data = '0;
  logic [W-1:0] in_sig [NI];
  logic [W-1:0] out_sig [NO];
  logic pass_done;
  logic [PC_W-1:0] pc;
  logic out_we;
  logic [5:0] out_sel;
  logic [W-1:0] out_data;
  int n_out_writes = 0;
  logic last_we = 0;
  logic last_sel = 0;
  logic [W-1:0] last_data = '0;

  logic [INSTR_W-1:0] image [PROG_LEN];
  int checks = 0, failures = 0;

  // behaviour counters
  int n_storage = 0, n_retention = 0, n_void_mi = 0, n_void_da = 0;
  int n_nomatch = 0, n_recover = 0, n_cfg_lock = 0;

  nerve_centre dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  // ---------------------------------------------------------------- model
  int m_state = 1;
  typedef struct { int pa, ps, len, state; int row; } expect_t;

  function automatic expect_t model(int da, int mi, int ri, int prev);
    expect_t e;
    bit band, c1, c2, c3;
    band = (da >= H1) && (da < H2);
    c1 = (da < H1) && mi == 0 && ri == 0;
    c2 = band && mi == 0 && ri != 0;
    c3 = (band && mi != 0 && ri == 0) || (da >= H2);
    if (c1 && prev != 0)      begin e.pa = 0; e.ps = 0; e.len = 19 + 5; e.state = 1;  e.row = 1; end
    else if (c2 && prev != 0) begin e.pa = 0; e.ps = 1; e.len = 46 + 5; e.state = 1;  e.row = 2; end
    else if (c3 && prev != 0) begin e.pa = 1; e.ps = 0; e.len = 83 + 5; e.state = 1;  e.row = 3; end
    else                      begin e.pa = 0; e.ps = 0; e.len = 83 + 5; e.state = int'(c3); e.row = 0; end
    return e;
  endfunction

  // ---------------------------------------------------------------- stimulus
  int trace_da[$], trace_mi[$], trace_ri[$];

  task automatic push(int da, int mi, int ri);
    trace_da.push_back(da); trace_mi.push_back(mi); trace_ri.push_back(ri);
  endtask

  task automatic build_trace();
    // filling: DA rises, no voluntary signals
    for (int d = 0; d < H1; d += 400) push(d, 0, 0);
    // urge: DA in band, person retains (RI)
    for (int d = H1; d < 12000; d += 1500) push(d, 0, 1000);
    // suitable place found: MI fires, RI released -> micturition
    push(12500, 1000, 0); push(12500, 1000, 0);
    // back to retention, DA keeps rising to the upper threshold
    for (int d = 13000; d < H2; d += 2000) push(d, 0, 1000);
    push(H2, 0, 1000);       // exactly at the upper threshold: forced voiding
    push(25000, 0, 0);       // peak
    push(H2 - 1, 0, 0);      // band, no voluntary signal: no row matches
    push(H2 - 1, 0, 0);      // state stays 0
    push(21000, 0, 0);       // DA >= H2 with state 0: state recovers, outputs 0
    push(500, 0, 0);         // emptied: storage again
    push(H1 - 1, 0, 0);
    push(H1, 0, 1000);       // exactly at the lower threshold
    // random samples around the thresholds
    for (int i = 0; i < 150; i++) begin
      int da, kind;
      kind = $urandom_range(0, 4);
      case (kind)
        0: da = $urandom_range(0, H1 - 1);
        1: da = $urandom_range(H1, H2 - 1);
        2: da = $urandom_range(H2, 40000);
        3: da = H1 + int'($urandom_range(0, 2)) - 1;
        default: da = H2 + int'($urandom_range(0, 2)) - 1;
      endcase
      push(da, $urandom_range(0, 2) == 0 ? 1000 : 0, $urandom_range(0, 2) == 0 ? 1000 : 0);
    end
  endtask

  // ---------------------------------------------------------------- configuration
  task automatic cfg_mem(int a, int d);
    @(negedge clk);
    cfg_mem_we = 1; cfg_mem_addr = 6'(a); cfg_mem_data = W'(d);
    @(negedge clk);
    cfg_mem_we = 0;
  endtask

  task automatic configure();
    $readmemh("tb/cd_program.hex", image);
    for (int a = 0; a < PROG_LEN; a++) begin
      @(negedge clk);
      cfg_prog_we = 1; cfg_prog_addr = PC_W'(a); cfg_prog_data = image[a];
    end
    @(negedge clk); cfg_prog_we = 0;
    cfg_mem('h00, H1);  cfg_mem('h01, H2);
    cfg_mem('h02, 0);   cfg_mem('h03, 0);     // row 1: PA, PS
    cfg_mem('h04, 0);   cfg_mem('h05, 1);     // row 2
    cfg_mem('h06, 1);   cfg_mem('h07, 0);     // row 3
    cfg_mem('h20, 1);                          // previous state
    cfg_mem('h3A, 83);  cfg_mem('h3B, 88);  cfg_mem('h3C, 93);
  endtask

  // ---------------------------------------------------------------- run
  initial begin
    int k, cycles, prev_state;
    expect_t e;
    for (int i = 0; i < NI; i++) in_sig[i] = '0;
    build_trace();
    repeat (3) @(posedge clk);
    rst_n = 1;
    configure();
    // first sample is on the inputs when Work mode starts
    @(negedge clk);
    in_sig[0] = W'(trace_da[0]); in_sig[1] = W'(trace_mi[0]); in_sig[2] = W'(trace_ri[0]);
    @(negedge clk);
    mode = 1;
    // while pass k runs, sample k+1 waits on the inputs for the end-of-pass edge
    in_sig[0] = W'(trace_da[1]); in_sig[1] = W'(trace_mi[1]); in_sig[2] = W'(trace_ri[1]);
    k = 0;
    cycles = 0;
    while (k < trace_da.size()) begin
      @(posedge clk);
      cycles++;
      // configuration must be locked out while running
      if (k == 3 && cycles == 2) begin
        cfg_prog_we <= 1; cfg_prog_addr <= 0; cfg_prog_data <= '0;
        cfg_mem_we  <= 1; cfg_mem_addr  <= 0; cfg_mem_data  <= 0;
      end else begin
        cfg_prog_we <= 0; cfg_mem_we <= 0;
      end
      // the write strobe of the previous clock must agree with the register it updated
      if (last_we) check("output write shown", int'(out_sig[last_sel]), int'(last_data));
      last_we = out_we; last_sel = out_sel[0]; last_data = out_data;
      if (out_we) n_out_writes++;
      if (pass_done) begin
        check($sformatf("pass %0d output writes", k), n_out_writes, 2);
        n_out_writes = 0;
        prev_state = m_state;
        e = model(trace_da[k], trace_mi[k], trace_ri[k], m_state);
        check($sformatf("pass %0d PA", k), int'(out_sig[0]), e.pa);
        check($sformatf("pass %0d PS", k), int'(out_sig[1]), e.ps);
        check($sformatf("pass %0d clocks", k), cycles, e.len);
        check($sformatf("pass %0d state", k), int'(dut.u_cn.u_memory.mem[6'h20]), e.state);
        m_state = e.state;
        case (e.row)
          1: n_storage++;
          2: n_retention++;
          3: if (trace_da[k] >= H2) n_void_da++; else n_void_mi++;
          default: n_nomatch++;
        endcase
        if (prev_state == 0 && e.state == 1) n_recover++;
        if (k == 3) n_cfg_lock++;
        k++;
        cycles = 0;
        if (k + 1 < trace_da.size()) begin
          // sample k is captured at this edge; sample k+1 waits for the next one
          in_sig[0] <= W'(trace_da[k+1]); in_sig[1] <= W'(trace_mi[k+1]); in_sig[2] <= W'(trace_ri[k+1]);
        end
      end
    end
    // the configuration written while running must not have landed
    check("program locked", int'(dut.u_cn.u_prog.mem[0]), int'(image[0]));
    check("threshold locked", int'(dut.u_cn.u_memory.mem[0]), H1);
    $display("storage=%0d retention=%0d void_by_MI=%0d void_by_DA=%0d no_row=%0d recover=%0d cfg_lock=%0d",
             n_storage, n_retention, n_void_mi, n_void_da, n_nomatch, n_recover, n_cfg_lock);
    if (n_storage == 0)   begin failures++; $display("FAIL storage never seen"); end
    if (n_retention == 0) begin failures++; $display("FAIL retention never seen"); end
    if (n_void_mi == 0)   begin failures++; $display("FAIL voiding by MI never seen"); end
    if (n_void_da == 0)   begin failures++; $display("FAIL voiding by DA never seen"); end
    if (n_nomatch == 0)   begin failures++; $display("FAIL no-row case never seen"); end
    if (n_recover == 0)   begin failures++; $display("FAIL recovery never seen"); end
    if (n_cfg_lock == 0)  begin failures++; $display("FAIL config lock never tried"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
