// tb_cd_clinical_rate: the CD centre on a bladder-cycle recording arriving at
// the clock rate, as on the published test bench, where the data and the
// circuit both run at 1 Hz. A new (DA, MI, RI) sample is presented on every
// clock; the centre takes a snapshot only when a pass starts, so a pass of
// 24 to 88 clocks answers for the sample present at its start and skips the
// samples that arrive while it runs.
//
// The recording is synthetic (3000 samples, values scaled by 1000 like the
// published signals): filling with DA rising slowly; the urge, where DA
// passes the lower threshold and the person retains (RI raised); a
// voluntary micturition (MI raised, RI released) during which DA climbs
// past the upper threshold to its peak; emptying; and a quiet bladder. DA
// carries a little noise. RI and MI are raised exactly while DA is at or
// above the lower threshold, so every sample matches a row of the truth
// table and the stored state stays 1; the shape of the recording is this
// testbench's own.
//
// Checks, all against the truth-table model in cd_ref_pkg:
//  - at each end of pass, PA, PS, the stored state and the pass length for
//    the sample that was present on the clock edge where the pass started;
//  - the outputs go through storage (0,0), retention (0,1), micturition
//    (1,0) and storage again, in that order and with no other pair;
//  - the first micturition output appears within two passes of the longest
//    kind (176 clocks) of the MI onset, and storage returns within 176
//    clocks of DA falling below the lower threshold.
module tb_cd_clinical_rate;
  import cn_pkg::*;
  import cd_ref_pkg::*;

  localparam int unsigned W = 32, NI = 3, NO = 2, PC_W = 7, PROG_LEN = 98;
  localparam int N_SAMPLES = 3000;
  localparam int ONE = 1000;            // 1.0 scaled by 1000
  localparam int MAX_LAG = 2 * 88;

  logic clk = 0, rst_n = 0, mode = 0;
  logic cfg_prog_we = 0, cfg_mem_we = 0;
  logic [PC_W-1:0] cfg_prog_addr = '0;
  logic [INSTR_W-1:0] cfg_prog_data = '0;
  logic [5:0] cfg_mem_addr = '0;
  logic [W-1:0] cfg_mem_data = '0;
  logic [W-1:0] in_sig [NI];
  logic [W-1:0] out_sig [NO];
  logic out_we;
  logic [5:0] out_sel;
  logic [W-1:0] out_data;
  logic pass_done;
  logic [PC_W-1:0] pc;

  logic [INSTR_W-1:0] image [PROG_LEN];
  int checks = 0, failures = 0;

  int rec_da [N_SAMPLES], rec_mi [N_SAMPLES], rec_ri [N_SAMPLES];
  int t_mi_on = -1, t_empty = -1;

  nerve_centre dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (N_SAMPLES + 2000) @(posedge clk);
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

  // ---------------------------------------------------------------- recording
  function automatic int noise(int amp);
    return int'($urandom_range(0, 2 * amp)) - amp;
  endfunction

  task automatic build_recording();
    for (int t = 0; t < N_SAMPLES; t++) begin
      int da, mi, ri;
      mi = 0; ri = 0;
      if (t < 1500) begin
        // filling and urge: slow rise from 0.3 to about 12
        da = 300 + (t * 8) + noise(60);
        if (da >= H1) ri = ONE;
      end else if (t < 1700) begin
        // voluntary micturition: contraction builds to a 26.0 peak
        da = 12300 + (t - 1500) * 70 + noise(60);
        if (da >= H1) mi = ONE;
      end else if (t < 1900) begin
        // emptying: tension falls back
        da = 26300 - (t - 1700) * 140 + noise(60);
        if (da < 0) da = 0;
        if (da >= H1) mi = ONE;
      end else begin
        // quiet bladder
        da = 200 + noise(60);
      end
      rec_da[t] = da; rec_mi[t] = mi; rec_ri[t] = ri;
      if (mi != 0 && t_mi_on < 0) t_mi_on = t;
      if (t > 1700 && mi == 0 && t_empty < 0) t_empty = t;
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
    cfg_mem('h02, 0);   cfg_mem('h03, 0);
    cfg_mem('h04, 0);   cfg_mem('h05, 1);
    cfg_mem('h06, 1);   cfg_mem('h07, 0);
    cfg_mem('h20, 1);
    cfg_mem('h3A, 83);  cfg_mem('h3B, 88);  cfg_mem('h3C, 93);
  endtask

  // ---------------------------------------------------------------- run
  int t = 0;          // index of the sample on the inputs
  int snap = 0;       // sample captured by the running pass
  int phase = 0;      // 0 storage, 1 retention, 2 micturition, 3 storage again
  int t_first_pa = -1, t_back = -1;
  int passes = 0, cycles = 0, prev_state = 1;
  int n_phase [4] = '{default: 0};

  task automatic present(int i);
    in_sig[0] = W'(rec_da[i]); in_sig[1] = W'(rec_mi[i]); in_sig[2] = W'(rec_ri[i]);
  endtask

  initial begin
    cd_expect_t e;
    int pa, ps;
    build_recording();
    present(0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    configure();
    // Work mode starts with sample 0 on the inputs; the last Config edge
    // captures it
    @(negedge clk);
    present(0);
    @(negedge clk);
    mode = 1;
    t = 1;
    present(t);
    while (t < N_SAMPLES) begin
      @(posedge clk);
      cycles++;
      if (pass_done) begin
        e = cd_model(rec_da[snap], rec_mi[snap], rec_ri[snap], prev_state, H1, H2, 1);
        pa = int'(out_sig[0]);
        ps = int'(out_sig[1]);
        check($sformatf("t=%0d PA", t), pa, e.pa);
        check($sformatf("t=%0d PS", t), ps, e.ps);
        check($sformatf("t=%0d state", t), int'(dut.u_cn.u_memory.mem[6'h20]), e.state);
        check($sformatf("t=%0d clocks", t), cycles, e.len);
        check($sformatf("t=%0d row matched", t), int'(e.row != 0), 1);
        prev_state = e.state;
        // phase sequence
        case (phase)
          0: if (pa == 0 && ps == 1) phase = 1;
             else check($sformatf("t=%0d storage expected", t), pa * 2 + ps, 0);
          1: if (pa == 1 && ps == 0) begin phase = 2; t_first_pa = t; end
             else check($sformatf("t=%0d retention expected", t), pa * 2 + ps, 1);
          2: if (pa == 0 && ps == 0) begin phase = 3; t_back = t; end
             else check($sformatf("t=%0d micturition expected", t), pa * 2 + ps, 2);
          default: check($sformatf("t=%0d storage expected", t), pa * 2 + ps, 0);
        endcase
        n_phase[phase]++;
        passes++;
        cycles = 0;
        snap = t;     // this edge captures the sample now on the inputs
      end
      @(negedge clk);
      t++;
      if (t < N_SAMPLES) present(t);
    end
    $display("passes=%0d storage=%0d retention=%0d micturition=%0d storage_after=%0d",
             passes, n_phase[0], n_phase[1], n_phase[2], n_phase[3]);
    $display("MI onset t=%0d first PA t=%0d; MI off t=%0d storage again t=%0d",
             t_mi_on, t_first_pa, t_empty, t_back);
    check("phases reached", phase, 3);
    for (int i = 0; i < 4; i++) check($sformatf("passes in phase %0d > 0", i), int'(n_phase[i] > 0), 1);
    check("micturition lag within two long passes",
          int'(t_first_pa >= t_mi_on && t_first_pa - t_mi_on <= MAX_LAG), 1);
    check("storage lag within two long passes",
          int'(t_back >= t_empty && t_back - t_empty <= MAX_LAG), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
