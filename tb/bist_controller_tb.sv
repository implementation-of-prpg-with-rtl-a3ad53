// bist_controller_tb: self-checking testbench of bist_controller.
//
// Small session (N=8 preload cycles, chains of 5, 3 patterns) in BIST mode,
// then in decompressor mode, then with 0 patterns. For every cycle the
// expected control outputs come from an independently written schedule:
// start cycle, N preload cycles, per pattern 5 shift cycles (the first with
// first_cycle) and 1 capture cycle, 5 unload cycles, then done. Checks each
// output every cycle and the total session length (8 + 3*6 + 5 = 31 cycles
// from start to done).
module bist_controller_tb;
  import presto_pkg::*;
  localparam int N = 8, L = 5, P = 3;

  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  presto_mode_e mode = MODE_BIST;
  logic [15:0]  n_patterns = 16'(P);
  logic seed_load, cfg_load, tra_clear, prpg_adv, sr_shift, first_cycle;
  logic scan_en, capture, tra_en, inj_en, busy, done;
  logic [15:0]  pattern;
  int           checks = 0, failures = 0;

  bist_controller #(.N(N), .CHAIN_LEN(L), .PAT_W(16)) dut (
    .clk, .rst_n, .start, .mode, .n_patterns, .seed_load, .cfg_load, .tra_clear,
    .prpg_adv, .sr_shift, .first_cycle, .scan_en, .capture, .tra_en, .inj_en,
    .busy, .done, .pattern);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected outputs packed as {seed_load,cfg_load,tra_clear,prpg_adv,sr_shift,
  //                             first_cycle,scan_en,capture,tra_en,inj_en,busy,done}
  function automatic logic [11:0] got_vec();
    return {seed_load, cfg_load, tra_clear, prpg_adv, sr_shift, first_cycle,
            scan_en, capture, tra_en, inj_en, busy, done};
  endfunction

  task automatic expect_cycle(logic [11:0] exp, int exp_pat, string what);
    #1;
    checks++;
    if (got_vec() !== exp || (exp_pat >= 0 && pattern !== 16'(exp_pat))) begin
      failures++;
      $display("FAIL %s: outputs %b expected %b, pattern %0d expected %0d",
               what, got_vec(), exp, pattern, exp_pat);
    end
    @(negedge clk);
  endtask

  task automatic run_session(presto_mode_e m);
    logic dm;
    int   cycles;
    dm = (m == MODE_DECOMP);
    @(negedge clk);
    mode = m; start = 1'b1;
    expect_cycle({3'b111, 3'b000, 3'b000, 1'b0, 1'b0, done}, -1, "start");
    start = 1'b0;
    cycles = 0;
    for (int i = 0; i < N; i++) begin
      expect_cycle({3'b000, 2'b11, 1'b0, 3'b000, dm, 2'b10}, 0, "preload");
      cycles++;
    end
    for (int p = 0; p < P; p++) begin
      for (int k = 0; k < L; k++) begin
        expect_cycle({3'b000, 2'b11, (k == 0), 1'b1, 1'b0, (p != 0), dm, 2'b10}, p, "shift");
        cycles++;
      end
      expect_cycle({1'b0, dm && (p != P - 1), 1'b0, 3'b000, 1'b0, 1'b1, 1'b0, 1'b0, 2'b10}, p, "capture");
      cycles++;
    end
    for (int k = 0; k < L; k++) begin
      expect_cycle({3'b000, 3'b000, 1'b1, 1'b0, 1'b1, 1'b0, 2'b10}, -1, "unload");
      cycles++;
    end
    expect_cycle({3'b000, 3'b000, 3'b000, 1'b0, 2'b01}, -1, "done");
    checks++;
    if (cycles != N + P * (L + 1) + L) begin
      failures++;
      $display("FAIL session length %0d", cycles);
    end
  endtask

  initial begin
    #12 rst_n = 1'b1;
    expect_cycle(12'b0, 0, "idle");
    run_session(MODE_BIST);
    expect_cycle({3'b000, 3'b000, 3'b000, 1'b0, 2'b01}, -1, "done holds");
    run_session(MODE_DECOMP);
    // zero patterns: straight to done
    n_patterns = '0;
    @(negedge clk);
    start = 1'b1;
    expect_cycle({3'b111, 3'b000, 3'b000, 1'b0, 1'b0, 1'b1}, -1, "start0");
    start = 1'b0;
    expect_cycle({3'b000, 3'b000, 3'b000, 1'b0, 2'b01}, -1, "done0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
