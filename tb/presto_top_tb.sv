// presto_top_tb: end-to-end self-checking testbench of presto_top at its
// default parameters (32-bit PRPG, 16 scan chains of 64 cells).
//
// The generator drives a behavioural circuit under test (cut_model) whose
// scan outputs return to the response analyzer. An independent cycle-level
// reference of the whole generator (PRPG, weighting, shift and toggle
// control registers, duty cycle controller, hold latches, phase shifter and
// MISR), written from the design rules rather than from the RTL, predicts
// scan_in in every shift cycle and the final signature of every session.
//
// Sessions:
//   1. BIST, 1/4 toggling, Hold 5 / Toggle 3: hold and toggle phases.
//   2. BIST, 15/16 toggling, Hold 0: No Hold, whole patterns in toggle phase.
//   3. BIST, 1/16 toggling, Hold 15 / Toggle 1: lowest switching.
//   4. Decompressor mode: random tester injections and new controls each
//      pattern.
// Counts every mechanism (hold phase, toggle phase, no-hold, first-cycle
// initialisation, held latches, control register reloads, injections,
// per-pattern control loads, captures) and fails if one never happened.
// Also checks the session length in cycles and that the scan-in toggle
// rate falls as the programmed toggling level falls.
module presto_top_tb;
  import presto_pkg::*;
  localparam int N = 32, M = 16, L = 64;

  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  presto_mode_e mode = MODE_BIST;
  logic [15:0]  n_patterns = '0;
  logic [31:0]  seed = '0;
  presto_cfg_t  cfg = '0;
  logic [1:0]   inj = '0;
  logic         cfg_load, busy, done, no_hold, scan_en, capture;
  logic [15:0]  pattern;
  logic [M-1:0] scan_in, scan_out;
  logic [31:0]  signature;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_hold_cyc = 0, n_toggle_cyc = 0, n_nohold_pat = 0, n_first = 0, n_held_latch = 0;
  int n_reload = 0, n_inject = 0, n_cfg_pat = 0, n_capture = 0;

  presto_top dut (
    .clk, .rst_n, .start, .mode, .n_patterns, .seed, .cfg, .cfg_load, .inj,
    .busy, .done, .pattern, .no_hold, .scan_in, .scan_en, .capture, .scan_out, .signature);

  cut_model #(.M(M), .L(L)) cut (.clk, .rst_n, .scan_en, .capture, .scan_in, .scan_out);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  logic [31:0] r_prpg, r_sr, r_tcr, r_held, r_sig;
  logic        r_T;
  logic [3:0]  r_cnt;
  presto_cfg_t r_cfg;

  function automatic logic [31:0] lfsr_step(logic [31:0] s);
    return {s[30:0], s[31] ^ s[21] ^ s[1] ^ s[0]};
  endfunction

  function automatic logic weighted_bit(logic [2:0] code, logic [31:0] s);
    logic a;
    a = s[3];
    if (code[1:0] >= 1) a = a & s[11];
    if (code[1:0] >= 2) a = a & s[19];
    if (code[1:0] >= 3) a = a & s[27];
    return a ^ code[2];
  endfunction

  function automatic logic [M-1:0] shifter(logic [31:0] q);
    logic [M-1:0] p;
    for (int j = 0; j < M; j++) p[j] = q[j] ^ q[(j + 1) % 32] ^ q[(j + 2) % 32];
    return p;
  endfunction

  function automatic logic [31:0] misr_step(logic [31:0] s, logic [M-1:0] r);
    return lfsr_step(s) ^ {16'h0, r};
  endfunction

  task automatic expect_ctl(logic se, logic cap, string what);
    checks++;
    if (scan_en !== se || capture !== cap) begin
      failures++;
      $display("FAIL %s: scan_en=%b capture=%b expected %b %b", what, scan_en, capture, se, cap);
    end
  endtask

  function automatic presto_cfg_t random_cfg();
    presto_cfg_t c;
    c.sw_code    = 3'($urandom);
    c.hold_len   = (($urandom % 4) == 0) ? 4'd0 : 4'($urandom);
    c.toggle_len = 4'($urandom);
    c.t_init     = 1'($urandom);
    c.offset     = 4'($urandom);
    return c;
  endfunction

  // One complete session; returns the scan-in toggle rate.
  task automatic run_session(presto_mode_e m, int npat, logic [31:0] sd, presto_cfg_t c0,
                             output real rate);
    logic dm;
    int   toggles, cycles;
    logic [M-1:0] prev_in;
    dm = (m == MODE_DECOMP);
    toggles = 0;
    // start cycle
    @(negedge clk);
    start = 1'b1; mode = m; n_patterns = 16'(npat); seed = sd; cfg = c0;
    #1;
    checks++;
    if (cfg_load !== 1'b1) begin failures++; $display("FAIL no cfg_load at start"); end
    @(posedge clk);
    r_prpg = sd; r_cfg = c0; r_sig = '0;
    cycles = 0;
    @(negedge clk);
    start = 1'b0;
    // preload
    for (int i = 0; i < N; i++) begin
      inj = dm ? 2'($urandom) : 2'b00;
      #1 expect_ctl(1'b0, 1'b0, "preload");
      @(posedge clk);
      r_sr   = {r_sr[30:0], weighted_bit(r_cfg.sw_code, r_prpg)};
      r_prpg = lfsr_step(r_prpg);
      if (dm) begin r_prpg[10] ^= inj[0]; r_prpg[21] ^= inj[1]; if (inj != 0) n_inject++; end
      cycles++;
      @(negedge clk);
    end
    for (int p = 0; p < npat; p++) begin
      if (r_cfg.hold_len == 0) n_nohold_pat++;
      for (int k = 0; k < L; k++) begin
        logic        tog;
        logic [31:0] en, q;
        logic [M-1:0] exp_in;
        inj = dm ? 2'($urandom) : 2'b00;
        #1 expect_ctl(1'b1, 1'b0, "shift");
        tog = r_T | (r_cfg.hold_len == 0);
        if (k == 0) begin
          en = '1;
          n_first++;
        end else begin
          en = r_tcr & {32{tog}};
          if (tog) n_toggle_cyc++; else n_hold_cyc++;
        end
        n_held_latch += 32 - $countones(en);
        q = (en & r_prpg) | (~en & r_held);
        exp_in = shifter(q);
        checks++;
        if (scan_in !== exp_in) begin
          failures++;
          if (failures < 20)
            $display("FAIL pattern %0d cycle %0d: scan_in %h expected %h", p, k, scan_in, exp_in);
        end
        if (k > 0) toggles += $countones(scan_in ^ prev_in);
        prev_in = scan_in;
        if (p > 0) r_sig = misr_step(r_sig, scan_out);
        @(posedge clk);
        r_held = q;
        if (k == 0) begin
          r_tcr = r_sr; r_T = r_cfg.t_init; r_cnt = r_cfg.offset;
          n_reload++;
        end else if (r_cnt == 0) begin
          r_cnt = r_T ? r_cfg.hold_len : r_cfg.toggle_len;
          r_T   = ~r_T;
        end else begin
          r_cnt = r_cnt - 1'b1;
        end
        r_sr   = {r_sr[30:0], weighted_bit(r_cfg.sw_code, r_prpg)};
        r_prpg = lfsr_step(r_prpg);
        if (dm) begin r_prpg[10] ^= inj[0]; r_prpg[21] ^= inj[1]; if (inj != 0) n_inject++; end
        cycles++;
        @(negedge clk);
      end
      // capture cycle; in decompressor mode the next pattern's controls
      inj = '0;
      if (dm && p != npat - 1) cfg = random_cfg();
      #1 expect_ctl(1'b0, 1'b1, "capture");
      n_capture++;
      checks++;
      if (cfg_load !== (dm && p != npat - 1)) begin
        failures++; $display("FAIL cfg_load=%b in capture of pattern %0d", cfg_load, p);
      end
      @(posedge clk);
      if (dm && p != npat - 1) begin r_cfg = cfg; n_cfg_pat++; end
      cycles++;
      @(negedge clk);
    end
    // unload the last responses
    for (int k = 0; k < L; k++) begin
      #1 expect_ctl(1'b1, 1'b0, "unload");
      r_sig = misr_step(r_sig, scan_out);
      @(posedge clk);
      cycles++;
      @(negedge clk);
    end
    #1;
    checks++;
    if (done !== 1'b1 || busy !== 1'b0) begin failures++; $display("FAIL done not raised"); end
    checks++;
    if (cycles != N + npat * (L + 1) + L) begin
      failures++; $display("FAIL session took %0d cycles", cycles);
    end
    checks++;
    if (signature !== r_sig) begin
      failures++; $display("FAIL signature %h expected %h", signature, r_sig);
    end
    rate = real'(toggles) / real'(M * (L - 1) * npat);
    $display("session mode=%s patterns=%0d sw=%0d H=%0d T=%0d: scan-in toggle rate %f, signature %h",
             m.name(), npat, c0.sw_code, c0.hold_len, c0.toggle_len, rate, signature);
  endtask

  initial begin
    real rate_mid, rate_full, rate_low, rate_dec;
    r_sr = '0; r_tcr = '0; r_held = '0; r_T = 1'b1; r_cnt = '0; r_sig = '0; r_prpg = 32'h1;
    #12 rst_n = 1'b1;
    run_session(MODE_BIST, 40, 32'h1234_5678,
                '{sw_code: 3'd1, hold_len: 4'd5, toggle_len: 4'd3, t_init: 1'b1, offset: 4'd2}, rate_mid);
    checks++;
    if (no_hold !== 1'b0) begin failures++; $display("FAIL no_hold raised"); end
    run_session(MODE_BIST, 40, 32'hCAFE_F00D,
                '{sw_code: 3'd7, hold_len: 4'd0, toggle_len: 4'd3, t_init: 1'b0, offset: 4'd4}, rate_full);
    checks++;
    if (no_hold !== 1'b1) begin failures++; $display("FAIL no_hold not raised"); end
    run_session(MODE_BIST, 40, 32'h0BAD_5EED,
                '{sw_code: 3'd3, hold_len: 4'd15, toggle_len: 4'd1, t_init: 1'b0, offset: 4'd7}, rate_low);
    run_session(MODE_DECOMP, 40, 32'h5555_AAAA, random_cfg(), rate_dec);
    // switching activity follows the programmed toggling level
    checks++;
    if (!(rate_low < rate_mid && rate_mid < rate_full)) begin
      failures++; $display("FAIL toggle rates not ordered: %f %f %f", rate_low, rate_mid, rate_full);
    end
    checks++;
    if (rate_full < 0.35 || rate_full > 0.6) begin
      failures++; $display("FAIL full toggling rate %f not near 1/2", rate_full);
    end
    $display("mechanisms: hold-phase cycles %0d, toggle-phase cycles %0d, no-hold patterns %0d",
             n_hold_cyc, n_toggle_cyc, n_nohold_pat);
    $display("            first cycles %0d, held latch-cycles %0d, control register reloads %0d",
             n_first, n_held_latch, n_reload);
    $display("            injections %0d, per-pattern control loads %0d, captures %0d",
             n_inject, n_cfg_pat, n_capture);
    checks++;
    if (n_hold_cyc == 0 || n_toggle_cyc == 0 || n_nohold_pat == 0 || n_first == 0 ||
        n_held_latch == 0 || n_reload == 0 || n_inject == 0 || n_cfg_pat == 0 || n_capture == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
