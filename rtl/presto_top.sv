// presto_top: low-power programmable PRPG with preselected toggling
// (PRESTO), with its session controller and test response analyzer.
//
// Datapath: the PRPG drives n hold latches, and the latches drive a phase
// shifter whose M outputs are the scan-in bits of the circuit under test
// (CUT). Latch i is transparent (toggle mode) in a shift cycle when
//   first_cycle | (tcr[i] & (T | no_hold))
// where tcr is the toggle control register (refilled once per pattern from
// a shift register of weighted random bits, weight chosen by the switching
// code), T is the hold/toggle duty cycle flip-flop and no_hold flags a Hold
// register of 0. Latches outside shift cycles hold. The scan-out bits of the
// CUT are compacted by the response analyzer into a signature.
//
// Modes: in BIST mode (mode=MODE_BIST) the controls in cfg are sampled once
// at start. In decompressor mode (MODE_DECOMP) the tester drives inj, which
// is XORed into the PRPG, and presents the next pattern's cfg whenever
// cfg_load is 1 (at start and in each capture cycle but the last).
//
// Timing of a session: 1 start cycle, N preload cycles, then per pattern
// CHAIN_LEN shift cycles (scan_en=1) and one capture cycle (capture=1),
// then CHAIN_LEN unload cycles; done stays 1 until the next start. scan_in
// is valid in every cycle with scan_en=1, and scan_out is sampled in the
// same cycles. no_hold reports a Hold register of 0. The CUT itself is outside this module.
module presto_top
  import presto_pkg::*;
#(
  parameter int unsigned  N         = PRPG_N,
  parameter logic [N-1:0] POLY      = PRPG_POLY,
  parameter int unsigned  M         = N_CHAINS,
  parameter int unsigned  CHAIN_LEN = DEF_CHAIN_LEN,
  parameter int unsigned  N_INJ     = DEF_N_INJ,
  parameter int unsigned  PAT_W     = DEF_PAT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  // session control
  input  logic             start,
  input  presto_mode_e     mode,
  input  logic [PAT_W-1:0] n_patterns,
  input  logic [N-1:0]     seed,
  input  presto_cfg_t      cfg,
  output logic             cfg_load,
  input  logic [N_INJ-1:0] inj,
  output logic             busy,
  output logic             done,
  output logic [PAT_W-1:0] pattern,
  output logic             no_hold,
  // scan interface to the circuit under test
  output logic [M-1:0]     scan_in,
  output logic             scan_en,
  output logic             capture,
  input  logic [M-1:0]     scan_out,
  // response analyzer
  output logic [N-1:0]     signature
);

  logic         seed_load, tra_clear, prpg_adv, sr_shift, first_cycle, tra_en, inj_en;
  logic         en_bit, toggle_phase;
  logic [N-1:0] prpg_state, tcr, latch_en, latch_q;

  bist_controller #(.N(N), .CHAIN_LEN(CHAIN_LEN), .PAT_W(PAT_W)) u_ctrl (
    .clk, .rst_n, .start, .mode, .n_patterns,
    .seed_load, .cfg_load, .tra_clear, .prpg_adv, .sr_shift, .first_cycle,
    .scan_en, .capture, .tra_en, .inj_en, .busy, .done, .pattern
  );

  prpg #(.N(N), .POLY(POLY), .SEED(PRPG_SEED[N-1:0]), .N_INJ(N_INJ)) u_prpg (
    .clk, .rst_n, .load(seed_load), .seed, .adv(prpg_adv),
    .inj_en, .inj, .state(prpg_state)
  );

  weight_logic #(.N(N)) u_weight (
    .clk, .rst_n, .cfg_load, .sw_code(cfg.sw_code), .prpg(prpg_state), .en_bit
  );

  toggle_control #(.N(N)) u_tcr (
    .clk, .rst_n, .shift(sr_shift), .en_bit, .reload(first_cycle), .tcr
  );

  duty_cycle_control u_duty (
    .clk, .rst_n, .cfg_load,
    .hold_len(cfg.hold_len), .toggle_len(cfg.toggle_len),
    .t_init(cfg.t_init), .offset(cfg.offset),
    .first_cycle, .adv(prpg_adv & scan_en), .toggle_phase, .no_hold
  );

  always_comb
    latch_en = {N{scan_en & prpg_adv}} &
               ({N{first_cycle}} | (tcr & {N{toggle_phase}}));

  hold_latches #(.N(N)) u_latches (
    .clk, .rst_n, .d(prpg_state), .en(latch_en), .q(latch_q)
  );

  phase_shifter #(.N(N), .M(M)) u_ps (
    .lat(latch_q), .ps(scan_in)
  );

  tra #(.W(N), .M(M), .POLY(POLY)) u_tra (
    .clk, .rst_n, .clear(tra_clear), .en(tra_en), .resp(scan_out), .signature
  );

endmodule
