// prpg: n-bit pseudorandom pattern generator of the PRESTO generator.
//
// A Fibonacci LFSR: on each clock with adv=1 the register shifts towards the
// high stage and stage 0 receives the XOR of the stages selected by POLY
// (bit k of POLY taps stage k). The design description allows either an
// LFSR or a ring generator; the LFSR and its polynomial are this
// implementation's choice. In decompressor mode (inj_en=1) tester channel c
// is XORed into stage inj_stage(c) on the same clock, which turns the PRPG
// into a sequential decompressor fed by the tester.
//
// Timing: state is registered; load has priority over adv. Asynchronous
// active-low reset loads SEED.
module prpg
  import presto_pkg::*;
#(
  parameter int unsigned   N     = PRPG_N,
  parameter logic [N-1:0]  POLY  = PRPG_POLY,
  parameter logic [N-1:0]  SEED  = PRPG_SEED,
  parameter int unsigned   N_INJ = DEF_N_INJ
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [N-1:0]     seed,
  input  logic             adv,
  input  logic             inj_en,
  input  logic [N_INJ-1:0] inj,
  output logic [N-1:0]     state
);

  logic          fb;
  logic [N-1:0]  inj_vec;
  logic [N-1:0]  nxt;

  always_comb begin
    fb = ^(state & POLY);
    inj_vec = '0;
    for (int unsigned c = 0; c < N_INJ; c++)
      inj_vec[inj_stage(c, N, N_INJ)] = inj_vec[inj_stage(c, N, N_INJ)] ^ (inj_en & inj[c]);
    nxt = {state[N-2:0], fb} ^ inj_vec;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= SEED;
    else if (load) state <= seed;
    else if (adv)  state <= nxt;
  end

endmodule
