// weight_logic: switching register and weighting gates of the PRESTO
// generator.
//
// Produces, once per cycle, the enable bit that is shifted into the toggle
// control shift register. Its probability of being 1 (the fraction of hold
// latches put in toggle mode) is chosen by the switching code, as the design
// description requires ("produced in a probabilistic fashion by using the
// original PRPG with a programmable set of weights"). The weight set itself
// is this implementation's choice: code[1:0]=k ANDs k+1 PRPG stages
// (probability 2^-(k+1), from 1/2 down to 1/16) and code[2]=1 inverts the
// result (1/2 up to 15/16). The four stages used are spread over the PRPG.
//
// Timing: the switching register loads sw_code on cfg_load; en_bit is a
// combinational function of the register and the current PRPG state.
module weight_logic
  import presto_pkg::*;
#(
  parameter int unsigned N    = PRPG_N,
  parameter int unsigned SW_W = DEF_SW_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cfg_load,
  input  logic [SW_W-1:0] sw_code,
  input  logic [N-1:0]    prpg,
  output logic            en_bit
);

  // PRPG stages feeding the AND tree: (2i+1)*N/8 - 1, i.e. 3, 11, 19, 27 for N=32.
  localparam int unsigned W0 = N / 8 - 1;
  localparam int unsigned W1 = 3 * N / 8 - 1;
  localparam int unsigned W2 = 5 * N / 8 - 1;
  localparam int unsigned W3 = 7 * N / 8 - 1;

  logic [SW_W-1:0] sw_reg;
  logic [3:0]      and_chain;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        sw_reg <= '0;
    else if (cfg_load) sw_reg <= sw_code;
  end

  always_comb begin
    and_chain[0] = prpg[W0];
    and_chain[1] = and_chain[0] & prpg[W1];
    and_chain[2] = and_chain[1] & prpg[W2];
    and_chain[3] = and_chain[2] & prpg[W3];
    en_bit = and_chain[sw_reg[1:0]] ^ sw_reg[2];
  end

endmodule
