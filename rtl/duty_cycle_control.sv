// duty_cycle_control: hold/toggle duty cycle controller of the PRESTO
// generator (Hold and Toggle registers, down counter, T flip-flop, No Hold
// detection and its OR gate).
//
// The T flip-flop selects the phase: 1 = toggle phase (latches follow the
// toggle control register), 0 = hold phase (all latches hold). On every
// shift cycle the down counter decrements; when it is 0 the T flip-flop
// flips and the counter loads the register of the phase being entered, so a
// toggle phase lasts Toggle+1 and a hold phase Hold+1 shift cycles. At the
// first shift cycle of every pattern the T flip-flop and the counter are
// initialised with t_init and the offset. A Hold register of 0 raises
// no_hold, which is ORed onto the T output so the whole pattern stays in
// toggle phase. This structure follows the design description; the polarity
// of T and the value+1 length convention are this implementation's choice.
//
// Timing: cfg_load samples all five controls (once per session in BIST mode,
// once per pattern in decompressor mode). toggle_phase is combinational
// from the registers.
module duty_cycle_control
  import presto_pkg::*;
#(
  parameter int unsigned DC_W = DEF_DC_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cfg_load,
  input  logic [DC_W-1:0] hold_len,
  input  logic [DC_W-1:0] toggle_len,
  input  logic            t_init,
  input  logic [DC_W-1:0] offset,
  input  logic            first_cycle,
  input  logic            adv,
  output logic            toggle_phase,
  output logic            no_hold
);

  logic [DC_W-1:0] hold_reg, toggle_reg, offset_reg, cnt;
  logic            t_init_reg, t_ff;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_reg   <= '0;
      toggle_reg <= '0;
      offset_reg <= '0;
      t_init_reg <= 1'b1;
    end else if (cfg_load) begin
      hold_reg   <= hold_len;
      toggle_reg <= toggle_len;
      offset_reg <= offset;
      t_init_reg <= t_init;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_ff <= 1'b1;
      cnt  <= '0;
    end else if (adv) begin
      if (first_cycle) begin
        t_ff <= t_init_reg;
        cnt  <= offset_reg;
      end else if (cnt == '0) begin
        t_ff <= ~t_ff;
        cnt  <= t_ff ? hold_reg : toggle_reg;
      end else begin
        cnt  <= cnt - 1'b1;
      end
    end
  end

  always_comb begin
    no_hold      = (hold_reg == '0);
    toggle_phase = t_ff | no_hold;
  end

endmodule
