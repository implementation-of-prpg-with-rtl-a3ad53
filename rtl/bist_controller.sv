// bist_controller: test session sequencer of the PRESTO generator.
//
// A session starts on start=1: the PRPG seed is loaded, the generator
// controls are sampled (cfg_load) and the signature is cleared. PRELOAD then
// runs the PRPG for N cycles so the toggle control shift register is full of
// weighted bits before the first pattern. Each pattern is CHAIN_LEN shift
// cycles (scan_en=1; the first one raises first_cycle) followed by one
// capture cycle. After the last capture the responses are shifted out for
// CHAIN_LEN more cycles (UNLOAD) and done rises until the next start.
// The response analyzer is enabled on every shift cycle that unloads a
// captured response, i.e. all but those of the first pattern.
//
// In BIST mode the controls are sampled only at start; in decompressor mode
// cfg_load is raised again in every capture cycle so the tester can supply
// the next pattern's controls, and inj_en lets the tester channels into the
// PRPG during PRELOAD and SHIFT. The design description names the
// once-per-session and once-per-pattern loading and the First cycle signal;
// the state sequence and the PRELOAD phase are this implementation's own.
module bist_controller
  import presto_pkg::*;
#(
  parameter int unsigned N         = PRPG_N,
  parameter int unsigned CHAIN_LEN = DEF_CHAIN_LEN,
  parameter int unsigned PAT_W     = DEF_PAT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  presto_mode_e     mode,
  input  logic [PAT_W-1:0] n_patterns,
  output logic             seed_load,
  output logic             cfg_load,
  output logic             tra_clear,
  output logic             prpg_adv,
  output logic             sr_shift,
  output logic             first_cycle,
  output logic             scan_en,
  output logic             capture,
  output logic             tra_en,
  output logic             inj_en,
  output logic             busy,
  output logic             done,
  output logic [PAT_W-1:0] pattern
);

  typedef enum logic [2:0] {S_IDLE, S_PRELOAD, S_SHIFT, S_CAPTURE, S_UNLOAD, S_DONE} state_e;

  localparam int unsigned CNT_W = $clog2((N > CHAIN_LEN ? N : CHAIN_LEN) + 1);

  state_e           state;
  presto_mode_e     mode_r;
  logic [PAT_W-1:0] n_pat_r;
  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      mode_r  <= MODE_BIST;
      n_pat_r <= '0;
      cnt     <= '0;
      pattern <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: if (start) begin
          mode_r  <= mode;
          n_pat_r <= n_patterns;
          cnt     <= '0;
          pattern <= '0;
          state   <= (n_patterns == '0) ? S_DONE : S_PRELOAD;
        end
        S_PRELOAD: begin
          cnt <= cnt + 1'b1;
          if (cnt == CNT_W'(N - 1)) begin
            cnt   <= '0;
            state <= S_SHIFT;
          end
        end
        S_SHIFT: begin
          cnt <= cnt + 1'b1;
          if (cnt == CNT_W'(CHAIN_LEN - 1)) begin
            cnt   <= '0;
            state <= S_CAPTURE;
          end
        end
        S_CAPTURE: begin
          if (pattern == n_pat_r - 1'b1) begin
            state <= S_UNLOAD;
          end else begin
            pattern <= pattern + 1'b1;
            state   <= S_SHIFT;
          end
        end
        S_UNLOAD: begin
          cnt <= cnt + 1'b1;
          if (cnt == CNT_W'(CHAIN_LEN - 1)) begin
            cnt   <= '0;
            state <= S_DONE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    logic idle;
    idle        = (state == S_IDLE) || (state == S_DONE);
    seed_load   = idle && start;
    tra_clear   = idle && start;
    cfg_load    = (idle && start) ||
                  (state == S_CAPTURE && mode_r == MODE_DECOMP && pattern != n_pat_r - 1'b1);
    prpg_adv    = (state == S_PRELOAD) || (state == S_SHIFT);
    sr_shift    = prpg_adv;
    first_cycle = (state == S_SHIFT) && (cnt == '0);
    scan_en     = (state == S_SHIFT) || (state == S_UNLOAD);
    capture     = (state == S_CAPTURE);
    tra_en      = (state == S_UNLOAD) || (state == S_SHIFT && pattern != '0);
    inj_en      = prpg_adv && (mode_r == MODE_DECOMP);
    busy        = !idle;
    done        = (state == S_DONE);
  end

endmodule
