// presto_pkg: constants and helper functions shared by the PRESTO low-power
// pattern generator.
//
// The generator is a PRPG (here an LFSR) whose stages pass through n hold
// latches into a phase shifter that feeds the scan chains. Which latches are
// transparent in each shift cycle is set by a toggle control register
// (filled with weighted random bits) and by a hold/toggle duty cycle
// controller. The 4-bit width of the duty-cycle registers follows the
// design description (a Hold register code of 0000 disables the hold
// phase); every other size below is this implementation's own choice.
package presto_pkg;

  // PRPG size and its feedback polynomial x^32 + x^22 + x^2 + x + 1
  // (primitive; bit k set means a tap at x^(k+1), the x^32 term is bit 31).
  localparam int unsigned        PRPG_N    = 32;
  localparam logic [PRPG_N-1:0]  PRPG_POLY = 32'h8020_0003;
  localparam logic [PRPG_N-1:0]  PRPG_SEED = 32'h0000_0001;

  localparam int unsigned N_CHAINS  = 16;  // scan chains fed by the phase shifter
  localparam int unsigned DEF_CHAIN_LEN = 64;  // shift cycles per pattern
  localparam int unsigned DEF_DC_W = 4;   // Hold / Toggle register and down counter width
  localparam int unsigned DEF_SW_W = 3;   // switching code width
  localparam int unsigned DEF_N_INJ = 2;   // tester channels in decompressor mode
  localparam int unsigned DEF_PAT_W = 16;  // pattern counter width

  // Operating mode of the generator.
  typedef enum logic {
    MODE_BIST   = 1'b0,  // configuration loaded once per test session
    MODE_DECOMP = 1'b1   // tester injects data and reloads controls per pattern
  } presto_mode_e;

  // Controls of the generator: delivered once per session in BIST mode and
  // once per pattern in decompressor mode.
  typedef struct packed {
    logic [DEF_SW_W-1:0] sw_code;     // switching code (toggle probability)
    logic [DEF_DC_W-1:0] hold_len;    // Hold register: hold period = value+1 cycles, 0 = no hold
    logic [DEF_DC_W-1:0] toggle_len;  // Toggle register: toggle period = value+1 cycles
    logic            t_init;      // initial T flip-flop value, 1 = start in toggle mode
    logic [DEF_DC_W-1:0] offset;      // initial down-counter value
  } presto_cfg_t;

  // Phase shifter tap k (0..2) of output j for an n-bit latch vector.
  // Taps are j, j+s and j+2s (mod n) with s = 1 + ((j div n) mod ((n-1) div 2)),
  // so the three latches are always different.
  function automatic int unsigned ps_tap(int unsigned j, int unsigned k, int unsigned n);
    int unsigned s;
    s = 1 + ((j / n) % ((n - 1) / 2));
    return (j + k * s) % n;
  endfunction

  // Injection stage of tester channel c in an n-stage PRPG with nc channels.
  function automatic int unsigned inj_stage(int unsigned c, int unsigned n, int unsigned nc);
    return ((c + 1) * n) / (nc + 1);
  endfunction

endpackage
