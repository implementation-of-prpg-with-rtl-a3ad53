// toggle_control: toggle control register and the shift register that
// refills it.
//
// The weighted enable bit enters stage 0 of an n-bit shift register on
// every cycle with shift=1. Once per pattern (reload=1, the first shift
// cycle) the whole shift register is copied into the n-bit toggle control
// register, whose bit i enables hold latch i (1 = toggle mode). Both
// registers follow the design description; the shift direction and the
// moment of reload are this implementation's choice.
//
// Timing: both registers update on the rising clock; reload copies the
// shift register value from before that edge's shift.
module toggle_control
  import presto_pkg::*;
#(
  parameter int unsigned N = PRPG_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,
  input  logic         en_bit,
  input  logic         reload,
  output logic [N-1:0] tcr
);

  logic [N-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr  <= '0;
      tcr <= '0;
    end else begin
      if (shift)  sr  <= {sr[N-2:0], en_bit};
      if (reload) tcr <= sr;
    end
  end

endmodule
