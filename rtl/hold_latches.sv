// hold_latches: the n hold latches between the PRPG and the phase shifter.
//
// A latch whose enable is 1 is in toggle mode: it is transparent and passes
// the PRPG bit straight to the phase shifter. A latch whose enable is 0 is
// in hold mode: it keeps presenting the last bit it passed, so the scan
// chains it drives see a constant value and do not toggle.
//
// Each latch is built as a flip-flop that records the bit while the enable
// is 1, plus a bypass multiplexer; the output therefore follows d in the
// same cycle when enabled (transparent) and holds otherwise, with no
// level-sensitive storage. Reset clears the held values.
module hold_latches
  import presto_pkg::*;
#(
  parameter int unsigned N = PRPG_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] d,
  input  logic [N-1:0] en,
  output logic [N-1:0] q
);

  logic [N-1:0] held;

  always_comb q = (en & d) | (~en & held);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) held <= '0;
    else        held <= q;
  end

endmodule
