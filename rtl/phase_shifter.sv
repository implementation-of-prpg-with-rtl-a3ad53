// phase_shifter: XOR network from the n hold latches to the M scan chains.
//
// As in the design description, every output is the XOR of three different
// hold latch outputs, so a scan chain stays constant (low-power) whenever
// its three latches are all in hold mode. The choice of the three latches,
// ps_tap() in presto_pkg, is this implementation's own: output j uses
// latches j, j+s, j+2s (mod N), s = 1 + ((j div N) mod ((N-1) div 2)).
// Purely combinational.
module phase_shifter
  import presto_pkg::*;
#(
  parameter int unsigned N = PRPG_N,
  parameter int unsigned M = N_CHAINS
) (
  input  logic [N-1:0] lat,
  output logic [M-1:0] ps
);

  always_comb begin
    for (int unsigned j = 0; j < M; j++)
      ps[j] = lat[ps_tap(j, 0, N)] ^ lat[ps_tap(j, 1, N)] ^ lat[ps_tap(j, 2, N)];
  end

endmodule
