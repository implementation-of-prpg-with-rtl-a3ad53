// tra: test response analyzer, a multiple-input signature register (MISR).
//
// The scan chain outputs, after passing the circuit under test, are
// compacted here into a W-bit signature that is compared with the
// fault-free one at the end of the session. Only the name of this block is
// given in the design description; the MISR, its width and polynomial are
// this implementation's choice. Each enabled clock the register shifts like
// a Fibonacci LFSR (feedback = XOR of the stages selected by POLY into
// stage 0) and scan output j is XORed into stage j.
//
// Timing: clear has priority over en; the signature is registered.
module tra
  import presto_pkg::*;
#(
  parameter int unsigned   W    = PRPG_N,
  parameter int unsigned   M    = N_CHAINS,
  parameter logic [W-1:0]  POLY = PRPG_POLY
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  input  logic [M-1:0] resp,
  output logic [W-1:0] signature
);

  logic [W-1:0] resp_w;

  always_comb begin
    resp_w = '0;
    resp_w[M-1:0] = resp;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     signature <= '0;
    else if (clear) signature <= '0;
    else if (en)    signature <= {signature[W-2:0], ^(signature & POLY)} ^ resp_w;
  end

  if (M > W) begin : g_size_check
    $error("tra: more inputs than stages");
  end

endmodule
