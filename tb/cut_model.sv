// cut_model: behavioural stand-in for a circuit under test with M scan
// chains of L cells, used only by the end-to-end testbench.
//
// With scan_en=1 every chain shifts one cell towards its output and takes
// scan_in[j] into cell 0; scan_out[j] is the last cell. With capture=1 every
// cell is replaced by a fixed nonlinear function of other cells, standing in
// for the combinational logic between scan cells. Reset clears all cells.
module cut_model #(
  parameter int unsigned M = 16,
  parameter int unsigned L = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         scan_en,
  input  logic         capture,
  input  logic [M-1:0] scan_in,
  output logic [M-1:0] scan_out
);

  logic [L-1:0] cells [M];

  always_comb
    for (int j = 0; j < M; j++) scan_out[j] = cells[j][L-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < M; j++) cells[j] <= '0;
    end else if (scan_en) begin
      for (int j = 0; j < M; j++) cells[j] <= {cells[j][L-2:0], scan_in[j]};
    end else if (capture) begin
      for (int j = 0; j < M; j++)
        for (int k = 0; k < L; k++)
          cells[j][k] <= cells[j][k] ^ (cells[(j + 1) % M][(k + 3) % L] &
                                        ~cells[(j + 5) % M][(k + 7) % L]) ^
                         (cells[(j + 2) % M][(k + 1) % L] | cells[(j + 3) % M][(k + 11) % L]);
    end
  end

endmodule
