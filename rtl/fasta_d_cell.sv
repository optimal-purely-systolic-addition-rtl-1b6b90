// fasta_d_cell: D-cell of the FASTA adder.
//
// Delays the pair (preliminary sum bit, propagate bit) that flows from an
// A-cell towards its C-cell by one clock tick. Chains of D-cells skew the
// A-cell outputs so that they meet the cumulative block carry, which moves
// down the C column one cell per cycle. The synchronous reset is this
// implementation's own addition.
module fasta_d_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic s_in,
  input  logic p_in,
  output logic s_out,
  output logic p_out
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_out <= 1'b0;
      p_out <= 1'b0;
    end else begin
      s_out <= s_in;
      p_out <= p_in;
    end
  end

endmodule
