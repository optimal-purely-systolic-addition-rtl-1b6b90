// fasta_a_cell: A-cell of the FASTA adder's top row.
//
// Bit i = qM+k of block q enters the A-cell of column k together with the
// (G,P) pair of the bits qM..i-1 of the same block, which arrives from the
// left neighbour (the leftmost cell is fed the constant pair G=0, P=1).
// The cell extends the pair by bit i, forms the preliminary sum bit
//     s[qM,i] = a_i ^ b_i ^ G[qM,i-1]
// (the sum bit if no carry entered the block) and passes the incoming
// propagate P[qM,i-1] downward, which the C-cell needs later to add the
// block's incoming carry.
//
// Interface: left inputs g_in/p_in, top inputs a/b, right outputs
// g_out/p_out, bottom outputs s_out (preliminary sum) and p_dn.
// Timing: every output is registered; inputs present in cycle t appear on
// the outputs in cycle t+1, as the design's global-clock rule prescribes.
// The synchronous reset is this implementation's own addition; the data
// stream itself needs no reset.
module fasta_a_cell
  import fasta_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic g_in,   // G[qM, i-1]
  input  logic p_in,   // P[qM, i-1]
  input  logic a,      // a_i
  input  logic b,      // b_i
  output logic g_out,  // G[qM, i]
  output logic p_out,  // P[qM, i]
  output logic s_out,  // s[qM, i]
  output logic p_dn    // P[qM, i-1]
);

  gp_t left, here, ext;

  always_comb begin
    left = '{g: g_in, p: p_in};
    here = gp_bit(a, b);
    ext  = gp_op(left, here);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      g_out <= 1'b0;
      p_out <= 1'b0;
      s_out <= 1'b0;
      p_dn  <= 1'b0;
    end else begin
      g_out <= ext.g;
      p_out <= ext.p;
      s_out <= here.p ^ g_in;
      p_dn  <= p_in;
    end
  end

endmodule
