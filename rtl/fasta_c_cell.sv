// fasta_c_cell: C-cell, second stage of sum-bit generation in FASTA.
//
// A C-cell serves one bit column k of every block. In the cycle in which the
// cumulative block carry G[0,qM-1] arrives from above, the (delayed)
// preliminary sum s[qM,i] and propagate P[qM,i-1] of bit i = qM+k arrive
// from the left. The cell corrects the preliminary sum by the carry that
// entered the block and passes the block carry one cell down:
//     s_out <= s_in ^ (p_in & g_in)
//     g_out <= g_in
// Interface and equations follow the published C-cell behaviour; both
// outputs are registered (one cycle). The synchronous reset is this
// implementation's own addition.
module fasta_c_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic g_in,   // G[0, qM-1]
  input  logic p_in,   // P[qM, i-1]
  input  logic s_in,   // s[qM, i]
  output logic s_out,  // s_i
  output logic g_out   // G[0, qM-1], one cycle later
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_out <= 1'b0;
      g_out <= 1'b0;
    end else begin
      s_out <= s_in ^ (p_in & g_in);
      g_out <= g_in;
    end
  end

endmodule
