// fasta_c_column: rightmost column of M-1 C-cells in the FASTA adder.
//
// The top cell serves bit column M-2, the bottom cell column 0. The
// cumulative block carries G[0,qM-1] enter at the top from the B-cell and
// descend one cell per cycle; the C-cell of column k sees G[0,qM-1] in
// cycle t0+q+2M-k-3 and must get s[qM,qM+k], P[qM,qM+k-1] on its left in the
// same cycle (the delay network arranges that). It then emits the final
// sum bit s_{qM+k} one cycle later.
//
// Interface: g_in from the B-cell, s_in/p_in[k] and s_out[k] per column k,
// g_out is the carry stream leaving the bottom cell. Structure follows the
// published layout.
module fasta_c_column #(
  parameter int M = 4  // sqrt(n)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         g_in,
  input  logic [M-2:0] s_in,
  input  logic [M-2:0] p_in,
  output logic [M-2:0] s_out,
  output logic         g_out
);

  // g_ch[r] enters row r+1 of the column (row 1 is the top cell).
  logic [M-1:0] g_ch;

  assign g_ch[0] = g_in;

  for (genvar r = 1; r < M; r++) begin : g_row
    localparam int K = M - 1 - r;  // bit column served by this row
    fasta_c_cell u_c (
      .clk  (clk),
      .rst_n(rst_n),
      .g_in (g_ch[r-1]),
      .p_in (p_in[K]),
      .s_in (s_in[K]),
      .s_out(s_out[K]),
      .g_out(g_ch[r])
    );
  end

  assign g_out = g_ch[M-1];

endmodule
