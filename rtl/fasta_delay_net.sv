// fasta_delay_net: triangle of D-cells between the top row and the C column.
//
// The cumulative block carry G[0,qM-1] enters the C column at its top cell
// (serving column M-2) and moves down one cell per cycle, while A-cell k
// produces its outputs for block q in cycle t0+q+k+1. To meet the carry,
// the pair of column k therefore has to wait 2(M-2-k) cycles: column M-2
// is wired straight through, column k goes through a chain of 2(M-2-k)
// D-cells. That gives M-2 shift registers of decreasing length and
// (M-1)(M-2) = n - 3*sqrt(n) + 2 D-cells in all, as in the published layout.
//
// Interface: s_in/p_in[k] from A-cell k, s_out/p_out[k] to the C-cell of
// column k. Timing: column k delays by 2(M-2-k) cycles. Column M-2 needs
// no delay, so its two outputs are wired straight to its inputs.
module fasta_delay_net #(
  parameter int M = 4  // sqrt(n)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [M-2:0] s_in,
  input  logic [M-2:0] p_in,
  output logic [M-2:0] s_out,
  output logic [M-2:0] p_out
);

  for (genvar k = 0; k < M - 1; k++) begin : g_col
    localparam int L = 2 * (M - 2 - k);  // D-cells in this column's chain
    logic [L:0] s_ch, p_ch;

    assign s_ch[0] = s_in[k];
    assign p_ch[0] = p_in[k];

    for (genvar j = 0; j < L; j++) begin : g_d
      fasta_d_cell u_d (
        .clk  (clk),
        .rst_n(rst_n),
        .s_in (s_ch[j]),
        .p_in (p_ch[j]),
        .s_out(s_ch[j+1]),
        .p_out(p_ch[j+1])
      );
    end

    assign s_out[k] = s_ch[L];
    assign p_out[k] = p_ch[L];
  end

endmodule
