// fasta_top_row: top row of the FASTA adder, M-1 A-cells followed by a B-cell.
//
// The n = M*M operand bits are split into M blocks of M consecutive bits.
// Column k of the row receives bit qM+k of block q in cycle t0+q+k (block q
// travels as one diagonal), so the (G,P) pair of block q ripples from left to
// right one cell per cycle, while the next block follows one cycle behind.
// The leftmost A-cell is fed the constant pair G=0, P=1. After the M operand
// diagonals, the A columns receive (a,b) = (0,1) and the B column (0,0);
// this separator diagonal makes the B-cell emit s_n and clear its carry
// register, so the next computation can start M+1 cycles after the previous
// one.
//
// Outputs, for block q of a computation starting in cycle t0:
//   s_pre[k], p_pre[k]  s[qM,qM+k] and P[qM,qM+k-1], valid in cycle t0+q+k+1
//   s_top               s_{qM+M-1} in cycle t0+q+M; s_n in cycle t0+Q+M
//                       (Q = number of operand diagonals, M normally)
//   g_blk               G[0,qM-1] in cycle t0+q+M-1 (0 for q = 0)
// Structure and schedule follow the published description of the row.
module fasta_top_row
  import fasta_pkg::*;
#(
  parameter int M = 4  // sqrt(n): cells per row, bits per block
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [M-1:0] a_in,
  input  logic [M-1:0] b_in,
  output logic [M-2:0] s_pre,
  output logic [M-2:0] p_pre,
  output logic         s_top,
  output logic         g_blk
);

  if (M < 2) begin : g_bad_m
    $error("fasta_top_row: M must be at least 2");
  end

  // (G,P) chain between the cells; index k is the input of column k.
  logic [M-1:0] g_ch, p_ch;

  assign g_ch[0] = GP_EMPTY.g;
  assign p_ch[0] = GP_EMPTY.p;

  for (genvar k = 0; k < M - 1; k++) begin : g_a
    fasta_a_cell u_a (
      .clk  (clk),
      .rst_n(rst_n),
      .g_in (g_ch[k]),
      .p_in (p_ch[k]),
      .a    (a_in[k]),
      .b    (b_in[k]),
      .g_out(g_ch[k+1]),
      .p_out(p_ch[k+1]),
      .s_out(s_pre[k]),
      .p_dn (p_pre[k])
    );
  end

  fasta_b_cell u_b (
    .clk  (clk),
    .rst_n(rst_n),
    .i1   (a_in[M-1]),
    .i2   (b_in[M-1]),
    .i3   (p_ch[M-1]),
    .i4   (g_ch[M-1]),
    .o1   (s_top),
    .o2   (g_blk)
  );

endmodule
