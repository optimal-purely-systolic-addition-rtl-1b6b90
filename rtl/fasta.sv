// fasta: purely systolic carry-lookahead adder for n = M*M bit operands.
//
// The n bit positions form M blocks of M bits. Inside each block the
// (generate, propagate) pair ripples through a row of M-1 A-cells and a
// B-cell; successive blocks enter one cycle apart, so the row is a pipeline
// of blocks. The B-cell chains the block pairs into the cumulative block
// carries G[0,qM-1] and sends them down a column of M-1 C-cells, which add
// the carry entering each block to the preliminary (block-local) sum bits.
// A triangle of (M-1)(M-2) D-cells delays the A-cell outputs so that they
// meet the carry that travels down the C column. Every cell has a constant
// number of neighbours and only short wires, and the clock period does not
// grow with n.
//
// I/O scheme (computation starting in cycle t0, Q = M operand diagonals):
//   in   a_in[k], b_in[k] = a_{qM+k}, b_{qM+k} in cycle t0+q+k, q = 0..M-1;
//        then the separator diagonal: (0,1) on columns k < M-1 in cycle
//        t0+M+k and (0,0) on column M-1 in cycle t0+2M-1. Idle columns
//        are fed (0,0). The next computation may start in cycle t0+M+1.
//   out  s_top    = s_{qM+M-1} in cycle t0+q+M, carry-out s_n in t0+2M
//        s_col[k] = s_{qM+k}   in cycle t0+q+2M-k-2
//        g_out    = carry into bit qM in cycle t0+q+2M-2, q = 0..M
// Latency from the first operand bit to the last sum bit is 3M-3 cycles
// (for M >= 3), the period M+1 cycles. Feeding Q != M diagonals adds
// Q*M bit operands on the same array with latency Q+2M-3 and period Q+1.
//
// Cell functions, array structure, I/O scheme, latency and period follow
// the published FASTA design; the constant left inputs (G,P) = (0,1) are
// tied inside. The synchronous active-low reset of all flip-flops and the
// port grouping are this implementation's own choices.
module fasta #(
  parameter int M = 4  // sqrt(n); n = M*M operand bits
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [M-1:0] a_in,   // a_in[k]: operand-a bit entering column k
  input  logic [M-1:0] b_in,   // b_in[k]: operand-b bit entering column k
  output logic         s_top,  // s_{qM+M-1}, then s_n
  output logic [M-2:0] s_col,  // s_col[k]: s_{qM+k}
  output logic         g_out   // cumulative block carries, leaving the C column
);

  logic [M-2:0] s_pre, p_pre, s_dly, p_dly;
  logic         g_blk;

  fasta_top_row #(.M(M)) u_row (
    .clk  (clk),
    .rst_n(rst_n),
    .a_in (a_in),
    .b_in (b_in),
    .s_pre(s_pre),
    .p_pre(p_pre),
    .s_top(s_top),
    .g_blk(g_blk)
  );

  fasta_delay_net #(.M(M)) u_dly (
    .clk  (clk),
    .rst_n(rst_n),
    .s_in (s_pre),
    .p_in (p_pre),
    .s_out(s_dly),
    .p_out(p_dly)
  );

  fasta_c_column #(.M(M)) u_col (
    .clk  (clk),
    .rst_n(rst_n),
    .g_in (g_blk),
    .s_in (s_dly),
    .p_in (p_dly),
    .s_out(s_col),
    .g_out(g_out)
  );

endmodule
