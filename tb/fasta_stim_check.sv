// fasta_stim_check: stimulus generator and scoreboard for the FASTA adder.
//
// It plays the environment of a FASTA array with M*M bit operands. For every
// computation it picks a number Q of operand diagonals (Q = M is the normal
// n-bit addition; other Q add N = Q*M bit operands on the same array), a pair
// of operands (random or a corner case), and feeds them in the diagonal
// format: column k gets bits (a,b)_{qM+k} in cycle t0+q+k, then the
// separator (0,1) on the A columns and (0,0) on the B column. The next
// computation starts Q+1 cycles later, or after a few idle cycles of (0,0).
//
// Expected outputs come from plain integer addition of the operands:
//   s_top     s_{qM+M-1} in cycle t0+q+M, and s_N in cycle t0+Q+M
//   s_col[k]  s_{qM+k}   in cycle t0+q+2M-k-2
//   g_out     carry into bit qM, c_{qM-1}, in cycle t0+q+2M-2 (q = 0..Q)
// Inputs for cycle t are driven after clock edge t, outputs of cycle t are
// read after clock edge t. The latency (first operand bit to last sum bit)
// is checked against Q+2M-3 for M >= 3 and the spacing of back-to-back
// computations against Q+1.
//
// Counted mechanisms, each of which must occur: back-to-back computations,
// idle gaps, a carry-out s_N = 1 followed at once by another computation
// (the separator must clear the B-cell's carry register), a block carry
// corrected by a C-cell, and the three operand-length cases Q = M, Q > M,
// Q < M.
module fasta_stim_check #(
  parameter int          M     = 4,
  parameter int          NCOMP = 300,
  parameter int unsigned SEED  = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [M-1:0] a_in,
  output logic [M-1:0] b_in,
  input  logic         s_top,
  input  logic [M-2:0] s_col,
  input  logic         g_out,
  output logic         done,
  output int           checks,
  output int           failures
);

  localparam int MAXC = 16384;
  localparam int W    = 256;

  logic [M-1:0] a_s [MAXC];
  logic [M-1:0] b_s [MAXC];
  logic         et   [MAXC], et_v [MAXC];
  logic [M-2:0] ec   [MAXC], ec_v [MAXC];
  logic         eg   [MAXC], eg_v [MAXC];

  int n_b2b, n_gap, n_cout_b2b, n_corr, n_qeq, n_qgt, n_qlt, n_lat;
  int last_cycle;
  int cyc;

  function automatic int rnd(input int lo, input int hi);
    return lo + int'($urandom % unsigned'(hi - lo + 1));
  endfunction

  task automatic build();
    int t0, q, k, nq, kind, gap, prev_t0, prev_q;
    logic prev_cout;
    logic [W-1:0] a, b;
    logic [W:0]   s;
    logic [W:0]   c;   // c[i+1] = carry out of bit i; c[0] = 0
    int t_last;
    void'($urandom(SEED));
    for (int t = 0; t < MAXC; t++) begin
      a_s[t] = '0; b_s[t] = '0;
      et[t] = 0; et_v[t] = 0; ec[t] = '0; ec_v[t] = '0; eg[t] = 0; eg_v[t] = 0;
    end
    t0 = 4; prev_t0 = -100; prev_q = 0; prev_cout = 0;
    last_cycle = 0;
    for (int j = 0; j < NCOMP; j++) begin
      // operand length: mostly the normal n-bit addition
      case (rnd(0, 5))
        0:       nq = rnd(1, (M > 1) ? M - 1 : 1);
        1:       nq = rnd(M + 1, 3 * M);
        default: nq = M;
      endcase
      if (j == 0) nq = M;
      // operands
      a = '0; b = '0;
      for (int i = 0; i < W / 32; i++) begin
        a[i*32 +: 32] = $urandom;
        b[i*32 +: 32] = $urandom;
      end
      kind = rnd(0, 9);
      if (j < 4) kind = j + 1;
      case (kind)
        1: begin a = '1; b = '0; b[0] = 1'b1; end     // carry ripples through all blocks
        2: begin a = '1; b = '1; end
        3: begin a = '0; b = '0; end
        4: begin a = '1; b = '0; end
        default: ;
      endcase
      for (int i = nq * M; i < W; i++) begin a[i] = 1'b0; b[i] = 1'b0; end
      s = {1'b0, a} + {1'b0, b};
      c[0] = 1'b0;
      for (int i = 0; i < W; i++) c[i+1] = (a[i] & b[i]) | (a[i] & c[i]) | (b[i] & c[i]);

      // mechanisms
      if (t0 == prev_t0 + prev_q + 1) begin
        n_b2b++;
        if (prev_cout) n_cout_b2b++;
      end else if (j > 0) n_gap++;
      if (nq == M) n_qeq++; else if (nq > M) n_qgt++; else n_qlt++;

      // inputs
      for (q = 0; q < nq; q++)
        for (k = 0; k < M; k++) begin
          a_s[t0+q+k][k] = a[q*M+k];
          b_s[t0+q+k][k] = b[q*M+k];
        end
      for (k = 0; k < M - 1; k++) begin
        a_s[t0+nq+k][k] = 1'b0;
        b_s[t0+nq+k][k] = 1'b1;
      end
      a_s[t0+nq+M-1][M-1] = 1'b0;
      b_s[t0+nq+M-1][M-1] = 1'b0;

      // expected outputs
      t_last = 0;
      for (q = 0; q < nq; q++) begin
        et[t0+q+M] = s[q*M+M-1]; et_v[t0+q+M] = 1'b1;
        for (k = 0; k < M - 1; k++) begin
          ec[t0+q+2*M-k-2][k]   = s[q*M+k];
          ec_v[t0+q+2*M-k-2][k] = 1'b1;
          if (t0+q+2*M-k-2 > t_last) t_last = t0+q+2*M-k-2;
        end
        if (t0+q+M > t_last) t_last = t0+q+M;
      end
      et[t0+nq+M] = s[nq*M]; et_v[t0+nq+M] = 1'b1;
      if (t0+nq+M > t_last) t_last = t0+nq+M;
      for (q = 0; q <= nq; q++) begin
        eg[t0+q+2*M-2] = c[q*M]; eg_v[t0+q+2*M-2] = 1'b1;
      end
      // block-carry corrections done by the C column: bit qM+k (k < M-1)
      // whose block receives a carry that the bits below it propagate
      for (q = 1; q < nq; q++)
        for (k = 0; k < M - 1; k++)
          if (c[q*M] && ((a[q*M +: M] ^ b[q*M +: M]) & ((M'(1) << k) - M'(1))) == ((M'(1) << k) - M'(1)))
            n_corr++;
      if (M >= 3) begin
        checks++;
        n_lat++;
        if (t_last - t0 != nq + 2 * M - 3) begin
          failures++;
          $display("latency mismatch: %0d cycles, expected %0d", t_last - t0, nq + 2 * M - 3);
        end
      end
      if (t_last > last_cycle) last_cycle = t_last;
      prev_t0 = t0; prev_q = nq; prev_cout = s[nq*M];
      gap = (rnd(0, 7) == 0) ? rnd(1, 3) : 0;
      t0 = t0 + nq + 1 + gap;
      if (t0 + 4 * M * 4 + 8 >= MAXC) break;
    end
  endtask

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    n_b2b = 0; n_gap = 0; n_cout_b2b = 0; n_corr = 0; n_qeq = 0; n_qgt = 0; n_qlt = 0; n_lat = 0;
    build();
  end

  // cycle counter: cycle t begins with the t-th clock edge after reset
  always_ff @(posedge clk) begin
    if (!rst_n) cyc <= 0;
    else        cyc <= cyc + 1;
  end

  always @(negedge clk) begin
    if (!rst_n) begin
      a_in <= '0;
      b_in <= '0;
    end else if (!done) begin
      if (et_v[cyc]) begin
        checks++;
        if (s_top !== et[cyc]) begin
          failures++;
          $display("M=%0d cycle %0d: s_top=%b expected %b", M, cyc, s_top, et[cyc]);
        end
      end
      for (int k = 0; k < M - 1; k++)
        if (ec_v[cyc][k]) begin
          checks++;
          if (s_col[k] !== ec[cyc][k]) begin
            failures++;
            $display("M=%0d cycle %0d: s_col[%0d]=%b expected %b", M, cyc, k, s_col[k], ec[cyc][k]);
          end
        end
      if (eg_v[cyc]) begin
        checks++;
        if (g_out !== eg[cyc]) begin
          failures++;
          $display("M=%0d cycle %0d: g_out=%b expected %b", M, cyc, g_out, eg[cyc]);
        end
      end
      a_in <= a_s[cyc];
      b_in <= b_s[cyc];
      if (cyc > last_cycle) begin
        done <= 1'b1;
        $display("M=%0d mechanisms: back_to_back=%0d idle_gaps=%0d carry_out_then_b2b=%0d block_carry_corrections=%0d Q=M:%0d Q>M:%0d Q<M:%0d latency_checks=%0d",
                 M, n_b2b, n_gap, n_cout_b2b, n_corr, n_qeq, n_qgt, n_qlt, n_lat);
        if (n_b2b == 0)      begin failures++; $display("never: back-to-back computations"); end
        if (n_gap == 0)      begin failures++; $display("never: idle gap"); end
        if (n_cout_b2b == 0) begin failures++; $display("never: carry-out followed by a computation"); end
        if (n_corr == 0)     begin failures++; $display("never: block carry correction"); end
        if (n_qeq == 0)      begin failures++; $display("never: Q = M"); end
        if (n_qgt == 0)      begin failures++; $display("never: Q > M"); end
        if (n_qlt == 0)      begin failures++; $display("never: Q < M"); end
      end
    end
  end

endmodule
