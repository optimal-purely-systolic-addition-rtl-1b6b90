// tb_fasta_top_row: test of the row of A-cells and the B-cell (M = 4).
//
// Streams 16-bit additions in the diagonal format (back to back, sometimes
// with idle cycles) and checks, at the cycle the schedule predicts:
//   s_pre[k], p_pre[k]  in t0+q+k+1: preliminary sum and propagate of bit
//                       qM+k inside block q, from integer arithmetic on the
//                       block's bits alone; 1 and 1 for the separator pair
//   s_top               in t0+q+M: s_{qM+M-1}; in t0+M+M: the carry-out s_n
//   g_blk               in t0+q+M-1: the carry into bit qM, q = 0..M
module tb_fasta_top_row;

  localparam int M    = 4;
  localparam int MAXC = 4096;

  logic clk = 1'b0;
  logic rst_n;
  logic [M-1:0] a_in, b_in;
  logic [M-2:0] s_pre, p_pre;
  logic         s_top, g_blk;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fasta_top_row u_dut (.*);

  logic [M-1:0] a_s [MAXC], b_s [MAXC];
  logic [M-2:0] es [MAXC], ep [MAXC], ev [MAXC];
  logic         et [MAXC], etv [MAXC], eg [MAXC], egv [MAXC];
  int           last;

  task automatic build();
    int t0 = 3;
    logic [M*M-1:0] a, b;
    logic [M*M:0]   s, cin;
    logic [M:0]     blk;
    for (int t = 0; t < MAXC; t++) begin
      a_s[t] = '0; b_s[t] = '0; es[t] = '0; ep[t] = '0; ev[t] = '0;
      et[t] = 0; etv[t] = 0; eg[t] = 0; egv[t] = 0;
    end
    for (int j = 0; j < 200; j++) begin
      a = (M*M)'($urandom); b = (M*M)'($urandom);
      if (j == 0) begin a = '1; b = 1; end
      s = {1'b0, a} + {1'b0, b};
      for (int i = 0; i <= M*M; i++) begin
        logic [M*M:0] lo_a, lo_b;
        lo_a = '0; lo_b = '0;
        for (int x = 0; x < i; x++) begin lo_a[x] = a[x]; lo_b[x] = b[x]; end
        cin[i] = (lo_a + lo_b) >> i != 0;   // carry into bit i
      end
      for (int q = 0; q < M; q++) begin
        for (int k = 0; k < M; k++) begin
          a_s[t0+q+k][k] = a[q*M+k];
          b_s[t0+q+k][k] = b[q*M+k];
        end
        for (int k = 0; k < M - 1; k++) begin
          blk = (M+1)'((a[q*M +: M] & M'((1 << k) - 1))) + (M+1)'((b[q*M +: M] & M'((1 << k) - 1)));
          es[t0+q+k+1][k] = a[q*M+k] ^ b[q*M+k] ^ blk[k];
          ep[t0+q+k+1][k] = &((a[q*M +: M] ^ b[q*M +: M]) | ~M'((1 << k) - 1));
          ev[t0+q+k+1][k] = 1'b1;
        end
        et[t0+q+M] = s[q*M+M-1]; etv[t0+q+M] = 1'b1;
      end
      et[t0+2*M] = s[M*M]; etv[t0+2*M] = 1'b1;
      for (int q = 0; q <= M; q++) begin eg[t0+q+M-1] = cin[q*M]; egv[t0+q+M-1] = 1'b1; end
      for (int k = 0; k < M - 1; k++) begin a_s[t0+M+k][k] = 1'b0; b_s[t0+M+k][k] = 1'b1; end
      // the separator pair (0,1) yields preliminary sum 1 and propagate 1
      for (int k = 0; k < M - 1; k++) begin
        es[t0+M+k+1][k] = 1'b1; ep[t0+M+k+1][k] = 1'b1; ev[t0+M+k+1][k] = 1'b1;
      end
      last = t0 + 2 * M;
      t0 += M + 1 + (($urandom % 6 == 0) ? 2 : 0);
    end
  endtask

  task automatic expect_bit(input string what, input int t, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("cycle %0d %s: got %b expected %b", t, what, got, exp);
    end
  endtask

  initial begin
    build();
    rst_n = 1'b0; a_in = '0; b_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t <= last; t++) begin
      a_in = a_s[t]; b_in = b_s[t];
      @(negedge clk);   // outputs of cycle t+1
      for (int k = 0; k < M - 1; k++)
        if (ev[t+1][k]) begin
          expect_bit($sformatf("s_pre[%0d]", k), t + 1, s_pre[k], es[t+1][k]);
          expect_bit($sformatf("p_pre[%0d]", k), t + 1, p_pre[k], ep[t+1][k]);
        end
      if (etv[t+1]) expect_bit("s_top", t + 1, s_top, et[t+1]);
      if (egv[t+1]) expect_bit("g_blk", t + 1, g_blk, eg[t+1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (MAXC + 100) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
