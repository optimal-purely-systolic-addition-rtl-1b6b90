// tb_fasta_c_column: test of the column of C-cells (M = 4). Random carries
// enter at the top and random (s,p) pairs on every row. The C-cell of
// column k sees the carry M-2-k cycles after it entered, so s_out[k] in
// cycle t+1 must be s_in[k](t) ^ (p_in[k](t) & g_in(t-(M-2-k))), and g_out
// must be g_in delayed by M-1 cycles.
module tb_fasta_c_column;

  localparam int M = 4;
  localparam int NC = 300;

  logic clk = 1'b0;
  logic rst_n;
  logic         g_in, g_out;
  logic [M-2:0] s_in, p_in, s_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fasta_c_column u_dut (.*);

  logic         hg [NC];
  logic [M-2:0] hs [NC], hp [NC];

  initial begin
    rst_n = 1'b0; g_in = 0; s_in = '0; p_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NC; t++) begin
      hg[t] = 1'($urandom); hs[t] = (M-1)'($urandom); hp[t] = (M-1)'($urandom);
      g_in = hg[t]; s_in = hs[t]; p_in = hp[t];
      @(negedge clk);   // outputs of cycle t+1
      for (int k = 0; k < M - 1; k++) begin
        int d;
        d = M - 2 - k;
        if (t - d >= 0) begin
          checks++;
          if (s_out[k] !== (hs[t][k] ^ (hp[t][k] & hg[t-d]))) begin
            failures++;
            $display("cycle %0d s_out[%0d]=%b wrong", t + 1, k, s_out[k]);
          end
        end
      end
      if (t - (M - 2) >= 0) begin
        checks++;
        if (g_out !== hg[t-(M-2)]) begin
          failures++;
          $display("cycle %0d g_out=%b wrong", t + 1, g_out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NC + 100) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
