// tb_fasta_delay_net: test of the D-cell triangle (M = 4). Random pairs enter
// every column each cycle; column k must deliver them 2(M-2-k) cycles later.
module tb_fasta_delay_net;

  localparam int M = 4;
  localparam int NC = 300;

  logic clk = 1'b0;
  logic rst_n;
  logic [M-2:0] s_in, p_in, s_out, p_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fasta_delay_net u_dut (.*);

  logic [M-2:0] hs [NC], hp [NC];

  initial begin
    rst_n = 1'b0; s_in = '0; p_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NC; t++) begin
      hs[t] = (M-1)'($urandom); hp[t] = (M-1)'($urandom);
      s_in = hs[t]; p_in = hp[t];
      #1;
      for (int k = 0; k < M - 1; k++) begin
        int d;
        d = 2 * (M - 2 - k);
        if (t - d >= 0) begin
          checks += 2;
          if (s_out[k] !== hs[t-d][k] || p_out[k] !== hp[t-d][k]) begin
            failures++;
            $display("cycle %0d column %0d: got %b%b expected %b%b", t, k,
                     s_out[k], p_out[k], hs[t-d][k], hp[t-d][k]);
          end
        end
      end
      @(negedge clk);
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
