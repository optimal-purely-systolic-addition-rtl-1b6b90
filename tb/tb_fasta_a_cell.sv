// tb_fasta_a_cell: A-cell test. Random inputs every cycle; one cycle later
// the outputs must equal the carry and sum bit of the integer sum
// a + b + G_in, the propagate P_in & (a ^ b), and the passed-down P_in.
module tb_fasta_a_cell;

  logic clk = 1'b0;
  logic rst_n;
  logic g_in, p_in, a, b;
  logic g_out, p_out, s_out, p_dn;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  fasta_a_cell u_dut (.*);

  task automatic expect_bit(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    logic [1:0] sum;
    logic pg, pp, pa, pb;
    rst_n = 1'b0; g_in = 0; p_in = 0; a = 0; b = 0;
    repeat (2) @(negedge clk);
    expect_bit("reset g_out", g_out, 1'b0);
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      {pg, pp, pa, pb} = (i < 16) ? 4'(i) : 4'($urandom);
      {g_in, p_in, a, b} = {pg, pp, pa, pb};
      @(negedge clk);
      sum = 2'(pa) + 2'(pb) + 2'(pg);
      expect_bit("g_out", g_out, sum[1]);
      expect_bit("s_out", s_out, sum[0]);
      expect_bit("p_out", p_out, pp & (pa != pb));
      expect_bit("p_dn",  p_dn,  pp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
