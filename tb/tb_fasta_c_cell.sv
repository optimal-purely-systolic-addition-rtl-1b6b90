// tb_fasta_c_cell: C-cell test. With random inputs, one cycle later s_out
// must be s_in flipped exactly when the block carry enters and the lower
// bits of the block propagate it, and g_out must repeat g_in.
module tb_fasta_c_cell;

  logic clk = 1'b0;
  logic rst_n;
  logic g_in, p_in, s_in;
  logic s_out, g_out;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  fasta_c_cell u_dut (.*);

  task automatic expect_bit(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    logic [2:0] v;
    rst_n = 1'b0; {g_in, p_in, s_in} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      v = (i < 8) ? 3'(i) : 3'($urandom);
      {g_in, p_in, s_in} = v;
      @(negedge clk);
      expect_bit("s_out", s_out, (v[2] && v[1]) ? !v[0] : v[0]);
      expect_bit("g_out", g_out, v[2]);
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
