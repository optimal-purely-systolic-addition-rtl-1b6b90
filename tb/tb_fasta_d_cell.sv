// tb_fasta_d_cell: D-cell test. Random pairs; each must reappear one cycle
// later, and reset must clear both outputs.
module tb_fasta_d_cell;

  logic clk = 1'b0;
  logic rst_n;
  logic s_in, p_in;
  logic s_out, p_out;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  fasta_d_cell u_dut (.*);

  task automatic expect_bit(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    logic [1:0] v;
    rst_n = 1'b0; s_in = 1'b1; p_in = 1'b1;
    repeat (2) @(negedge clk);
    expect_bit("reset s_out", s_out, 1'b0);
    expect_bit("reset p_out", p_out, 1'b0);
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      v = 2'($urandom);
      {s_in, p_in} = v;
      @(negedge clk);
      expect_bit("s_out", s_out, v[1]);
      expect_bit("p_out", p_out, v[0]);
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
