// tb_fasta_b_cell: B-cell test. A model register holds the cumulative carry.
// Each cycle the carry into the cell's bit is I4 | (I3 & carry); O1 must be
// the sum bit and O2 the carry-out of I1 + I2 + that carry. Separator
// inputs (I1,I2,I3,I4) = (0,0,1,0) must emit the stored carry and clear it.
module tb_fasta_b_cell;

  logic clk = 1'b0;
  logic rst_n;
  logic i1, i2, i3, i4;
  logic o1, o2;
  int   checks = 0, failures = 0;
  int   n_sep1 = 0;

  always #5 clk = ~clk;

  fasta_b_cell u_dut (.*);

  task automatic expect_bit(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    logic carry, cin;
    logic [1:0] sum;
    logic [3:0] v;
    rst_n = 1'b0; {i1, i2, i3, i4} = '0;
    repeat (2) @(negedge clk);
    expect_bit("reset o2", o2, 1'b0);
    rst_n = 1'b1;
    carry = 1'b0;
    for (int i = 0; i < 600; i++) begin
      v = 4'($urandom);
      if ($urandom % 5 == 0) v = 4'b0010;   // separator: I1=I2=I4=0, I3=1
      {i1, i2, i3, i4} = v;
      cin = v[0] | (v[1] & carry);
      sum = 2'(v[3]) + 2'(v[2]) + 2'(cin);
      if (v == 4'b0010 && carry) n_sep1++;
      @(negedge clk);
      expect_bit("o1", o1, sum[0]);
      expect_bit("o2", o2, sum[1]);
      carry = sum[1];
    end
    checks++;
    if (n_sep1 == 0) begin failures++; $display("separator never met a stored carry"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
