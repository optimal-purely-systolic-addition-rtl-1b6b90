// tb_fasta: end-to-end test of the FASTA adder at its default size
// (M = 4, 16-bit operands, the layout of the published FASTA_16).
//
// A stimulus/scoreboard module streams a few hundred additions through the
// array in the diagonal input format: back to back and with idle gaps,
// random and corner-case operands (all-ones plus one, which ripples a carry
// through every block), and operand lengths of Q = M, Q > M and Q < M
// diagonals. Every sum bit, the carry-out and the block-carry stream are
// compared with integer addition at the exact cycle the schedule predicts,
// which also checks the latency 3M-3 and the period M+1.
module tb_fasta;

  logic clk = 1'b0;
  logic rst_n;
  logic [3:0] a_in, b_in;
  logic       s_top;
  logic [2:0] s_col;
  logic       g_out;
  logic       done;
  int         checks, failures;

  always #5 clk = ~clk;

  fasta u_dut (
    .clk  (clk),
    .rst_n(rst_n),
    .a_in (a_in),
    .b_in (b_in),
    .s_top(s_top),
    .s_col(s_col),
    .g_out(g_out)
  );

  fasta_stim_check #(.M(4), .NCOMP(400), .SEED(7)) u_chk (
    .clk     (clk),
    .rst_n   (rst_n),
    .a_in    (a_in),
    .b_in    (b_in),
    .s_top   (s_top),
    .s_col   (s_col),
    .g_out   (g_out),
    .done    (done),
    .checks  (checks),
    .failures(failures)
  );

  initial begin
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (done);
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
