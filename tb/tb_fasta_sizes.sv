// tb_fasta_sizes: the FASTA adder at other sizes, M = 2, 3, 5 and 8
// (4-, 9-, 25- and 64-bit operands), each with the same stimulus and
// scoreboard as the default-size test, all four running side by side.
module tb_fasta_sizes;

  logic clk = 1'b0;
  logic rst_n;

  always #5 clk = ~clk;

  localparam int NS = 4;
  localparam int MS [NS] = '{2, 3, 5, 8};

  logic [NS-1:0] done;
  int            checks   [NS];
  int            failures [NS];

  for (genvar i = 0; i < NS; i++) begin : g_size
    localparam int M = MS[i];
    logic [M-1:0] a_in, b_in;
    logic         s_top;
    logic [M-2:0] s_col;
    logic         g_out;

    fasta #(.M(M)) u_dut (
      .clk  (clk),
      .rst_n(rst_n),
      .a_in (a_in),
      .b_in (b_in),
      .s_top(s_top),
      .s_col(s_col),
      .g_out(g_out)
    );

    fasta_stim_check #(.M(M), .NCOMP(250), .SEED(100 + i)) u_chk (
      .clk     (clk),
      .rst_n   (rst_n),
      .a_in    (a_in),
      .b_in    (b_in),
      .s_top   (s_top),
      .s_col   (s_col),
      .g_out   (g_out),
      .done    (done[i]),
      .checks  (checks[i]),
      .failures(failures[i])
    );
  end

  initial begin
    int c, f;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (&done);
    @(posedge clk);
    c = 0; f = 0;
    for (int i = 0; i < NS; i++) begin c += checks[i]; f += failures[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end

  initial begin
    int f;
    repeat (20000) @(posedge clk);
    f = 1;
    for (int i = 0; i < NS; i++) f += failures[i];
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks[0], f);
    $finish;
  end

endmodule
