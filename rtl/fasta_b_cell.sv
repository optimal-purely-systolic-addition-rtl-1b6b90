// fasta_b_cell: B-cell, the rightmost cell of the FASTA adder's top row.
//
// It stands for the last bit position i = qM+M-1 of every block and also
// chains the blocks together. Flip-flop O2 holds the cumulative carry
// G[0,qM-1] into the current block. With I4/I3 = G/P of bits qM..i-1 from
// the last A-cell, the carry into position i is
//     c = I4 | (I3 & O2)
// and on the clock edge
//     O1 <= I1 ^ I2 ^ c                        (sum bit s_i)
//     O2 <= (I1 & I2) | ((I1 ^ I2) & c)        (G[0,i], carry into block q+1)
// The gate network (two XOR, two AND, two OR, two flip-flops, O2 fed back
// into the AND with I3) follows the published B-cell schematic.
//
// No reset is needed in operation: the operand pair (0,0) that separates
// two computations, arriving together with G=0, P=1 from the left, copies
// the final carry s_n to O1 and clears O2. The synchronous reset is this
// implementation's own addition so that O2 starts cleared.
//
// Interface: I1/I2 operand bits from the top, I4 (G) and I3 (P) from the
// left, O1 to the right, O2 to the C column below. Timing: one cycle.
module fasta_b_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic i1,   // a_i
  input  logic i2,   // b_i
  input  logic i3,   // P[qM, i-1]
  input  logic i4,   // G[qM, i-1]
  output logic o1,   // s_i, or s_n after the separator pair
  output logic o2    // G[0, i]
);

  logic x, c;

  always_comb begin
    x = i1 ^ i2;
    c = i4 | (i3 & o2);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      o1 <= 1'b0;
      o2 <= 1'b0;
    end else begin
      o1 <= x ^ c;
      o2 <= (i1 & i2) | (x & c);
    end
  end

endmodule
