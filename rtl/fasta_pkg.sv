// fasta_pkg: types and functions shared by the cells of the FASTA adder.
//
// The adder is a carry-lookahead adder. Every group of bit positions [i,j]
// carries a (G,P) pair: G = the group generates a carry out of position j
// whatever comes in, P = the group passes an incoming carry through. Two
// neighbouring groups combine with the associative operator 'o':
//     (G,P) o (G',P') = (G' | (P' & G), P & P')
// where (G,P) belongs to the lower (less significant) group. A single bit i
// has G = a_i & b_i and P = a_i ^ b_i. These definitions follow the
// carry-lookahead formulation of the design; the struct and function
// packaging is this implementation's own.
package fasta_pkg;

  // Generate/propagate pair of a group of bit positions.
  typedef struct packed {
    logic g;
    logic p;
  } gp_t;

  // (G,P) pair of a single bit position.
  function automatic gp_t gp_bit(input logic a, input logic b);
    gp_t r;
    r.g = a & b;
    r.p = a ^ b;
    return r;
  endfunction

  // lo o hi: lo is the less significant group, hi the more significant one.
  function automatic gp_t gp_op(input gp_t lo, input gp_t hi);
    gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = lo.p & hi.p;
    return r;
  endfunction

  // Constant pair entering the leftmost A-cell: the empty group neither
  // generates nor blocks a carry.
  localparam gp_t GP_EMPTY = '{g: 1'b0, p: 1'b1};

endpackage
