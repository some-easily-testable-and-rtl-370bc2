// tdn_tb_pkg: reference functions for the test benches, written directly
// from the algebraic forms of the 5-variable example, independently of the
// term masks used as RTL parameters. x[0] is x1 ... x[4] is x5.
package tdn_tb_pkg;

  // The example as a positive-polarity Reed-Muller sum (constant term 1 and
  // 16 products).
  function automatic logic f5_rm(input logic [4:0] x);
    logic x1, x2, x3, x4, x5;
    {x5, x4, x3, x2, x1} = x;
    return 1'b1 ^ (x1 & x3) ^ (x1 & x2 & x3) ^ (x1 & x2 & x4) ^ (x3 & x4)
         ^ (x1 & x3 & x4) ^ (x2 & x3) ^ (x2 & x3 & x4) ^ (x1 & x2 & x3 & x4)
         ^ (x1 & x5) ^ (x2 & x5) ^ (x1 & x2 & x5) ^ (x3 & x5) ^ (x3 & x4 & x5)
         ^ (x1 & x3 & x4 & x5) ^ (x2 & x3 & x4 & x5) ^ (x1 & x2 & x3 & x4 & x5);
  endfunction

  // The four gates of the 4-level realization with every input taken
  // uncomplemented, which is what they compute when the complement control
  // is 0.
  function automatic logic f5_true_lits(input logic [4:0] x);
    logic x1, x2, x3, x4, x5;
    {x5, x4, x3, x2, x1} = x;
    return (x3 & x5) ^ (x1 & x2 & x4) ^ (x1 & x2 & x3 & x5) ^ (x1 & x2 & x3 & x4 & x5);
  endfunction

  // Parity of a vector, counted bit by bit.
  function automatic logic parity(input logic [31:0] v, input int n);
    logic p = 1'b0;
    for (int k = 0; k < n; k++) p ^= v[k];
    return p;
  endfunction

endpackage
