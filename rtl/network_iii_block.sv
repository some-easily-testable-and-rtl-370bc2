// network_iii_block: block B_n^i of the universal Network (III).
//
// Every input x_j passes an EOR gate with its own control terminal c_j, and
// one AND gate combines the n EOR outputs:
//   y = &(x ^ c)
// The control chooses the literal of x_j in the term:
//   c_j = 0    -> x_j
//   c_j = 1    -> ~x_j
//   c_j = ~x_j -> 1   (x_j absent from the term)
//   c_j = x_j  -> 0   (block output forced to 0, block unused)
// so one block can produce any product term when its controls are driven
// with constants, the inputs or their complements. The structure follows
// the paper.
//
// Interface: combinational. x and c are N bits, bit j-1 is variable x_j.
module network_iii_block #(
  parameter int N = 5
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] c,
  output logic         y
);

  logic [N-1:0] lit;

  assign lit = x ^ c;
  assign y   = &lit;

endmodule
