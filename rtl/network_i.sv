// network_i: easily diagnosable Network (I).
//
// A Reed-Muller (positive-polarity ring-sum) realization with a control
// pair per level. Level i has an AND gate forming the product term t_i of
// uncomplemented inputs, with the extra control input c1^i, and an EOR gate
// adding the control c2^i:
//   t'_i = t_i & c1^i
//   h_i  = t'_i ^ c2^i
// The h_i are summed by a collector chain headed by the constant x0:
//   f = x0 ^ h_m ^ ... ^ h_1
// (level 1 is the one next to the output, level m the one next to x0).
// Normal operation is c1 = all ones, c2 = all zeros, where f is the function
// given by the terms. For test and diagnosis the controls make every level
// pass its term, pass its complement or output 0, so a fault can be placed
// in a particular AND gate, EOR gate or collector stage.
//
// Terms are given as an N-bit mask per level in TERM (bit j-1 set when x_j
// is in the term; index i-1 is level i). The default is the paper's
// 5-variable example: 16 terms plus the constant x0 = 1, realized in 16
// collector levels. The control structure, the level order and the example
// follow the paper; the observation outputs t_prime and h are this
// design's addition for test benches (the circuit needs only f).
//
// Interface: combinational.
module network_i #(
  parameter int N = 5,
  parameter int M = 16,
  // levels 16 .. 1 of the example (x1x3 is level 1)
  parameter logic [M-1:0][N-1:0] TERM = {
    5'b11111, 5'b11110, 5'b11101, 5'b11100,
    5'b10100, 5'b10011, 5'b10010, 5'b10001,
    5'b01111, 5'b01110, 5'b00110, 5'b01101,
    5'b01100, 5'b01011, 5'b00111, 5'b00101
  }
) (
  input  logic [N-1:0] x,
  input  logic         x0,
  input  logic [M-1:0] c1,
  input  logic [M-1:0] c2,
  output logic [M-1:0] t_prime,
  output logic [M-1:0] h,
  output logic         f
);

  for (genvar i = 0; i < M; i++) begin : g_level
    // AND gate: the selected inputs plus the control c1^i.
    assign t_prime[i] = (&(x | ~TERM[i])) & c1[i];
    // Control EOR gate.
    assign h[i] = t_prime[i] ^ c2[i];
  end

  // Collector: x0 enters at level m, the output leaves after level 1, so the
  // chain takes h in the order h_m, ..., h_1.
  logic [M-1:0] h_rev;

  for (genvar i = 0; i < M; i++) begin : g_rev
    assign h_rev[i] = h[M-1-i];
  end

  eor_cascade #(.W(M)) u_coll (
    .c   (x0),
    .in  (h_rev),
    .out (f)
  );

endmodule
