// network_ii: easily testable Network (II).
//
// Realizes a function as an exclusive-OR sum of product terms that may use
// complemented inputs:
//   f = c0 ^ g_1 ^ g_2 ^ ... ^ g_m
// The input stage (net2_input_stage) makes y_j = x_j ^ z. In operation z = 1,
// so the y lines carry the complements, and each AND gate g_j takes some x
// lines (USE_X) and some y lines (USE_Y). Allowing both polarities shortens
// the collector: the paper's 5-variable example needs 16 levels as a
// positive-polarity sum but only 4 here, which is the default configuration:
//   f5 = ~x3~x5 ^ x1x2x4 ^ ~x1~x2~x3x5 ^ ~x1~x2x3~x4~x5   (z = 1, c0 = 0).
// For test the controls are driven too: z = 0 makes every AND gate see only
// true inputs, c0 and cw invert f and w, and the parity output
//   w = cw ^ y_1 ^ ... ^ y_n
// exposes faults on the input buses. A short test set of n+6 vectors (all
// ones, all zeros with both values of c0/cw, the same with z = 1, and the n
// vectors with a single zero) detects any single fault in the network.
//
// For even N the control is split in z1/z2 (see net2_input_stage).
// Structure and example follow the paper; the bit ordering below is
// this design's: bit j-1 of a mask is x_j, index j-1 is term g_j.
//
// Interface: combinational. g and y are observation outputs.
module network_ii
  import tdn_pkg::*;
#(
  parameter int N = 5,
  parameter int M = 4,
  // g_4 .. g_1 of the example
  parameter logic [M-1:0][N-1:0] USE_X = {5'b00100, 5'b10000, 5'b01011, 5'b00000},
  parameter logic [M-1:0][N-1:0] USE_Y = {5'b11011, 5'b00111, 5'b00000, 5'b10100},
  parameter int Z1_LINES = z1_lines(N),
  localparam int NZ = z_width(N)
) (
  input  logic [N-1:0]  x,
  input  logic [NZ-1:0] z,
  input  logic          c0,
  input  logic          cw,
  output logic [N-1:0]  y,
  output logic [M-1:0]  g,
  output logic          f,
  output logic          w
);

  net2_input_stage #(.N(N), .Z1_LINES(Z1_LINES)) u_in (
    .x  (x),
    .z  (z),
    .cw (cw),
    .y  (y),
    .w  (w)
  );

  // AND gates: an input that is not selected reads as 1.
  for (genvar j = 0; j < M; j++) begin : g_term
    assign g[j] = &(x | ~USE_X[j]) & &(y | ~USE_Y[j]);
  end

  eor_cascade #(.W(M)) u_coll (
    .c   (c0),
    .in  (g),
    .out (f)
  );

endmodule
