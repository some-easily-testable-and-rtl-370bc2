// sequential_network_ii: easily testable sequential circuit built on
// Network (II).
//
// S D-type flip-flops hold the state q_1..q_S. Their outputs are fed back as
// extra input lines next to the primary inputs x_1..x_N, so the input stage
// (net2_input_stage) works on L = N+S lines: every line gets a complement
// EOR (y = line ^ z) and a gate in the fault-detection cascade
// (w = cw ^ y_1 ^ ... ^ y_L). AND gates take x/q lines (USE_X) and y lines
// (USE_Y) as in Network (II). There are S+1 collector cascades: collector k
// (head input cs[k-1], the C_k of the figure) sums the terms routed to it
// and drives the next state g_k of flip-flop k; collector 0 (head c0) sums
// its terms into the output f. DEST[t] is a one-hot word saying which
// collector term t belongs to: bit 0 the output, bit k next state k.
// Through cs and c0 the tester can invert any next state or the output,
// and through z it can turn all complemented literals into true ones, as
// in the combinational network.
//
// The default is this design's own example (the paper gives no
// function): a 2-bit counter with count enable x_1 and a flag for state 0:
//   g1 = C1 ^ q1 ^ x1,  g2 = C2 ^ q2 ^ q1 x1,  f = C0 ^ ~q1 ~q2
// in operation (z = 1, C1 = C2 = C0 = 0). The line order is x_1..x_N,
// q_1..q_S. The asynchronous active-low reset is this design's addition.
//
// Interface: flip-flops load g on the rising edge of clk; f, g and w are
// combinational in the current inputs and state.
module sequential_network_ii
  import tdn_pkg::*;
#(
  parameter int N = 1,
  parameter int S = 2,
  parameter int M = 5,
  localparam int L = N + S,
  // lines: bit 0 = x1, bit 1 = q1, bit 2 = q2; terms 4 .. 0
  parameter logic [M-1:0][L-1:0] USE_X = {3'b000, 3'b011, 3'b100, 3'b001, 3'b010},
  parameter logic [M-1:0][L-1:0] USE_Y = {3'b110, 3'b000, 3'b000, 3'b000, 3'b000},
  parameter logic [M-1:0][S:0]   DEST  = {3'b001, 3'b100, 3'b100, 3'b010, 3'b010},
  parameter int Z1_LINES = z1_lines(L),
  localparam int NZ = z_width(L)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  x,
  input  logic [NZ-1:0] z,
  input  logic          c0,
  input  logic [S-1:0]  cs,
  input  logic          cw,
  output logic [S-1:0]  q,
  output logic [S-1:0]  g,
  output logic          f,
  output logic          w
);

  logic [L-1:0] line;
  logic [L-1:0] y;
  logic [M-1:0] p;

  assign line = {q, x};

  net2_input_stage #(.N(L), .Z1_LINES(Z1_LINES)) u_in (
    .x  (line),
    .z  (z),
    .cw (cw),
    .y  (y),
    .w  (w)
  );

  for (genvar t = 0; t < M; t++) begin : g_term
    assign p[t] = &(line | ~USE_X[t]) & &(y | ~USE_Y[t]);
  end

  // Collector k sees only its own terms; the others enter as 0, which leaves
  // the ring sum unchanged.
  logic [S:0] coll_out;

  for (genvar k = 0; k <= S; k++) begin : g_coll
    logic [M-1:0] sel;
    for (genvar t = 0; t < M; t++) begin : g_sel
      assign sel[t] = p[t] & DEST[t][k];
    end
    eor_cascade #(.W(M)) u_coll (
      .c   ((k == 0) ? c0 : cs[(k == 0) ? 0 : k-1]),
      .in  (sel),
      .out (coll_out[k])
    );
  end

  assign f = coll_out[0];
  assign g = coll_out[S:1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= g;
  end

  for (genvar t = 0; t < M; t++) begin : g_chk
    initial assert ($onehot(DEST[t]))
      else $error("sequential_network_ii: term %0d must feed exactly one collector", t);
  end

endmodule
