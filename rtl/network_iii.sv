// network_iii: easily diagnosable universal Network (III).
//
// K identical blocks B_n^i (network_iii_block) share the input bus x; the
// block outputs y^i are summed by a one-dimensional EOR cascade headed by c0:
//   f = c0 ^ y^k ^ ... ^ y^1
// (block 1 is next to the output, block k next to c0). Each block has its
// own n control terminals, so the function is set entirely by what drives
// them: for each block, a constant or the input / its complement per
// variable selects one product term. With K = 2^(N-1) blocks any N-variable
// function can be realized. Because every block and every collector gate
// can be controlled separately, a failing test can be traced to one block
// or to the collector, and spare blocks (a larger K) allow repair.
//
// The structure follows the paper; the default K = 2^(N-1) = 16 for the
// 5-variable example reads its statement on the number of blocks needed for
// a universal network.
//
// Interface: combinational. c[i-1] holds the N controls of block i.
module network_iii #(
  parameter int N = 5,
  parameter int K = 2 ** (N - 1)
) (
  input  logic [N-1:0]        x,
  input  logic [K-1:0][N-1:0] c,
  input  logic                c0,
  output logic [K-1:0]        y,
  output logic                f
);

  for (genvar i = 0; i < K; i++) begin : g_blk
    network_iii_block #(.N(N)) u_blk (
      .x (x),
      .c (c[i]),
      .y (y[i])
    );
  end

  // c0 enters beside block k, the output leaves after block 1.
  logic [K-1:0] y_rev;

  for (genvar i = 0; i < K; i++) begin : g_rev
    assign y_rev[i] = y[K-1-i];
  end

  eor_cascade #(.W(K)) u_coll (
    .c   (c0),
    .in  (y_rev),
    .out (f)
  );

endmodule
