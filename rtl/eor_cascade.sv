// eor_cascade: one-dimensional cascade of two-input exclusive-OR gates.
//
// This is the "collector" of every network in this library and also the
// fault-detection chain of Network (II). Gate k takes the output of gate
// k-1 (gate 0 takes the head input c) and one input bit in[k]:
//   v_k = c ^ in[0] ^ ... ^ in[k],   out = v_(W-1).
// The chain is kept as a chain (W gate levels) rather than a balanced tree,
// because the structure, and its number of logic levels, is the point of
// the design: with a single faulty gate every other gate still passes its
// inputs on, so the fault shows at the output and can be located. Each gate
// has its own output net g_gate[k].v, so a single gate can be observed or
// forced (fault injection) on its own.
//
// Interface: purely combinational, no clock. W >= 1.
module eor_cascade #(
  parameter int W = 4
) (
  input  logic         c,
  input  logic [W-1:0] in,
  output logic         out
);

  for (genvar k = 0; k < W; k++) begin : g_gate
    logic v;
    if (k == 0) begin : g_head
      assign v = c ^ in[k];
    end else begin : g_next
      assign v = g_gate[k-1].v ^ in[k];
    end
  end

  assign out = g_gate[W-1].v;

endmodule
