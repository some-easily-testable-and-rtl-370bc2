// net2_input_stage: input buses of Network (II), with the complement EOR
// gates and the fault-detection EOR cascade.
//
// Every primary input x_j passes an EOR gate with a complement control:
//   y_j = x_j ^ z.
// With z = 0 the y lines repeat the inputs; with z = 1 they carry the
// complements, so the AND gates that follow can use both polarities from
// one set of input pins. The y lines also feed a cascade of EOR gates,
//   w = cw ^ y_1 ^ ... ^ y_n,
// which makes every single fault on the input buses visible at w. Taking w
// over the y lines (rather than the x lines) follows the paper's drawing of
// its 5-variable example.
// A fault on a control line changes all the lines it drives at once; since
// an even number of changes cancels in an EOR chain, each control must drive
// an odd number of lines. For odd N there is one control z (z[0]); for even
// N there are two, z1 = z[0] driving x_1..x_Z1_LINES and z2 = z[1] driving
// the rest. Z1_LINES must be odd; the default (N-1 for even N) is this
// design's choice, the paper only requires an odd count for each.
//
// Interface: combinational. Widths: x, y are N bits, z is 1 bit for odd N
// and 2 bits for even N.
module net2_input_stage
  import tdn_pkg::*;
#(
  parameter int N        = 5,
  parameter int Z1_LINES = z1_lines(N),
  localparam int NZ      = z_width(N)
) (
  input  logic [N-1:0]  x,
  input  logic [NZ-1:0] z,
  input  logic          cw,
  output logic [N-1:0]  y,
  output logic          w
);

  // Control seen by each line.
  logic [N-1:0] zl;

  for (genvar j = 0; j < N; j++) begin : g_line
    if (NZ == 1 || j < Z1_LINES) begin : g_z1
      assign zl[j] = z[0];
    end else begin : g_z2
      assign zl[j] = z[NZ-1];
    end
    assign y[j] = x[j] ^ zl[j];
  end

  eor_cascade #(.W(N)) u_fd (
    .c   (cw),
    .in  (y),
    .out (w)
  );

  if (NZ == 2) begin : g_chk
    initial assert (Z1_LINES % 2 == 1 && (N - Z1_LINES) % 2 == 1)
      else $error("net2_input_stage: each control must drive an odd number of lines");
  end

endmodule
