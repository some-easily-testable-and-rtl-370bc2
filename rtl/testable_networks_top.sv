// testable_networks_top: the easily testable / diagnosable realizations side
// by side.
//
// The networks are alternative realizations of a function, not parts of one
// circuit, so each keeps its own ports (prefix per network):
//   n1_*  Network (I), 16 controllable levels, the 5-variable example f5
//   n2_*  Network (II), n = 5 (one complement control z), the same f5 in
//         4 levels
//   n2e_* Network (II), n = 4 (controls z1, z2), a 4-variable example of this
//         design's own: f = ~x1x2 ^ x3~x4 ^ x1x2x3x4
//   n3_*  Network (III), 16 blocks of 5 inputs, function set by the controls
//   sq_*  the sequential circuit on Network (II), a 2-bit counter example
// Only the sequential circuit has a clock; everything else is
// combinational. In operation: n1_c1 = '1, n1_c2 = '0, n1_x0 = 1;
// n2_z = 1, n2_c0 = 0; n2e_z = 2'b11, n2e_c0 = 0; sq_z = 1, sq_c0 = 0,
// sq_cs = 0. The observation outputs (t', h, y, g) are brought out for test.
module testable_networks_top (
  // Network (I)
  input  logic [4:0]       n1_x,
  input  logic             n1_x0,
  input  logic [15:0]      n1_c1,
  input  logic [15:0]      n1_c2,
  output logic [15:0]      n1_t_prime,
  output logic [15:0]      n1_h,
  output logic             n1_f,
  // Network (II), n odd
  input  logic [4:0]       n2_x,
  input  logic             n2_z,
  input  logic             n2_c0,
  input  logic             n2_cw,
  output logic [4:0]       n2_y,
  output logic [3:0]       n2_g,
  output logic             n2_f,
  output logic             n2_w,
  // Network (II), n even
  input  logic [3:0]       n2e_x,
  input  logic [1:0]       n2e_z,
  input  logic             n2e_c0,
  input  logic             n2e_cw,
  output logic [3:0]       n2e_y,
  output logic [2:0]       n2e_g,
  output logic             n2e_f,
  output logic             n2e_w,
  // Network (III)
  input  logic [4:0]       n3_x,
  input  logic [15:0][4:0] n3_c,
  input  logic             n3_c0,
  output logic [15:0]      n3_y,
  output logic             n3_f,
  // sequential circuit
  input  logic             sq_clk,
  input  logic             sq_rst_n,
  input  logic [0:0]       sq_x,
  input  logic             sq_z,
  input  logic             sq_c0,
  input  logic [1:0]       sq_cs,
  input  logic             sq_cw,
  output logic [1:0]       sq_q,
  output logic [1:0]       sq_g,
  output logic             sq_f,
  output logic             sq_w
);

  network_i u_n1 (
    .x       (n1_x),
    .x0      (n1_x0),
    .c1      (n1_c1),
    .c2      (n1_c2),
    .t_prime (n1_t_prime),
    .h       (n1_h),
    .f       (n1_f)
  );

  network_ii u_n2 (
    .x  (n2_x),
    .z  (n2_z),
    .c0 (n2_c0),
    .cw (n2_cw),
    .y  (n2_y),
    .g  (n2_g),
    .f  (n2_f),
    .w  (n2_w)
  );

  network_ii #(
    .N     (4),
    .M     (3),
    .USE_X ({4'b1111, 4'b0100, 4'b0010}),
    .USE_Y ({4'b0000, 4'b1000, 4'b0001})
  ) u_n2e (
    .x  (n2e_x),
    .z  (n2e_z),
    .c0 (n2e_c0),
    .cw (n2e_cw),
    .y  (n2e_y),
    .g  (n2e_g),
    .f  (n2e_f),
    .w  (n2e_w)
  );

  network_iii u_n3 (
    .x  (n3_x),
    .c  (n3_c),
    .c0 (n3_c0),
    .y  (n3_y),
    .f  (n3_f)
  );

  sequential_network_ii u_sq (
    .clk   (sq_clk),
    .rst_n (sq_rst_n),
    .x     (sq_x),
    .z     (sq_z),
    .c0    (sq_c0),
    .cs    (sq_cs),
    .cw    (sq_cw),
    .q     (sq_q),
    .g     (sq_g),
    .f     (sq_f),
    .w     (sq_w)
  );

endmodule
