// network_ii_tb: checks Network (II).
//
// Default instance (n = 5, the 4-level realization of the 5-variable
// example):
//   - operation (z = 1, c0 = 0): f equals the 16-level Reed-Muller form of
//     the same function for all 32 inputs; the AND gates have 2, 3, 4 and 5
//     inputs, so the depth of the collector is 4;
//   - test mode (z = 0): every gate sees true inputs only;
//   - the n+6 vector test set (I1..I6 and T1..Tn, don't-cares random):
//     f and w must take their fault-free values, and the set must drive f
//     and w to both values;
//   - random inputs on every port.
// Even instance (n = 4, controls z1/z2): a 4-variable example
// f = ~x1x2 ^ x3~x4 ^ x1x2x3x4 checked for every input and control value.
module network_ii_tb;
  import tdn_tb_pkg::*;

  logic [4:0] x, y;
  logic       z, c0, cw, f, w;
  logic [3:0] g;
  logic [3:0] xe, ye;
  logic [1:0] ze;
  logic       c0e, cwe, fe, we;
  logic [2:0] ge;
  int checks = 0, failures = 0;

  network_ii dut (.x(x), .z(z), .c0(c0), .cw(cw), .y(y), .g(g), .f(f), .w(w));

  network_ii #(
    .N(4), .M(3),
    .USE_X({4'b1111, 4'b0100, 4'b0010}),
    .USE_Y({4'b0000, 4'b1000, 4'b0001})
  ) dut_e (.x(xe), .z(ze), .c0(c0e), .cw(cwe), .y(ye), .g(ge), .f(fe), .w(we));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic logic exp_f(input logic [4:0] xv, input logic zv, input logic c0v);
    return c0v ^ (zv ? f5_rm(xv) : f5_true_lits(xv));
  endfunction

  function automatic logic exp_w(input logic [4:0] xv, input logic zv, input logic cwv);
    return cwv ^ parity({27'b0, xv ^ {5{zv}}}, 5);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int f_seen [2];
    int w_seen [2];
    // operation and test mode, exhaustive
    for (int v = 0; v < 256; v++) begin
      {cw, c0, z, x} = v[7:0];
      #1;
      check(f == exp_f(x, z, c0), $sformatf("f x=%b z=%b c0=%b", x, z, c0));
      check(w == exp_w(x, z, cw), $sformatf("w x=%b z=%b cw=%b", x, z, cw));
      check(y == (x ^ {5{z}}), $sformatf("y x=%b z=%b", x, z));
    end
    // Individual gate outputs in operation.
    z = 1'b1; c0 = 1'b0; cw = 1'b0;
    x = 5'b01011; #1; check(g == 4'b0011, "g1 and g2 at x1x2x4");
    x = 5'b01010; #1; check(g == 4'b0001, "g1 = ~x3~x5 alone");
    x = 5'b10000; #1; check(g == 4'b0100, "g3 = ~x1~x2~x3x5 alone");
    x = 5'b00100; #1; check(g == 4'b1000, "g4 = ~x1~x2x3~x4~x5 alone");
    // test set of n+6 vectors: c0; x; z; cw
    f_seen = '{0, 0};
    w_seen = '{0, 0};
    for (int t = 0; t < 11; t++) begin
      case (t)
        0: begin c0 = 0; x = '1; z = 0; cw = 1; end
        1: begin c0 = 1; x = '1; z = 0; cw = 0; end
        2: begin c0 = 0; x = '0; z = 0; cw = 1; end
        3: begin c0 = 1; x = '0; z = 0; cw = 0; end
        4: begin c0 = 1'($urandom); x = '1; z = 1; cw = 1'($urandom); end
        5: begin c0 = 1'($urandom); x = '0; z = 1; cw = 1'($urandom); end
        default: begin
          c0 = 1'($urandom); z = 0; cw = 1'($urandom);
          x = '1; x[t-6] = 1'b0;
        end
      endcase
      #1;
      check(f == exp_f(x, z, c0), $sformatf("test vector %0d f", t + 1));
      check(w == exp_w(x, z, cw), $sformatf("test vector %0d w", t + 1));
      f_seen[f]++;
      w_seen[w]++;
    end
    check(f_seen[0] > 0 && f_seen[1] > 0, "test set drives f to both values");
    check(w_seen[0] > 0 && w_seen[1] > 0, "test set drives w to both values");
    // even instance, exhaustive
    for (int v = 0; v < 256; v++) begin
      logic [3:0] yl;
      logic ef, ew;
      {cwe, c0e, ze, xe} = v[7:0];
      #1;
      yl = xe ^ {ze[1], ze[0], ze[0], ze[0]};
      ef = c0e ^ (yl[0] & xe[1]) ^ (xe[2] & yl[3]) ^ (&xe);
      ew = cwe ^ parity({28'b0, yl}, 4);
      check(fe == ef, $sformatf("even f x=%b z=%b c0=%b", xe, ze, c0e));
      check(we == ew, $sformatf("even w x=%b z=%b cw=%b", xe, ze, cwe));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
