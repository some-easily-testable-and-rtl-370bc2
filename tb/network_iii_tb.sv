// network_iii_tb: checks Network (III) at its default (n = 5, 16 blocks).
//
// 1. The 5-variable example programmed as four product terms (the 4-level
//    exclusive-OR form) in blocks 1..4, the other blocks disabled by driving
//    their controls with the inputs: f must equal the 16-term Reed-Muller
//    form for every input.
// 2. Universality: random truth tables of 5 variables. For each assignment
//    of x1..x4 one block forms that minterm times a literal of x5 (x5, ~x5,
//    1 or, by disabling the block, 0), which covers the function with 16
//    blocks. f must match the table.
// 3. Random controls, with the expected value from a block-by-block model.
// 4. c0 inverts the output.
module network_iii_tb;
  import tdn_tb_pkg::*;

  localparam int N = 5;
  localparam int K = 16;

  logic [N-1:0]        x;
  logic [K-1:0][N-1:0] c;
  logic                c0;
  logic [K-1:0]        y;
  logic                f;
  int checks = 0, failures = 0;

  network_iii dut (.x(x), .c(c), .c0(c0), .y(y), .f(f));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Literal code per variable: 0 absent, 1 true, 2 complemented, 3 block off.
  function automatic logic [N-1:0] ctl(input logic [N-1:0] xv, input int code [N]);
    logic [N-1:0] r;
    for (int j = 0; j < N; j++)
      case (code[j])
        0: r[j] = !xv[j];
        1: r[j] = 1'b0;
        2: r[j] = 1'b1;
        default: r[j] = xv[j];
      endcase
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ex [4][N] = '{
      '{0, 0, 2, 0, 2},   // ~x3 ~x5
      '{1, 1, 0, 1, 0},   // x1 x2 x4
      '{2, 2, 2, 0, 1},   // ~x1 ~x2 ~x3 x5
      '{2, 2, 1, 2, 2}};  // ~x1 ~x2 x3 ~x4 ~x5
    int off [N] = '{3, 3, 3, 3, 3};
    // 1. the example function
    c0 = 1'b0;
    for (int v = 0; v < 32; v++) begin
      x = v[4:0];
      for (int i = 0; i < K; i++) c[i] = ctl(x, (i < 4) ? ex[i] : off);
      #1;
      check(f == f5_rm(x), $sformatf("example x=%b f=%b", x, f));
    end
    // 2. random truth tables
    for (int r = 0; r < 200; r++) begin
      logic [31:0] tt;
      tt = $urandom;
      for (int v = 0; v < 32; v++) begin
        x = v[4:0];
        for (int i = 0; i < K; i++) begin
          int code [N];
          logic f0, f1;
          // block i: minterm i of x1..x4
          for (int j = 0; j < 4; j++) code[j] = i[j] ? 1 : 2;
          f0 = tt[i];          // x5 = 0
          f1 = tt[i + 16];     // x5 = 1
          case ({f1, f0})
            2'b00: code = off;
            2'b01: code[4] = 2;
            2'b10: code[4] = 1;
            default: code[4] = 0;
          endcase
          c[i] = ctl(x, code);
        end
        #1;
        check(f == tt[v], $sformatf("table %h x=%b", tt, x));
      end
    end
    // 3. random controls, 4. c0
    for (int r = 0; r < 2000; r++) begin
      logic e;
      x = N'($urandom);
      c0 = 1'($urandom);
      for (int i = 0; i < K; i++) c[i] = N'($urandom);
      #1;
      e = c0;
      for (int i = 0; i < K; i++) begin
        logic p;
        p = 1'b1;
        for (int j = 0; j < N; j++) p &= (x[j] != c[i][j]);
        check(y[i] == p, $sformatf("block %0d", i + 1));
        e ^= p;
      end
      check(f == e, "random controls");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
