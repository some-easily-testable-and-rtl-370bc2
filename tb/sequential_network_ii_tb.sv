// sequential_network_ii_tb: checks the sequential circuit on Network (II)
// with its default example (2-bit counter, enable x1, flag for state 0).
//
// A reference counter kept in the test bench is compared with the state
// after every clock edge. Each cycle also checks, from the current state:
// the next-state outputs g, the output f and the parity w, for random
// values of the collector heads c0/cs, the complement control z and cw
// (z = 0 turns ~q1~q2 into q1q2). Only cycles with z = 1 and c0 = cs = 0
// are counted as normal counting cycles; the state is reloaded from g
// whatever the controls, which the reference follows.
module sequential_network_ii_tb;
  import tdn_tb_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n;
  logic [0:0] x;
  logic       z, c0, cw;
  logic [1:0] cs, q, g;
  logic       f, w;
  int checks = 0, failures = 0;
  int wraps = 0;

  sequential_network_ii dut (
    .clk(clk), .rst_n(rst_n), .x(x), .z(z), .c0(c0), .cs(cs), .cw(cw),
    .q(q), .g(g), .f(f), .w(w)
  );

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] st, nx;
    x = '0; z = 1'b1; c0 = 1'b0; cs = '0; cw = 1'b0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    check(q == 2'b00, "reset");
    rst_n = 1'b1;
    st = 2'b00;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      logic q1, q2, en;
      @(negedge clk);
      x = 1'($urandom);
      if (cyc % 4 == 3) begin
        z = 1'($urandom); c0 = 1'($urandom); cs = 2'($urandom); cw = 1'($urandom);
      end else begin
        z = 1'b1; c0 = 1'b0; cs = '0; cw = 1'($urandom);
      end
      #1;
      {q2, q1} = st;
      en = x[0];
      // counter: bit 0 toggles on enable, bit 1 toggles when bit 0 and enable
      nx[0] = cs[0] ^ (q1 != en);
      nx[1] = cs[1] ^ (q2 != (q1 && en));
      check(q == st, $sformatf("state cycle %0d", cyc));
      check(g == nx, $sformatf("next state cycle %0d", cyc));
      check(f == (c0 ^ (z ? (!q1 && !q2) : (q1 && q2))), $sformatf("f cycle %0d", cyc));
      check(w == (cw ^ parity({29'b0, {q2, q1, en} ^ {3{z}}}, 3)), $sformatf("w cycle %0d", cyc));
      if (z && !c0 && cs == 2'b00 && en && st == 2'b11) wraps++;
      @(posedge clk);
      st = nx;
    end
    check(wraps > 0, "counter wrapped at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
