// network_iii_block_tb: exhaustive check of block B_n^i (n = 5).
//
// For every input and control word the output must be the AND of the
// literals chosen by the controls (0: x_j, 1: ~x_j). It also checks the two
// input-driven control settings: control = ~x_j drops x_j from the term and
// control = x_j forces the output to 0.
module network_iii_block_tb;
  logic [4:0] x, c;
  logic       y;
  int checks = 0, failures = 0;

  network_iii_block dut (.x(x), .c(c), .y(y));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 1024; v++) begin
      logic e;
      {c, x} = v[9:0];
      #1;
      e = 1'b1;
      for (int j = 0; j < 5; j++) e &= c[j] ? !x[j] : x[j];
      check(y == e, $sformatf("x=%b c=%b y=%b", x, c, y));
    end
    // a term without x2 and x4: output x1 & ~x3 & x5 whatever x2, x4
    for (int v = 0; v < 32; v++) begin
      x = v[4:0];
      c = {1'b0, !x[3], 1'b1, !x[1], 1'b0};
      #1;
      check(y == (x[0] & !x[2] & x[4]), $sformatf("dropped literals x=%b", x));
      c = x;
      #1;
      check(y == 1'b0, $sformatf("disabled block x=%b", x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
