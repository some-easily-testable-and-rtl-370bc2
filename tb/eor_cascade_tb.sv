// eor_cascade_tb: exhaustive check of the EOR cascade.
//
// Applies every combination of the head input and the W inputs (W = 6 here)
// and compares the output with the parity counted bit by bit in the test
// bench. Purely combinational; a watchdog ends the run if it hangs.
module eor_cascade_tb;
  localparam int W = 6;

  logic         c;
  logic [W-1:0] in;
  logic         out;
  int checks = 0, failures = 0;

  eor_cascade #(.W(W)) dut (.c(c), .in(in), .out(out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2 ** (W + 1); v++) begin
      int ones;
      {c, in} = v[W:0];
      #1;
      ones = 0;
      for (int k = 0; k < W; k++) if (in[k]) ones++;
      if (c) ones++;
      checks++;
      if (out !== ones[0]) begin
        failures++;
        $display("FAIL c=%b in=%b out=%b", c, in, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
