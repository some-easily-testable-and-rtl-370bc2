// net2_input_stage_tb: checks the complement EOR gates and the
// fault-detection cascade of the Network (II) input stage.
//
// Two instances: the default odd bus (N = 5, one control z) and an even bus
// (N = 4, controls z1/z2 with z1 on lines 1..3). Every input, control and cw
// combination is applied; y must be the input or its complement line by
// line, and w the parity of cw and the y lines. It also checks the reason
// for the split: changing any one control alone must flip w.
module net2_input_stage_tb;
  logic [4:0] xo, yo;
  logic       zo, cwo, wo;
  logic [3:0] xe, ye;
  logic [1:0] ze;
  logic       cwe, we;
  int checks = 0, failures = 0;

  net2_input_stage dut_o (.x(xo), .z(zo), .cw(cwo), .y(yo), .w(wo));
  net2_input_stage #(.N(4)) dut_e (.x(xe), .z(ze), .cw(cwe), .y(ye), .w(we));

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
    logic w_prev;
    // odd bus
    for (int v = 0; v < 128; v++) begin
      logic par;
      {cwo, zo, xo} = v[6:0];
      #1;
      par = cwo;
      for (int j = 0; j < 5; j++) begin
        check(yo[j] == (zo ? !xo[j] : xo[j]), $sformatf("odd y[%0d] x=%b z=%b", j, xo, zo));
        par ^= zo ? !xo[j] : xo[j];
      end
      check(wo == par, $sformatf("odd w x=%b z=%b cw=%b", xo, zo, cwo));
      // flipping z alone must flip w (5 lines change)
      w_prev = wo;
      zo = !zo;
      #1;
      check(wo != w_prev, "odd: z change not seen at w");
    end
    // even bus
    for (int v = 0; v < 128; v++) begin
      logic par;
      {cwe, ze, xe} = v[6:0];
      #1;
      par = cwe;
      for (int j = 0; j < 4; j++) begin
        logic zj;
        zj = (j < 3) ? ze[0] : ze[1];
        check(ye[j] == (xe[j] ^ zj), $sformatf("even y[%0d] x=%b z=%b", j, xe, ze));
        par ^= xe[j] ^ zj;
      end
      check(we == par, $sformatf("even w x=%b z=%b cw=%b", xe, ze, cwe));
      for (int k = 0; k < 2; k++) begin
        w_prev = we;
        ze[k] = !ze[k];
        #1;
        check(we != w_prev, $sformatf("even: z%0d change not seen at w", k + 1));
        ze[k] = !ze[k];
        #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
