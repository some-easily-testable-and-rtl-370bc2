// network_i_tb: checks Network (I) at its default (the 5-variable example,
// 16 levels).
//
// 1. Normal operation (c1 = all ones, c2 = all zeros, x0 = 1): f must equal
//    the example function for all 32 inputs.
// 2. Properties of the control pair, level by level: t' = t & c1,
//    h = t' ^ c2, i.e. h = t (c1=1,c2=0), h = ~t (c1=1,c2=1), h = 0
//    (c1=0,c2=0); t is recomputed here from the printed product terms.
// 3. Random controls: f = x0 ^ (ring sum of all h).
module network_i_tb;
  import tdn_tb_pkg::*;

  logic [4:0]  x;
  logic        x0;
  logic [15:0] c1, c2, tp, h;
  logic        f;
  int checks = 0, failures = 0;

  network_i dut (.x(x), .x0(x0), .c1(c1), .c2(c2), .t_prime(tp), .h(h), .f(f));

  // Product terms t_1..t_16 as lists of variable numbers.
  function automatic logic term(input int i, input logic [4:0] xv);
    int vars [16][5] = '{
      '{1,3,0,0,0}, '{1,2,3,0,0}, '{1,2,4,0,0}, '{3,4,0,0,0},
      '{1,3,4,0,0}, '{2,3,0,0,0}, '{2,3,4,0,0}, '{1,2,3,4,0},
      '{1,5,0,0,0}, '{2,5,0,0,0}, '{1,2,5,0,0}, '{3,5,0,0,0},
      '{3,4,5,0,0}, '{1,3,4,5,0}, '{2,3,4,5,0}, '{1,2,3,4,5}};
    logic p = 1'b1;
    for (int k = 0; k < 5; k++) if (vars[i][k] != 0) p &= xv[vars[i][k]-1];
    return p;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 1. normal operation
    c1 = '1; c2 = '0; x0 = 1'b1;
    for (int v = 0; v < 32; v++) begin
      x = v[4:0];
      #1;
      check(f == f5_rm(x), $sformatf("normal x=%b f=%b", x, f));
    end
    // 2. Properties 3-5 for every level and input
    for (int v = 0; v < 32; v++) begin
      x = v[4:0];
      for (int mode = 0; mode < 3; mode++) begin
        case (mode)
          0: begin c1 = '1; c2 = '0; end
          1: begin c1 = '1; c2 = '1; end
          default: begin c1 = '0; c2 = '0; end
        endcase
        #1;
        for (int i = 0; i < 16; i++) begin
          logic t, exp_h;
          t = term(i, x);
          exp_h = (mode == 0) ? t : (mode == 1) ? !t : 1'b0;
          check(tp[i] == (t & c1[i]), $sformatf("t' level %0d x=%b mode %0d", i + 1, x, mode));
          check(h[i] == exp_h, $sformatf("h level %0d x=%b mode %0d", i + 1, x, mode));
        end
      end
    end
    // 3. random controls
    for (int r = 0; r < 2000; r++) begin
      logic exp_f;
      x = 5'($urandom); x0 = 1'($urandom);
      c1 = 16'($urandom); c2 = 16'($urandom);
      #1;
      exp_f = x0;
      for (int i = 0; i < 16; i++) exp_f ^= (term(i, x) & c1[i]) ^ c2[i];
      check(f == exp_f, $sformatf("random x=%b c1=%h c2=%h", x, c1, c2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
