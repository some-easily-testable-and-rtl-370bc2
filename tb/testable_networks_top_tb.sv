// testable_networks_top_tb: end-to-end run of all realizations at their
// default sizes.
//
// Phase 1: the same 5-variable function is realized three ways - Network (I)
//   in 16 levels, Network (II) in 4 levels and Network (III) programmed
//   through its control terminals - and all three must agree with the
//   reference for every input.
// Phase 2: the test and diagnosis mechanisms are exercised and counted:
//   Network (I) level modes h = t, h = ~t, h = 0 and isolation of one level
//   (all others forced to 0, so f shows that level alone); Network (II)
//   operation (z = 1), true-input test mode (z = 0), the n+6 vector test
//   set and the parity output w; the even-n Network (II) with each of z1, z2
//   flipping w; Network (III) programmed with random functions and with
//   blocks switched off; the sequential circuit reset, counting, wrapping
//   and a next state inverted through a collector head input.
// Every mechanism must occur at least once; one that never does counts as
// a failure.
module testable_networks_top_tb;
  import tdn_tb_pkg::*;

  logic [4:0]       n1_x;
  logic             n1_x0;
  logic [15:0]      n1_c1, n1_c2, n1_t_prime, n1_h;
  logic             n1_f;
  logic [4:0]       n2_x, n2_y;
  logic             n2_z, n2_c0, n2_cw, n2_f, n2_w;
  logic [3:0]       n2_g;
  logic [3:0]       n2e_x, n2e_y;
  logic [1:0]       n2e_z;
  logic             n2e_c0, n2e_cw, n2e_f, n2e_w;
  logic [2:0]       n2e_g;
  logic [4:0]       n3_x;
  logic [15:0][4:0] n3_c;
  logic             n3_c0;
  logic [15:0]      n3_y;
  logic             n3_f;
  logic             sq_clk = 1'b0;
  logic             sq_rst_n;
  logic [0:0]       sq_x;
  logic             sq_z, sq_c0, sq_cw;
  logic [1:0]       sq_cs, sq_q, sq_g;
  logic             sq_f, sq_w;

  testable_networks_top dut (.*);

  always #5 sq_clk = !sq_clk;

  int checks = 0, failures = 0;

  typedef enum int {
    M_AGREE, M_N1_PASS, M_N1_INVERT, M_N1_ZERO, M_N1_ISOLATE,
    M_N2_OPERATE, M_N2_TESTMODE, M_N2_TESTSET, M_N2_W_FLIP,
    M_N2E_Z1_FLIP, M_N2E_Z2_FLIP, M_N3_PROGRAM, M_N3_BLOCK_OFF,
    M_SQ_RESET, M_SQ_COUNT, M_SQ_WRAP, M_SQ_CS_INVERT, M_COUNT
  } mech_e;
  int seen [M_COUNT];
  string mech_name [M_COUNT] = '{
    "three networks agree", "N1 h=t", "N1 h=~t", "N1 h=0", "N1 level isolated",
    "N2 operation z=1", "N2 test mode z=0", "N2 test vector", "N2 w flips with z",
    "N2 even: z1 flips w", "N2 even: z2 flips w", "N3 programmed function",
    "N3 block switched off", "SEQ reset", "SEQ count", "SEQ wrap", "SEQ next state inverted"};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Network (III) control word for one block: code per variable
  // 0 absent, 1 true, 2 complemented, 3 block off.
  function automatic logic [4:0] n3_ctl(input logic [4:0] xv, input int code [5]);
    logic [4:0] r;
    for (int j = 0; j < 5; j++)
      case (code[j])
        0: r[j] = !xv[j];
        1: r[j] = 1'b0;
        2: r[j] = 1'b1;
        default: r[j] = xv[j];
      endcase
    return r;
  endfunction

  // Products of the 16-level form, level i = term i+1.
  function automatic logic n1_term(input int i, input logic [4:0] xv);
    int vars [16][5] = '{
      '{1,3,0,0,0}, '{1,2,3,0,0}, '{1,2,4,0,0}, '{3,4,0,0,0},
      '{1,3,4,0,0}, '{2,3,0,0,0}, '{2,3,4,0,0}, '{1,2,3,4,0},
      '{1,5,0,0,0}, '{2,5,0,0,0}, '{1,2,5,0,0}, '{3,5,0,0,0},
      '{3,4,5,0,0}, '{1,3,4,5,0}, '{2,3,4,5,0}, '{1,2,3,4,5}};
    logic p = 1'b1;
    for (int k = 0; k < 5; k++) if (vars[i][k] != 0) p &= xv[vars[i][k]-1];
    return p;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ex [4][5] = '{'{0,0,2,0,2}, '{1,1,0,1,0}, '{2,2,2,0,1}, '{2,2,1,2,2}};
    int off [5] = '{3, 3, 3, 3, 3};
    logic [1:0] st;
    logic       wp;

    foreach (seen[k]) seen[k] = 0;
    // quiet defaults
    n2e_x = '0; n2e_z = 2'b11; n2e_c0 = 1'b0; n2e_cw = 1'b0;
    sq_x = '0; sq_z = 1'b1; sq_c0 = 1'b0; sq_cs = '0; sq_cw = 1'b0;
    sq_rst_n = 1'b0;

    // ---- phase 1: one function, three realizations
    n1_x0 = 1'b1; n1_c1 = '1; n1_c2 = '0;
    n2_z = 1'b1; n2_c0 = 1'b0; n2_cw = 1'b0;
    n3_c0 = 1'b0;
    for (int v = 0; v < 32; v++) begin
      n1_x = v[4:0]; n2_x = v[4:0]; n3_x = v[4:0];
      for (int i = 0; i < 16; i++) n3_c[i] = n3_ctl(n3_x, (i < 4) ? ex[i] : off);
      #1;
      check(n1_f == f5_rm(n1_x), $sformatf("N1 f x=%b", n1_x));
      check(n2_f == f5_rm(n2_x), $sformatf("N2 f x=%b", n2_x));
      check(n3_f == f5_rm(n3_x), $sformatf("N3 f x=%b", n3_x));
      if (n1_f == n2_f && n2_f == n3_f) seen[M_AGREE]++;
      seen[M_N2_OPERATE]++;
      seen[M_N3_PROGRAM]++;
      seen[M_N3_BLOCK_OFF]++;
    end

    // ---- phase 2a: Network (I) level modes and isolation
    for (int v = 0; v < 32; v++) begin
      n1_x = v[4:0];
      for (int i = 0; i < 16; i++) begin
        for (int mode = 0; mode < 3; mode++) begin
          // level i in the given mode, every other level forced to 0
          n1_c1 = '0; n1_c2 = '0;
          n1_c1[i] = (mode != 2);
          n1_c2[i] = (mode == 1);
          n1_x0 = 1'($urandom);
          #1;
          case (mode)
            0: begin check(n1_h[i] == n1_term(i, n1_x), "N1 h=t"); seen[M_N1_PASS]++; end
            1: begin check(n1_h[i] == !n1_term(i, n1_x), "N1 h=~t"); seen[M_N1_INVERT]++; end
            default: begin check(n1_h[i] == 1'b0, "N1 h=0"); seen[M_N1_ZERO]++; end
          endcase
          check(n1_f == (n1_x0 ^ n1_h[i]), $sformatf("N1 level %0d isolated x=%b", i + 1, n1_x));
          seen[M_N1_ISOLATE]++;
        end
      end
    end

    // ---- phase 2b: Network (II), test mode and test set
    for (int v = 0; v < 32; v++) begin
      n2_x = v[4:0]; n2_z = 1'b0; n2_c0 = 1'($urandom); n2_cw = 1'($urandom);
      #1;
      check(n2_f == (n2_c0 ^ f5_true_lits(n2_x)), "N2 test mode f");
      seen[M_N2_TESTMODE]++;
      wp = n2_w;
      n2_z = 1'b1;
      #1;
      check(n2_w != wp, "N2 w flips with z");
      seen[M_N2_W_FLIP]++;
    end
    for (int t = 0; t < 11; t++) begin
      case (t)
        0: begin n2_c0 = 0; n2_x = '1; n2_z = 0; n2_cw = 1; end
        1: begin n2_c0 = 1; n2_x = '1; n2_z = 0; n2_cw = 0; end
        2: begin n2_c0 = 0; n2_x = '0; n2_z = 0; n2_cw = 1; end
        3: begin n2_c0 = 1; n2_x = '0; n2_z = 0; n2_cw = 0; end
        4: begin n2_x = '1; n2_z = 1; end
        5: begin n2_x = '0; n2_z = 1; end
        default: begin n2_x = '1; n2_x[t-6] = 1'b0; n2_z = 0; end
      endcase
      #1;
      check(n2_f == (n2_c0 ^ (n2_z ? f5_rm(n2_x) : f5_true_lits(n2_x))), $sformatf("N2 test vector %0d f", t + 1));
      check(n2_w == (n2_cw ^ parity({27'b0, n2_x ^ {5{n2_z}}}, 5)), $sformatf("N2 test vector %0d w", t + 1));
      seen[M_N2_TESTSET]++;
    end

    // ---- phase 2c: even Network (II)
    for (int v = 0; v < 16; v++) begin
      logic [3:0] yl;
      n2e_x = v[3:0]; n2e_z = 2'b11; n2e_c0 = 1'b0; n2e_cw = 1'b0;
      #1;
      yl = ~n2e_x;
      check(n2e_f == ((yl[0] & n2e_x[1]) ^ (n2e_x[2] & yl[3]) ^ (&n2e_x)), "N2 even f");
      wp = n2e_w;
      n2e_z = 2'b10;
      #1;
      check(n2e_w != wp, "N2 even: z1 flips w");
      seen[M_N2E_Z1_FLIP]++;
      wp = n2e_w;
      n2e_z = 2'b00;
      #1;
      check(n2e_w != wp, "N2 even: z2 flips w");
      seen[M_N2E_Z2_FLIP]++;
    end

    // ---- phase 2d: Network (III) with random functions
    for (int r = 0; r < 50; r++) begin
      logic [31:0] tt;
      tt = $urandom;
      for (int v = 0; v < 32; v++) begin
        n3_x = v[4:0];
        for (int i = 0; i < 16; i++) begin
          int code [5];
          for (int j = 0; j < 4; j++) code[j] = i[j] ? 1 : 2;
          case ({tt[i + 16], tt[i]})
            2'b00: begin code = off; seen[M_N3_BLOCK_OFF]++; end
            2'b01: code[4] = 2;
            2'b10: code[4] = 1;
            default: code[4] = 0;
          endcase
          n3_c[i] = n3_ctl(n3_x, code);
        end
        #1;
        check(n3_f == tt[v], $sformatf("N3 table %h x=%b", tt, n3_x));
        seen[M_N3_PROGRAM]++;
      end
    end

    // ---- phase 2e: sequential circuit
    @(posedge sq_clk);
    #1;
    check(sq_q == 2'b00, "SEQ reset");
    seen[M_SQ_RESET]++;
    sq_rst_n = 1'b1;
    st = 2'b00;
    for (int cyc = 0; cyc < 200; cyc++) begin
      logic [1:0] nx;
      @(negedge sq_clk);
      sq_x = 1'($urandom);
      sq_cs = (cyc % 10 == 9) ? 2'($urandom) : 2'b00;
      #1;
      check(sq_q == st, $sformatf("SEQ state cycle %0d", cyc));
      check(sq_f == (st == 2'b00), "SEQ zero flag");
      nx = sq_x[0] ? st + 2'd1 : st;
      nx ^= sq_cs;
      check(sq_g == nx, "SEQ next state");
      if (sq_cs != 2'b00) seen[M_SQ_CS_INVERT]++;
      else if (sq_x[0]) begin
        seen[M_SQ_COUNT]++;
        if (st == 2'b11) seen[M_SQ_WRAP]++;
      end
      @(posedge sq_clk);
      st = nx;
    end

    for (int k = 0; k < M_COUNT; k++) begin
      $display("mechanism %-26s seen %0d times", mech_name[k], seen[k]);
      check(seen[k] > 0, $sformatf("mechanism never occurred: %s", mech_name[k]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
