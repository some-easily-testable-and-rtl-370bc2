// network_ii_fault_sim_tb: runs the n+6 vector test set on the default
// Network (II) (n = 5, the 4-level example) with single stuck-at faults
// injected, and checks that every fault is detected.
//
// A fault is injected by forcing one bit of an internal net to 0 or 1 while
// the test vector is applied (the value forced is the fault-free value of
// that net with the one bit replaced). Fault sites: the complement control
// stem (all y-line controls at once), each y line, each AND gate output,
// the output of each collector EOR gate and the output of each gate of the
// fault-detection cascade. For every fault the 11 vectors are applied; the
// fault is detected when f or w differs from its fault-free value on at
// least one vector. The fault-free responses are computed in this bench.
module network_ii_fault_sim_tb;
  import tdn_tb_pkg::*;

  logic [4:0] x, y;
  logic       z, c0, cw, f, w;
  logic [3:0] g;
  int checks = 0, failures = 0;

  network_ii dut (.x(x), .z(z), .c0(c0), .cw(cw), .y(y), .g(g), .f(f), .w(w));

  typedef enum int { S_Z, S_Y, S_G, S_COLL, S_W } site_e;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Apply test vector t (0..10) of the n+6 set; don't-cares are random.
  task automatic apply(input int t);
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
  endtask

  // Force bit b of the chosen net to value v. Bus nets (z stem, y, g) are
// forced as a whole with the other bits at their fault-free values; a gate
// of a cascade is forced on its own output net.
  task automatic inject(input site_e s, input int b, input logic v);
    logic [4:0] cur;
    case (s)
      S_Z: begin
        cur = {5{v}};
        force dut.u_in.zl = cur;
      end
      S_Y: begin
        cur = dut.y; cur[b] = v;
        force dut.y = cur;
      end
      S_G: begin
        cur = {1'b0, dut.g}; cur[b] = v;
        force dut.g = cur[3:0];
      end
      S_COLL: case (b)
        0: force dut.u_coll.g_gate[0].v = v;
        1: force dut.u_coll.g_gate[1].v = v;
        2: force dut.u_coll.g_gate[2].v = v;
        default: force dut.u_coll.g_gate[3].v = v;
      endcase
      default: case (b)
        0: force dut.u_in.u_fd.g_gate[0].v = v;
        1: force dut.u_in.u_fd.g_gate[1].v = v;
        2: force dut.u_in.u_fd.g_gate[2].v = v;
        3: force dut.u_in.u_fd.g_gate[3].v = v;
        default: force dut.u_in.u_fd.g_gate[4].v = v;
      endcase
    endcase
  endtask

  task automatic remove(input site_e s);
    case (s)
      S_Z:    release dut.u_in.zl;
      S_Y:    release dut.y;
      S_G:    release dut.g;
      S_COLL: begin
        release dut.u_coll.g_gate[0].v;
        release dut.u_coll.g_gate[1].v;
        release dut.u_coll.g_gate[2].v;
        release dut.u_coll.g_gate[3].v;
      end
      default: begin
        release dut.u_in.u_fd.g_gate[0].v;
        release dut.u_in.u_fd.g_gate[1].v;
        release dut.u_in.u_fd.g_gate[2].v;
        release dut.u_in.u_fd.g_gate[3].v;
        release dut.u_in.u_fd.g_gate[4].v;
      end
    endcase
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int faults, detected;
    faults = 0;
    detected = 0;
    // fault-free run of the test set
    for (int t = 0; t < 11; t++) begin
      apply(t);
      #1;
      check(f == (c0 ^ (z ? f5_rm(x) : f5_true_lits(x))), $sformatf("fault-free f, vector %0d", t + 1));
      check(w == (cw ^ parity({27'b0, x ^ {5{z}}}, 5)), $sformatf("fault-free w, vector %0d", t + 1));
    end
    // single stuck-at faults
    for (int si = 0; si < 5; si++) begin
      site_e s;
      int nb;
      s = site_e'(si);
      nb = (s == S_Z) ? 1 : (s == S_G || s == S_COLL) ? 4 : 5;
      for (int b = 0; b < nb; b++) begin
        for (int v = 0; v < 2; v++) begin
          bit hit;
          hit = 1'b0;
          for (int t = 0; t < 11; t++) begin
            logic ef, ew;
            apply(t);
            #1;
            ef = c0 ^ (z ? f5_rm(x) : f5_true_lits(x));
            ew = cw ^ parity({27'b0, x ^ {5{z}}}, 5);
            inject(s, b, v[0]);
            #1;
            if (f != ef || w != ew) hit = 1'b1;
            remove(s);
            #1;
          end
          faults++;
          if (hit) detected++;
          check(hit, $sformatf("fault not detected: site %s bit %0d stuck-at-%0d", s.name(), b, v));
        end
      end
    end
    $display("test set of %0d vectors detected %0d of %0d single stuck-at faults", 11, detected, faults);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
