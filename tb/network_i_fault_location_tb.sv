// network_i_fault_location_tb: locates single stuck-at faults in the
// default Network (I) (5 inputs, 16 levels) from its control inputs and the
// output f, and names the faulty gate.
//
// Fault sites, stuck-at-0 and stuck-at-1, one at a time: the AND gate output
// t'_i and the control EOR output h_i of every level, and the output of every
// collector gate. The procedure uses the level modes h = t (c1=1, c2=0),
// h = ~t (c1=1, c2=1) and h = 0 (c1=0, c2=0), plus h = 1 (c1=0, c2=1):
//   1. Every level at h = 0: f must follow x0. If f ignores x0 a collector
//      gate is stuck; it is found by setting single levels to h = 1 from the
//      head of the chain: only levels after the stuck gate change f.
//   2. If f = ~x0, one level's output is 1. With x all ones every term is 1:
//      the level whose c1 = 1 does not change f has t' or h stuck at 1; if
//      setting its c2 = 1 does change f it is t' (AND gate), otherwise h.
//   3. Otherwise each level alone is set to h = t with x all ones, then to
//      h = 1: if the first fails and the second passes, t' is stuck at 0;
//      if both fail, h is stuck at 0.
module network_i_fault_location_tb;
  localparam int N = 5;
  localparam int M = 16;

  logic [N-1:0] x;
  logic         x0;
  logic [M-1:0] c1, c2, tp, h;
  logic         f;
  int checks = 0, failures = 0;

  network_i dut (.x(x), .x0(x0), .c1(c1), .c2(c2), .t_prime(tp), .h(h), .f(f));

  // kind: 0 none, 1 collector gate, 2 AND output t', 3 control EOR output h
  typedef enum int { F_NONE, F_COLL, F_AND, F_EOR } site_e;
  site_e fs;
  int    fi;
  logic  fv;
  event  inj_ev, rel_ev;

  always @(inj_ev) begin
    logic [M-1:0] cur;
    if (fs == F_AND) begin
      cur = dut.t_prime; cur[fi] = fv;
      force dut.t_prime = cur;
    end
  end
  always @(rel_ev) release dut.t_prime;

  // h and collector gates: one net per level / gate
  for (genvar i = 0; i < M; i++) begin : g_inj
    always @(inj_ev) begin
      if (fs == F_EOR && fi == i) force dut.h[i] = fv;
      if (fs == F_COLL && fi == i) force dut.u_coll.g_gate[i].v = fv;
    end
    always @(rel_ev) begin
      release dut.h[i];
      release dut.u_coll.g_gate[i].v;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic observe(output logic fo);
    ->rel_ev;
    #1;
    ->inj_ev;
    #1;
    fo = f;
  endtask

  task automatic locate(output site_e kind, output int idx, output logic val);
    logic f0, f1, fb, fc;
    kind = F_NONE; idx = -1; val = 1'b0;
    x = '1;
    c1 = '0; c2 = '0;
    x0 = 1'b0; observe(f0);
    x0 = 1'b1; observe(f1);
    x0 = 1'b0;
    if (f0 == f1) begin
      // collector gate p is fed by level M-p
      kind = F_COLL; val = f0; idx = M - 1;
      for (int p = 0; p < M; p++) begin
        c1 = '0; c2 = '0; c2[M-1-p] = 1'b1;
        observe(fb);
        if (fb != f0) begin
          idx = p - 1;
          break;
        end
      end
      return;
    end
    if (f0 != x0) begin
      val = 1'b1;
      for (int i = 0; i < M; i++) begin
        c1 = '0; c2 = '0; c1[i] = 1'b1;
        observe(fb);
        if (fb == f0) begin
          c1 = '0; c2[i] = 1'b1;
          observe(fc);
          kind = (fc != f0) ? F_AND : F_EOR;
          idx = i;
          return;
        end
      end
      return;
    end
    for (int i = 0; i < M; i++) begin
      c1 = '0; c2 = '0; c1[i] = 1'b1;
      observe(fb);
      if (fb == f0) begin
        c1 = '0; c2[i] = 1'b1;
        observe(fc);
        kind = (fc != f0) ? F_AND : F_EOR;
        idx = i; val = 1'b0;
        return;
      end
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    site_e kind;
    int    idx, n_faults, n_ok;
    logic  val;
    n_faults = 0; n_ok = 0;
    fs = F_NONE;
    locate(kind, idx, val);
    check(kind == F_NONE, "fault-free network reported faulty");
    for (int s = 1; s <= 3; s++) begin
      for (int i = 0; i < M; i++) begin
        for (int v = 0; v < 2; v++) begin
          bit ok;
          fs = site_e'(s); fi = i; fv = v[0];
          locate(kind, idx, val);
          // a stuck collector gate is named with the value f settles at,
          // which is its stuck value after the gates that follow it
          ok = (kind == fs) && (idx == i) && (fs == F_COLL || val == fv);
          n_faults++;
          if (ok) n_ok++;
          check(ok, $sformatf("%s %0d stuck-at-%0d: found %s %0d value %0d",
                              fs.name(), i, v, kind.name(), idx, val));
        end
      end
    end
    fs = F_NONE;
    ->rel_ev;
    #1;
    $display("located and typed %0d of %0d single stuck-at faults", n_ok, n_faults);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
