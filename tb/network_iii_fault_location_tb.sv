// network_iii_fault_location_tb: locates single stuck-at faults in the
// default Network (III) (n = 5, 16 blocks) using only its control
// terminals, c0 and the output f.
//
// Fault sites injected one at a time (stuck-at-0 and stuck-at-1): every
// block output, every literal net inside every block (output of the control
// EOR gate) and every collector gate output. The location procedure:
//   1. All blocks switched off (controls = inputs, so every literal of the
//      block is 0). f must follow c0; if f ignores c0 a collector gate is
//      stuck. The gate is found by switching single blocks on, starting at
//      the head of the chain: only blocks after the stuck gate still change
//      f. If instead f = ~c0, a block output is stuck at 1; it is the block
//      whose switching on does not change f.
//   2. Each block alone switched on as the constant term 1 (controls =
//      complemented inputs): f must change. A block that does not has its
//      output or one of its literals stuck at 0.
//   3. In each block, each literal alone set to 0 with all other literals
//      1: f must not change. If it does, that literal is stuck at 1.
// The procedure reports collector or block, the index, and for literal
// stuck-at-1 faults the variable; the bench checks the index against the
// injected fault. Inputs x are random for every fault.
module network_iii_fault_location_tb;
  localparam int N = 5;
  localparam int K = 16;

  logic [N-1:0]        x;
  logic [K-1:0][N-1:0] c;
  logic                c0;
  logic [K-1:0]        y;
  logic                f;
  int checks = 0, failures = 0;

  network_iii dut (.x(x), .c(c), .c0(c0), .y(y), .f(f));

  typedef enum int { F_NONE, F_BLOCK_Y, F_LIT, F_COLL } site_e;
  site_e      fs;
  int         fi, fj;
  logic       fv;
  event       inj_ev, rel_ev;

  // Fault injection, one generate branch per block / collector gate so that
  // every forced path is a constant hierarchical name.
  for (genvar i = 0; i < K; i++) begin : g_inj
    always @(inj_ev) begin
      logic [N-1:0] cur;
      if (fs == F_BLOCK_Y && fi == i) force dut.g_blk[i].u_blk.y = fv;
      if (fs == F_LIT && fi == i) begin
        cur = dut.g_blk[i].u_blk.lit;
        cur[fj] = fv;
        force dut.g_blk[i].u_blk.lit = cur;
      end
      if (fs == F_COLL && fi == i) force dut.u_coll.g_gate[i].v = fv;
    end
    always @(rel_ev) begin
      release dut.g_blk[i].u_blk.y;
      release dut.g_blk[i].u_blk.lit;
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

  // Apply the current x, c, c0 and return f with the fault present.
  task automatic observe(output logic fo);
    ->rel_ev;
    #1;
    ->inj_ev;
    #1;
    fo = f;
  endtask

  // Block controls: 0 all off, 1 constant-1 term, 2 literal j alone at 0.
  function automatic logic [N-1:0] blk(input int mode, input int j);
    logic [N-1:0] r;
    r = (mode == 0) ? x : ~x;
    if (mode == 2) r[j] = x[j];
    return r;
  endfunction

  task automatic all_off();
    for (int i = 0; i < K; i++) c[i] = blk(0, 0);
  endtask

  // Runs the procedure; kind 0 none found, 1 collector gate, 2 block.
  task automatic locate(output int kind, output int idx, output int var_j);
    logic f0, f1, fb;
    kind = 0; idx = -1; var_j = -1;
    all_off();
    c0 = 1'b0; observe(f0);
    c0 = 1'b1; observe(f1);
    c0 = 1'b0;
    if (f0 == f1) begin
      // collector: gate p is fed by block K-p; blocks after the stuck gate
      // still change f
      kind = 1;
      idx = K - 1;
      for (int p = 0; p < K; p++) begin
        all_off();
        c[K-1-p] = blk(1, 0);
        observe(fb);
        if (fb != f0) begin
          idx = p - 1;
          break;
        end
      end
      return;
    end
    // blocks: switching each on alone must change f
    for (int i = 0; i < K; i++) begin
      all_off();
      c[i] = blk(1, 0);
      observe(fb);
      if (fb == f0) begin
        kind = 2; idx = i;
        return;
      end
    end
    // literals stuck at 1
    for (int i = 0; i < K; i++) begin
      for (int j = 0; j < N; j++) begin
        all_off();
        c[i] = blk(2, j);
        observe(fb);
        if (fb != f0) begin
          kind = 2; idx = i; var_j = j;
          return;
        end
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
    int kind, idx, var_j;
    int n_faults, n_located, n_coll, n_blk, n_lit;
    n_faults = 0; n_located = 0; n_coll = 0; n_blk = 0; n_lit = 0;
    // fault-free network: nothing found
    fs = F_NONE;
    x = N'($urandom);
    locate(kind, idx, var_j);
    check(kind == 0, "fault-free network reported faulty");
    for (int s = 1; s <= 3; s++) begin
      for (int i = 0; i < K; i++) begin
        for (int j = 0; j < ((s == 2) ? N : 1); j++) begin
          for (int v = 0; v < 2; v++) begin
            bit ok;
            fs = site_e'(s); fi = i; fj = j; fv = v[0];
            x = N'($urandom);
            locate(kind, idx, var_j);
            case (fs)
              F_COLL: begin
                ok = (kind == 1 && idx == i);
                n_coll++;
              end
              F_BLOCK_Y: begin
                ok = (kind == 2 && idx == i);
                n_blk++;
              end
              default: begin
                ok = (kind == 2 && idx == i && (v == 0 || var_j == j));
                n_lit++;
              end
            endcase
            n_faults++;
            if (ok) n_located++;
            check(ok, $sformatf("%s %0d.%0d stuck-at-%0d: found kind %0d index %0d var %0d",
                                fs.name(), i, j, v, kind, idx, var_j));
          end
        end
      end
    end
    fs = F_NONE;
    ->rel_ev;
    #1;
    $display("located %0d of %0d single stuck-at faults (%0d block outputs, %0d literals, %0d collector gates)",
             n_located, n_faults, n_blk, n_lit, n_coll);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
