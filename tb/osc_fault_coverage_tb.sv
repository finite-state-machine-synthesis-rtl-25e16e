// osc_fault_coverage_tb: fault coverage of the oscillation tests on the example FSM.
//
// The FSM logic and the MSR register are wired here as in the top level, with a
// fault injector on every net between them: the input x, the three present-state
// bits, the three next-state bits and the output y. Each net can be stuck at 0 or
// 1, or be slow to rise / slow to fall. A slow net is modelled for at-speed
// sampling: on a clock where it should make its slow transition, what is sampled
// is still the previous cycle's value. (The first test clock after the scan load
// is treated as a slow launch clock, so no transition fault acts on it.)
//
// Test generation is the usual one: every state pair whose outputs differ under a
// common input value, with the per-bit MSR operations taken from the operation
// table, kept when no bit fails. Every test is applied to every fault. A test
// detects a fault when y does not toggle on every clock of the test window. The
// y trace of the hardware is compared, clock by clock, with a behavioural model of
// the same faulty circuit, and the testbench reports the fraction of faults that
// the oscillation tests detect. It checks that the fault-free circuit passes every
// test and that every fault on the output itself is caught.
module osc_fault_coverage_tb;

  import msr_pkg::*;

  localparam int unsigned N   = EX_STATE_BITS;
  localparam int unsigned LEN = N * MSR_CTRL_BITS;
  localparam int unsigned OSC_CYCLES = 12;
  localparam int unsigned SITES = 8;   // 0: x, 1..3: present state, 4..6: next state, 7: y

  typedef enum logic [2:0] {F_NONE, F_SA0, F_SA1, F_STR, F_STF} ftype_e;

  logic clk = 1'b0;
  logic rst_n, scan_en, scan_in, test_mode, scan_out;
  logic x;

  int checks = 0;
  int failures = 0;

  // fault under test
  int     fsite;
  ftype_e ftype;
  logic   tr_arm;            // transition faults act from the second test clock on

  // raw (driven) and effective (seen downstream) values of the fault sites
  logic [SITES-1:0] raw, eff, prev;

  logic [2:0] ps_q, ns_raw;
  logic       y_raw;

  always #5 clk = ~clk;

  function automatic logic inject(int site, logic r, logic p, int fs, ftype_e ft, logic arm);
    if (site != fs) return r;
    unique case (ft)
      F_SA0:   return 1'b0;
      F_SA1:   return 1'b1;
      F_STR:   return (arm && !p && r) ? 1'b0 : r;
      F_STF:   return (arm && p && !r) ? 1'b1 : r;
      default: return r;
    endcase
  endfunction

  assign raw[0]   = x;
  assign raw[3:1] = ps_q;
  assign raw[6:4] = ns_raw;
  assign raw[7]   = y_raw;

  always_comb
    for (int s = 0; s < SITES; s++) eff[s] = inject(s, raw[s], prev[s], fsite, ftype, tr_arm);

  always_ff @(posedge clk) begin
    prev   <= raw;
    tr_arm <= test_mode;
  end

  fsm_example_logic u_logic (
    .x         (eff[0]),
    .state     (eff[3:1]),
    .next_state(ns_raw),
    .y         (y_raw)
  );

  msr_register #(.STATE_BITS(N)) u_msr (
    .clk      (clk),
    .rst_n    (rst_n),
    .scan_en  (scan_en),
    .scan_in  (scan_in),
    .test_mode(test_mode),
    .d        (eff[6:4]),
    .q        (ps_q),
    .scan_out (scan_out)
  );

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference table: {next x=0, next x=1, y x=0, y x=1}; codes 110/111 -> a, y=0
  logic [7:0] ref_rows [8] = '{
    {3'd0, 3'd2, 1'b1, 1'b0},
    {3'd3, 3'd1, 1'b1, 1'b0},
    {3'd5, 3'd3, 1'b1, 1'b1},
    {3'd2, 3'd0, 1'b0, 1'b1},
    {3'd4, 3'd5, 1'b0, 1'b0},
    {3'd1, 3'd4, 1'b1, 1'b1},
    {3'd0, 3'd0, 1'b0, 1'b0},
    {3'd0, 3'd0, 1'b0, 1'b0}
  };

  // one generated test
  typedef struct {
    logic       x;
    logic [2:0] pi;
    msr_op_e    ops [N];
  } test_t;

  test_t tests [$];

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  // behavioural model of the faulty circuit under test t: y trace over the window
  function automatic logic [OSC_CYCLES-1:0] model_trace(test_t t, int fs, ftype_e ft);
    logic [2:0] st;
    logic [SITES-1:0] r, e, p;
    logic [OSC_CYCLES-1:0] tr;
    logic [2:0] nsr;
    logic yr;
    st = t.pi;
    p  = '0;
    for (int c = 0; c < OSC_CYCLES; c++) begin
      logic arm;
      arm = (c > 0);
      r[0]   = t.x;
      r[3:1] = st;
      e[0]   = inject(0, r[0], p[0], fs, ft, arm);
      for (int s = 1; s <= 3; s++) e[s] = inject(s, r[s], p[s], fs, ft, arm);
      nsr = e[0] ? ref_rows[e[3:1]][4:2] : ref_rows[e[3:1]][7:5];
      yr  = e[0] ? ref_rows[e[3:1]][0]   : ref_rows[e[3:1]][1];
      r[6:4] = nsr;
      r[7]   = yr;
      for (int s = 4; s < SITES; s++) e[s] = inject(s, r[s], p[s], fs, ft, arm);
      tr[c] = e[7];
      for (int k = 0; k < N; k++) begin
        unique case (t.ops[k])
          MSR_HOLD0:  st[k] = 1'b0;
          MSR_HOLD1:  st[k] = 1'b1;
          MSR_INV:    st[k] = ~e[4+k];
          MSR_BYPASS: st[k] = e[4+k];
        endcase
      end
      p = r;
    end
    return tr;
  endfunction

  function automatic bit toggles(logic [OSC_CYCLES-1:0] tr);
    for (int c = 1; c < OSC_CYCLES; c++) if (tr[c] == tr[c-1]) return 1'b0;
    return 1'b1;
  endfunction

  // load test t and run it; returns the y trace seen by the tester
  task automatic apply(test_t t, output logic [OSC_CYCLES-1:0] tr);
    logic [LEN-1:0] img;
    for (int k = 0; k < N; k++) img[3*k +: 3] = msr_ctrl(t.ops[k], t.pi[k]);
    x = t.x;
    scan_en = 1'b1; test_mode = 1'b0;
    for (int i = 0; i < LEN; i++) begin
      scan_in = img[i];
      @(posedge clk);
      #1;
    end
    scan_en = 1'b0;
    test_mode = 1'b1;
    for (int c = 0; c < OSC_CYCLES; c++) begin
      #1 tr[c] = eff[7];
      @(posedge clk);
      #1;
    end
    test_mode = 1'b0;
  endtask

  initial begin
    int n_faults, n_detected, n_sa, n_sa_det, n_tr, n_tr_det;
    logic [OSC_CYCLES-1:0] hw, md;
    rst_n = 1'b0; scan_en = 0; scan_in = 0; test_mode = 0; x = 0;
    fsite = -1; ftype = F_NONE;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // ---- test generation ------------------------------------------------------
    for (int xi = 0; xi < 2; xi++)
      for (int pi = 0; pi < 6; pi++)
        for (int pj = pi + 1; pj < 6; pj++) begin
          test_t t;
          bit fail_any;
          logic [2:0] ni, nj;
          logic yi, yj;
          yi = xi ? ref_rows[pi][0] : ref_rows[pi][1];
          yj = xi ? ref_rows[pj][0] : ref_rows[pj][1];
          if (yi == yj) continue;
          ni = xi ? ref_rows[pi][4:2] : ref_rows[pi][7:5];
          nj = xi ? ref_rows[pj][4:2] : ref_rows[pj][7:5];
          fail_any = 1'b0;
          for (int k = 0; k < N; k++) begin
            msr_sel_t sel;
            sel = msr_select(bit_opval(pi[k], ni[k]), bit_opval(pj[k], nj[k]));
            t.ops[k] = sel.op;
            fail_any |= sel.fail;
          end
          t.x  = 1'(xi);
          t.pi = 3'(pi);
          if (!fail_any) tests.push_back(t);
        end
    $display("oscillation tests generated: %0d", tests.size());
    check("tests generated", tests.size() > 0, 1'b1);

    // ---- fault-free circuit ---------------------------------------------------
    foreach (tests[i]) begin
      apply(tests[i], hw);
      check($sformatf("fault-free test %0d oscillates", i), toggles(hw), 1'b1);
    end

    // ---- every fault against every test ---------------------------------------
    n_faults = 0; n_detected = 0; n_sa = 0; n_sa_det = 0; n_tr = 0; n_tr_det = 0;
    for (int s = 0; s < SITES; s++) begin
      for (int f = int'(F_SA0); f <= int'(F_STF); f++) begin
        bit det;
        fsite = s; ftype = ftype_e'(f);
        det = 1'b0;
        foreach (tests[i]) begin
          apply(tests[i], hw);
          md = model_trace(tests[i], s, ftype_e'(f));
          checks++;
          if (hw !== md) begin
            failures++;
            $display("FAIL site %0d fault %0d test %0d: y trace %b, model %b", s, f, i, hw, md);
          end
          if (!toggles(hw)) det = 1'b1;
        end
        n_faults++;
        if (det) n_detected++;
        if (f <= int'(F_SA1)) begin n_sa++; if (det) n_sa_det++; end
        else                  begin n_tr++; if (det) n_tr_det++; end
        if (s == 7 && f <= int'(F_SA1)) check("stuck output detected", det, 1'b1);
        $display("site %0d %s: %s", s, ftype_e'(f) == F_SA0 ? "stuck-at-0" :
                 ftype_e'(f) == F_SA1 ? "stuck-at-1" :
                 ftype_e'(f) == F_STR ? "slow-to-rise" : "slow-to-fall",
                 det ? "detected" : "not detected");
      end
    end
    fsite = -1; ftype = F_NONE;

    $display("stuck-at faults detected: %0d of %0d", n_sa_det, n_sa);
    $display("transition faults detected: %0d of %0d", n_tr_det, n_tr);
    $display("all faults detected: %0d of %0d", n_detected, n_faults);
    check("some stuck-at faults detected", n_sa_det > 0, 1'b1);
    check("some transition faults detected", n_tr_det > 0, 1'b1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
