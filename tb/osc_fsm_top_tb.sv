// osc_fsm_top_tb: end-to-end test of the oscillation-testable example FSM.
//
// The testbench plays the tester. It
//  1. runs the FSM in normal mode with random inputs against a reference model of
//     the transition/output table;
//  2. generates oscillation tests: for every pair of states whose outputs differ
//     under the same input value it classifies each state bit's transition, looks
//     up the MSR operation per bit and, when no bit fails, scans the settings in,
//     holds x, switches to test mode and checks that the output toggles on every
//     clock (one output period per two clocks) while the state alternates between
//     the two states; the scan path is then read back;
//  3. checks the operation table against the hardware: for every candidate pair it
//     tries all 64 combinations of cell operations and checks that some
//     combination makes the pair alternate exactly when the table finds no failing
//     bit, and that the table's own choice is one of them;
//  4. returns to normal mode and checks that the FSM carries on correctly;
//  5. uses the same path for conventional scan tests: shift a state in, capture
//     one normal-mode clock, shift the captured next state out.
// It counts how often each mechanism happened (scan load, scan read-back, scan test, each of
// the four cell operations, rejected pairs, the pair that oscillates with every
// cell in Bypass, and the two worked examples) and fails on one that never did.
module osc_fsm_top_tb;

  import msr_pkg::*;

  localparam int unsigned N   = EX_STATE_BITS;
  localparam int unsigned LEN = N * MSR_CTRL_BITS;
  localparam int unsigned OSC_CYCLES = 16;

  logic clk = 1'b0;
  logic rst_n, x, test_mode, scan_en, scan_in;
  logic scan_out, y;
  logic [2:0] present_state;

  int checks = 0;
  int failures = 0;

  // mechanism counters
  int n_scan_load = 0, n_scan_read = 0, n_rejected = 0, n_valid = 0;
  int n_op[4];
  int n_scan_test = 0;
  int n_all_bypass = 0, n_fig_ae = 0, n_fig_be = 0, n_normal = 0;
  int n_cand[2];

  osc_fsm_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference table: {next x=0, next x=1, y x=0, y x=1}, states a..f
  logic [7:0] ref_rows [6] = '{
    {3'd0, 3'd2, 1'b1, 1'b0},
    {3'd3, 3'd1, 1'b1, 1'b0},
    {3'd5, 3'd3, 1'b1, 1'b1},
    {3'd2, 3'd0, 1'b0, 1'b1},
    {3'd4, 3'd5, 1'b0, 1'b0},
    {3'd1, 3'd4, 1'b1, 1'b1}
  };

  function automatic logic [2:0] ref_next(int s, logic xi);
    return xi ? ref_rows[s][4:2] : ref_rows[s][7:5];
  endfunction

  function automatic logic ref_y(int s, logic xi);
    return xi ? ref_rows[s][0] : ref_rows[s][1];
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  // shift a scan image in, bit 0 first; returns what left the scan path
  task automatic scan(input logic [LEN-1:0] img, output logic [LEN-1:0] out);
    scan_en = 1'b1; test_mode = 1'b0;
    for (int i = 0; i < LEN; i++) begin
      scan_in = img[i];
      #1 out[i] = scan_out;
      @(posedge clk);
      #1;
    end
    scan_en = 1'b0;
  endtask

  // image that gives cell k operation ops[k], starting from present state p
  function automatic logic [LEN-1:0] image(msr_op_e ops [N], logic [2:0] p);
    logic [LEN-1:0] img;
    for (int k = 0; k < N; k++) img[3*k +: 3] = msr_ctrl(ops[k], p[k]);
    return img;
  endfunction

  // run test mode from state pi with input xi; true when the state alternates
  // pi, pj, pi, ... and y toggles on every clock for OSC_CYCLES clocks
  task automatic run_osc(input int pi, input int pj, input logic xi, output bit ok);
    logic [LEN-1:0] dummy;
    logic y_prev;
    ok = 1'b1;
    x = xi;
    test_mode = 1'b1;
    #1;
    if (present_state != 3'(pi)) ok = 1'b0;
    y_prev = y;
    for (int c = 1; c <= OSC_CYCLES; c++) begin
      @(posedge clk);
      #1;
      if (present_state != 3'((c % 2 == 1) ? pj : pi)) ok = 1'b0;
      if (y == y_prev) ok = 1'b0;
      y_prev = y;
    end
    test_mode = 1'b0;
    dummy = '0;
  endtask

  logic [LEN-1:0] img, out;
  msr_op_e   ops [N];
  msr_op_e   try_ops [N];
  msr_sel_t  sel;
  bit        fail_any, ok;
  int        s_cur;

  initial begin
    rst_n = 1'b0; x = 0; test_mode = 0; scan_en = 0; scan_in = 0;
    repeat (2) @(posedge clk);
    #1 check("reset state", present_state, ST_A);
    rst_n = 1'b1;

    // ---- 1. normal mode --------------------------------------------------------
    s_cur = 0;
    for (int c = 0; c < 300; c++) begin
      x = 1'($urandom);
      #1 check("normal y", y, ref_y(s_cur, x));
      @(posedge clk);
      s_cur = int'(ref_next(s_cur, x));
      #1 check("normal state", present_state, s_cur);
      n_normal++;
    end

    // ---- 2./3. oscillation test generation and application --------------------
    for (int xi = 0; xi < 2; xi++) begin
      for (int pi = 0; pi < 6; pi++) begin
        for (int pj = pi + 1; pj < 6; pj++) begin
          int  works;
          bit  chosen_ok;
          logic [2:0] ni, nj;
          if (ref_y(pi, 1'(xi)) == ref_y(pj, 1'(xi))) continue;
          n_cand[xi]++;
          ni = ref_next(pi, 1'(xi));
          nj = ref_next(pj, 1'(xi));
          fail_any = 1'b0;
          for (int k = 0; k < N; k++) begin
            sel = msr_select(bit_opval(pi[k], ni[k]), bit_opval(pj[k], nj[k]));
            ops[k] = sel.op;
            fail_any |= sel.fail;
          end

          // the document's worked examples
          if (xi == 0 && pi == ST_A && pj == ST_E) begin
            check("(a,e) bit2", ops[2], MSR_INV);
            check("(a,e) bit1", ops[1], MSR_BYPASS);
            check("(a,e) bit0", ops[0], MSR_BYPASS);
            n_fig_ae++;
          end
          if (xi == 0 && pi == ST_B && pj == ST_E) begin
            check("(b,e) bit2", ops[2], MSR_INV);
            check("(b,e) bit1", ops[1], MSR_HOLD0);
            check("(b,e) bit0", ops[0], MSR_INV);
            n_fig_be++;
          end
          if (xi == 1 && pi == ST_E && pj == ST_F) begin
            check("(e,f) no fail", fail_any, 1'b0);
            for (int k = 0; k < N; k++) check("(e,f) bypass", ops[k], MSR_BYPASS);
            n_all_bypass++;
          end

          chosen_ok = 1'b0;
          if (!fail_any) begin
            n_valid++;
            for (int k = 0; k < N; k++) n_op[ops[k]]++;
            img = image(ops, 3'(pi));
            scan(img, out);
            n_scan_load++;
            run_osc(pi, pj, 1'(xi), chosen_ok);
            check($sformatf("oscillation x=%0d pair (%0d,%0d)", xi, pi, pj), chosen_ok, 1'b1);
            // read back: controls unchanged, s0 bits = state after OSC_CYCLES (pi)
            scan('0, out);
            check("scan read-back", out, image(ops, 3'(pi)));
            n_scan_read++;
          end else begin
            n_rejected++;
          end

          // exhaustive: does any setting of the cells make this pair alternate?
          works = 0;
          for (int combo = 0; combo < 64; combo++) begin
            for (int k = 0; k < N; k++) try_ops[k] = msr_op_e'(combo[2*k +: 2]);
            img = image(try_ops, 3'(pi));
            scan(img, out);
            run_osc(pi, pj, 1'(xi), ok);
            if (ok) works++;
          end
          check($sformatf("table agrees with hardware x=%0d pair (%0d,%0d)", xi, pi, pj),
                works > 0, !fail_any);
        end
      end
    end

    // ---- 4. back to normal mode ------------------------------------------------
    rst_n = 1'b0;
    #1 rst_n = 1'b1;
    s_cur = 0;
    for (int c = 0; c < 50; c++) begin
      x = 1'($urandom);
      #1 check("normal y after test", y, ref_y(s_cur, x));
      @(posedge clk);
      s_cur = int'(ref_next(s_cur, x));
      #1 check("normal state after test", present_state, s_cur);
      n_normal++;
    end

    // ---- 5. scan test through the same path ------------------------------------
    // load a state with every cell in Hold 0/1 control, capture one normal clock,
    // shift out and compare the captured next state
    for (int st = 0; st < 6; st++) begin
      for (int xi = 0; xi < 2; xi++) begin
        logic [LEN-1:0] exp_img;
        img = '0;
        for (int k = 0; k < N; k++) img[3*k] = st[k];
        scan(img, out);
        check("scan test state loaded", present_state == 3'(st), 1);
        x = 1'(xi);
        #1 check("scan test y", y, ref_y(st, 1'(xi)));
        @(posedge clk);
        #1;
        exp_img = '0;
        for (int k = 0; k < N; k++) exp_img[3*k] = ref_next(st, 1'(xi))[k];
        scan('0, out);
        check("scan test capture", out, exp_img);
        n_scan_test++;
      end
    end

    // candidate pairs: 8 under x=0 and 9 under x=1
    check("candidates x=0", n_cand[0], 8);
    check("candidates x=1", n_cand[1], 9);

    $display("candidate pairs x=0:%0d x=1:%0d  valid tests:%0d rejected:%0d",
             n_cand[0], n_cand[1], n_valid, n_rejected);
    $display("ops used: hold0=%0d hold1=%0d inv=%0d bypass=%0d",
             n_op[MSR_HOLD0], n_op[MSR_HOLD1], n_op[MSR_INV], n_op[MSR_BYPASS]);
    $display("scan loads=%0d read-backs=%0d normal cycles=%0d", n_scan_load, n_scan_read, n_normal);
    check("mechanism scan load",   n_scan_load > 0, 1);
    check("mechanism scan read",   n_scan_read > 0, 1);
    check("mechanism normal mode", n_normal > 0, 1);
    check("mechanism rejected",    n_rejected > 0, 1);
    check("mechanism hold0",       n_op[MSR_HOLD0] > 0, 1);
    check("mechanism hold1",       n_op[MSR_HOLD1] > 0, 1);
    check("mechanism inv",         n_op[MSR_INV] > 0, 1);
    check("mechanism bypass",      n_op[MSR_BYPASS] > 0, 1);
    check("mechanism scan test",   n_scan_test > 0, 1);
    check("mechanism all bypass",  n_all_bypass, 1);
    check("example (a,e)",         n_fig_ae, 1);
    check("example (b,e)",         n_fig_be, 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
