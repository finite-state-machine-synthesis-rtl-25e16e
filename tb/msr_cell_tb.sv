// msr_cell_tb: self-checking testbench of one MSR cell.
//
// Drives random scan, mode and next-state inputs and compares the cell's state
// output each cycle with a reference built from the control table: scanned bits
// {c2, c1, c0}; in test mode c1c0 = 00 holds 0, 01 holds 1, c2c1 = 01 samples the
// inverted next-state bit, 11 samples it unchanged. Also checks directed loads of
// each operation and that each was exercised.
module msr_cell_tb;

  logic clk = 1'b0;
  logic rst_n;
  logic scan_en, scan_in, test_mode, d;
  logic q, scan_out;

  int checks = 0;
  int failures = 0;
  int op_seen[4];

  // reference flip-flops
  logic r2, r1, r0;

  msr_cell dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  // one clock with the given inputs, reference updated alongside
  task automatic step(logic se, logic si, logic tm, logic dd);
    scan_en = se; scan_in = si; test_mode = tm; d = dd;
    @(posedge clk);
    if (se) begin
      r0 = r1; r1 = r2; r2 = si;
    end else if (!tm) begin
      r0 = dd;
    end else begin
      case ({r2, r1, r0})
        3'b000, 3'b100: begin r0 = 1'b0; op_seen[0]++; end  // Hold 0
        3'b001, 3'b101: begin r0 = 1'b1; op_seen[1]++; end  // Hold 1
        3'b010, 3'b011: begin r0 = ~dd;  op_seen[2]++; end  // INV
        default:        begin r0 = dd;   op_seen[3]++; end  // Bypass
      endcase
    end
    #1;
    check("q", q, r0);
    check("scan_out", scan_out, r0);
  endtask

  // shift a three-bit control word in, s0 first
  task automatic load(logic [2:0] c);
    for (int i = 0; i < 3; i++) step(1'b1, c[i], 1'b0, 1'b0);
  endtask

  initial begin
    rst_n = 1'b0; scan_en = 0; scan_in = 0; test_mode = 0; d = 0;
    r2 = 0; r1 = 0; r0 = 0;
    repeat (2) @(posedge clk);
    #1 check("reset q", q, 1'b0);
    rst_n = 1'b1;

    // directed: each operation for several cycles with toggling and steady d
    for (int op = 0; op < 8; op++) begin
      load(3'(op));
      for (int n = 0; n < 6; n++) step(1'b0, 1'b0, 1'b1, 1'(n % 2));
      for (int n = 0; n < 3; n++) step(1'b0, 1'b0, 1'b1, 1'b1);
    end

    // INV with d fed back from q forms a one-cell ring: q must toggle every cycle
    load(3'b010);
    for (int n = 0; n < 10; n++) begin
      logic q_before;
      q_before = q;
      step(1'b0, 1'b0, 1'b1, q);
      check("ring toggles", q, ~q_before);
    end

    // normal mode: plain D flip-flop
    for (int n = 0; n < 50; n++) step(1'b0, 1'b0, 1'b0, 1'($urandom));

    // random mix
    for (int n = 0; n < 5000; n++)
      step(1'($urandom % 4 == 0), 1'($urandom), 1'($urandom % 3 != 0), 1'($urandom));

    foreach (op_seen[i]) check($sformatf("operation %0d exercised", i), op_seen[i] > 0, 1'b1);
    $display("operations seen: hold0=%0d hold1=%0d inv=%0d bypass=%0d",
             op_seen[0], op_seen[1], op_seen[2], op_seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
