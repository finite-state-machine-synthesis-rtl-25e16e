// msr_register_tb: self-checking testbench of the MSR register (four state bits).
//
// Loads random scan images, checks that they come out of scan_out in the same
// order after a full shift, runs normal mode against a plain register and test
// mode against a per-cell reference of the four operations, with random
// next-state values.
module msr_register_tb;

  localparam int unsigned N   = 4;
  localparam int unsigned LEN = N * msr_pkg::MSR_CTRL_BITS;

  logic clk = 1'b0;
  logic rst_n;
  logic scan_en, scan_in, test_mode;
  logic [N-1:0] d, q;
  logic scan_out;

  int checks = 0;
  int failures = 0;

  msr_register #(.STATE_BITS(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  // shift `img` in (bit 0 first) while collecting what leaves scan_out
  task automatic shift(input logic [LEN-1:0] img, output logic [LEN-1:0] out);
    scan_en = 1'b1; test_mode = 1'b0;
    for (int i = 0; i < LEN; i++) begin
      scan_in = img[i];
      #1 out[i] = scan_out;
      @(posedge clk);
      #1;
    end
    scan_en = 1'b0;
  endtask

  logic [LEN-1:0] img, prev, out;
  logic [N-1:0]   exp_q;

  initial begin
    rst_n = 1'b0; scan_en = 0; scan_in = 0; test_mode = 0; d = '0;
    repeat (2) @(posedge clk);
    #1 check("reset q", q, 0);
    rst_n = 1'b1;

    prev = '0;
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < LEN; i++) img[i] = 1'($urandom);
      shift(img, out);
      check("scan out = previous image", out, prev);
      // present state = s0 bits of the image
      for (int k = 0; k < N; k++) exp_q[k] = img[3*k];
      check("state after load", q, exp_q);

      // test mode for a few cycles
      test_mode = 1'b1;
      for (int c = 0; c < 8; c++) begin
        d = N'($urandom);
        @(posedge clk);
        for (int k = 0; k < N; k++) begin
          case ({img[3*k+2], img[3*k+1]})
            2'b01:   exp_q[k] = ~d[k];
            2'b11:   exp_q[k] = d[k];
            default: exp_q[k] = exp_q[k];
          endcase
        end
        #1 check("test mode state", q, exp_q);
      end
      // the control bits are untouched by test mode; the s0 bits are the state
      for (int k = 0; k < N; k++) img[3*k] = exp_q[k];
      test_mode = 1'b0;

      // normal mode for a few cycles
      for (int c = 0; c < 4; c++) begin
        d = N'($urandom);
        @(posedge clk);
        #1 check("normal mode state", q, d);
        for (int k = 0; k < N; k++) img[3*k] = d[k];
      end
      prev = img;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
