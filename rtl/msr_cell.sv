// msr_cell: Modified State Register cell for synchronous oscillation test.
//
// The cell replaces one state flip-flop of an FSM. It holds three flip-flops,
// {s2, s1, s0}, chained as a scan segment scan_in -> s2 -> s1 -> s0 -> scan_out.
// s0 is the state flip-flop: its output q is the present-state bit seen by the
// FSM's combinational logic.
//
// Operation, by priority:
//   scan_en = 1              : shift, s2 <= scan_in, s1 <= s2, s0 <= s1.
//   test_mode = 0 (normal)   : s0 <= d, an ordinary state flip-flop; s1, s2 keep.
//   test_mode = 1, s1 = 0    : s0 keeps its value (Hold 0 / Hold 1).
//   test_mode = 1, s1 = 1    : s0 <= d when s2 = 1 (Bypass), s0 <= ~d when s2 = 0 (INV).
// Every change happens on the rising clock edge, so oscillation rings through the
// combinational logic are cut by the system clock and run at clock speed: a ring
// with an odd number of inversions toggles the state bit every cycle.
//
// The four test-mode operations and their control table ({s1,s0} = 00 Hold 0,
// 01 Hold 1; {s2,s1} = 01 INV, 11 Bypass), and the use of the s0 flip-flop as the
// normal-mode state register, follow the document. The scan order, the priority of
// scan over test mode, and the asynchronous active-low reset that clears all three
// flip-flops are this design's choices.
module msr_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic scan_en,    // shift the control/state flip-flops
  input  logic scan_in,
  input  logic test_mode,  // 1: oscillation-test mode, 0: normal mode
  input  logic d,          // next-state bit from the combinational logic
  output logic q,          // present-state bit
  output logic scan_out
);

  msr_pkg::msr_ctrl_t ctrl;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl <= '0;
    end else if (scan_en) begin
      ctrl <= {scan_in, ctrl.s2, ctrl.s1};
    end else if (!test_mode) begin
      ctrl.s0 <= d;
    end else if (ctrl.s1) begin
      ctrl.s0 <= ctrl.s2 ? d : ~d;
    end
  end

  assign q        = ctrl.s0;
  assign scan_out = ctrl.s0;

endmodule
