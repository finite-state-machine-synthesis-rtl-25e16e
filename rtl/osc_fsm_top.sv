// osc_fsm_top: the example FSM made oscillation-testable.
//
// The FSM's state flip-flops are replaced by an MSR register (one MSR cell per
// state bit) whose control and state flip-flops form one scan path. Operation:
//   normal mode (test_mode = 0, scan_en = 0): the circuit is the plain FSM; the
//     state advances once per clock, y is its Mealy output.
//   scan (scan_en = 1): 9 bits are shifted through scan_in/scan_out, least
//     significant first, cell k's {s2,s1,s0} at bits [3k+2:3k]. This loads each
//     cell's test operation and the starting present state.
//   oscillation test (test_mode = 1): with the input x held, each cell holds,
//     inverts or bypasses its next-state bit on every clock. For a state pair
//     chosen by test generation the FSM then alternates between the two states and,
//     since their outputs differ, y toggles on every clock edge. A fault on the
//     ring's path stops the toggling; a delay fault makes it sample wrong values.
// present_state is brought out so that the oscillating state bits can be watched
// as well. The architecture (MSR cells on a scan path, the system clock sampling
// the rings) follows the document; the port names, the reset and the exposed
// present state are this design's choices.
module osc_fsm_top (
  input  logic       clk,
  input  logic       rst_n,          // asynchronous, active low: state a, all cells Hold 0
  input  logic       x,              // primary input
  input  logic       test_mode,      // 1: oscillation-test mode
  input  logic       scan_en,        // shift the MSR scan path
  input  logic       scan_in,
  output logic       scan_out,
  output logic       y,              // primary output
  output logic [2:0] present_state
);

  logic [2:0] next_state;

  fsm_example_logic u_logic (
    .x         (x),
    .state     (present_state),
    .next_state(next_state),
    .y         (y)
  );

  msr_register #(.STATE_BITS(msr_pkg::EX_STATE_BITS)) u_msr (
    .clk      (clk),
    .rst_n    (rst_n),
    .scan_en  (scan_en),
    .scan_in  (scan_in),
    .test_mode(test_mode),
    .d        (next_state),
    .q        (present_state),
    .scan_out (scan_out)
  );

endmodule
