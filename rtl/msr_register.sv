// msr_register: state register of an oscillation-testable FSM, one MSR cell per
// state bit, with all cells on a single scan path.
//
// Bit k of d/q is served by cell k. The scan path runs
//   scan_in -> cell[STATE_BITS-1] -> ... -> cell[0] -> scan_out,
// each cell shifting through its s2, s1, s0 flip-flops. Seen as one vector of
// 3*STATE_BITS bits, with cell k's {s2, s1, s0} at bits [3k+2 : 3k], the scan
// image is shifted in least significant bit first and appears at scan_out in the
// same order. Loading the image sets each cell's test-mode operation and the
// initial present state in one pass; shifting out reads the state back. The same
// path serves ordinary scan tests: shift a state in, give one normal-mode clock,
// shift the captured next state out.
//
// In normal mode (test_mode = 0) the register is a plain STATE_BITS-bit state
// register; in oscillation-test mode each cell applies its own operation.
// Replacing the FSM's flip-flops by MSR cells fed through a scan path follows the
// document; the chain order is this design's choice. The default width is the
// three state bits of the document's example FSM.
module msr_register #(
  parameter int unsigned STATE_BITS = msr_pkg::EX_STATE_BITS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  scan_en,
  input  logic                  scan_in,
  input  logic                  test_mode,
  input  logic [STATE_BITS-1:0] d,         // next state from the combinational logic
  output logic [STATE_BITS-1:0] q,         // present state
  output logic                  scan_out
);

  // chain[k] feeds cell k's scan input; chain[STATE_BITS] is the register's scan_in.
  logic [STATE_BITS:0] chain;

  assign chain[STATE_BITS] = scan_in;

  for (genvar k = 0; k < STATE_BITS; k++) begin : g_cell
    msr_cell u_cell (
      .clk      (clk),
      .rst_n    (rst_n),
      .scan_en  (scan_en),
      .scan_in  (chain[k+1]),
      .test_mode(test_mode),
      .d        (d[k]),
      .q        (q[k]),
      .scan_out (chain[k])
    );
  end

  assign scan_out = chain[0];

endmodule
