// msr_pkg: types, constants and the test-generation helper functions shared by the
// oscillation-testable FSM and its testbenches.
//
// An MSR (Modified State Register) cell replaces one state flip-flop of an FSM. In
// oscillation-test mode each cell is put in one of four operations:
//   HOLD0 / HOLD1 : the state bit stays 0 / 1,
//   INV           : the state bit takes the complement of the next-state bit,
//   BYPASS        : the state bit takes the next-state bit unchanged.
// The operation and the starting state are loaded through the scan path as three
// control bits per cell, {s2, s1, s0}, with the meaning of the synchronous control
// table: s1 = 0 selects a hold of the value in s0; s1 = 1 selects INV (s2 = 0) or
// BYPASS (s2 = 1), with s0 then giving the initial state bit.
//
// The functions below implement the per-bit selection of the MSR operation for a
// pair of FSM transitions: a state bit's transition is classified as Low, High,
// Rising or Falling, and the pair of classes selects the operation from a symmetric
// 4x4 operation table, or reports that no operation can make the pair alternate.
// Test generation is done off-chip; these functions let testbenches derive MSR
// settings the same way.
//
// The example FSM's state codes (six states a..f on three bits) are also kept here.
package msr_pkg;

  // Operation of one MSR cell in oscillation-test mode. The encoding follows the
  // two-bit control word of the cell: {op[1], op[0]} = {mode, value/polarity}.
  typedef enum logic [1:0] {
    MSR_HOLD0  = 2'b00,
    MSR_HOLD1  = 2'b01,
    MSR_INV    = 2'b10,
    MSR_BYPASS = 2'b11
  } msr_op_e;

  // Scan-loaded control bits of one synchronous MSR cell.
  typedef struct packed {
    logic s2;   // with s1 = 1: 0 = INV, 1 = BYPASS
    logic s1;   // 0 = hold the value in s0, 1 = sample the (inverted) next-state bit
    logic s0;   // state flip-flop: held value, or initial state bit
  } msr_ctrl_t;

  localparam int unsigned MSR_CTRL_BITS = $bits(msr_ctrl_t);

  // Classification of one state bit's transition, present -> next.
  typedef enum logic [1:0] {
    OPV_L = 2'b00,  // 0 -> 0, Low
    OPV_R = 2'b01,  // 0 -> 1, Rising
    OPV_F = 2'b10,  // 1 -> 0, Falling
    OPV_H = 2'b11   // 1 -> 1, High
  } opval_e;

  // Result of looking up the operation table for one state bit.
  typedef struct packed {
    logic    fail;  // no MSR operation makes this bit alternate
    msr_op_e op;
  } msr_sel_t;

  // ---------------------------------------------------------------------------
  // Example FSM: six states on three bits, one input X, one output Y.
  // ---------------------------------------------------------------------------
  localparam int unsigned EX_STATE_BITS = 3;

  typedef enum logic [EX_STATE_BITS-1:0] {
    ST_A = 3'b000,
    ST_B = 3'b001,
    ST_C = 3'b010,
    ST_D = 3'b011,
    ST_E = 3'b100,
    ST_F = 3'b101
  } ex_state_e;

  // Control word that puts a cell in operation `op`, starting from state bit `init`.
  // For the hold operations the held value is the operation's own; s2 is unused
  // and loaded as 0.
  function automatic msr_ctrl_t msr_ctrl(msr_op_e op, logic init);
    msr_ctrl_t c;
    unique case (op)
      MSR_HOLD0:  c = '{s2: 1'b0, s1: 1'b0, s0: 1'b0};
      MSR_HOLD1:  c = '{s2: 1'b0, s1: 1'b0, s0: 1'b1};
      MSR_INV:    c = '{s2: 1'b0, s1: 1'b1, s0: init};
      default:    c = '{s2: 1'b1, s1: 1'b1, s0: init};
    endcase
    return c;
  endfunction

  // Transition class of one state bit. The enum is encoded as {present, next}.
  function automatic opval_e bit_opval(logic present, logic next);
    return opval_e'({present, next});
  endfunction

  // Operation table: first transition's class against the second's.
  //            L       H       R       F
  //   L     BYPASS   INV    HOLD0   fail
  //   H      INV    BYPASS  fail    HOLD1
  //   R     HOLD0   fail    INV     BYPASS
  //   F     fail    HOLD1   BYPASS  INV
  function automatic msr_sel_t msr_select(opval_e first, opval_e second);
    msr_sel_t s;
    s.fail = 1'b0;
    s.op   = MSR_BYPASS;
    unique case ({first, second})
      {OPV_L, OPV_L}, {OPV_H, OPV_H}, {OPV_R, OPV_F}, {OPV_F, OPV_R}: s.op = MSR_BYPASS;
      {OPV_L, OPV_H}, {OPV_H, OPV_L}, {OPV_R, OPV_R}, {OPV_F, OPV_F}: s.op = MSR_INV;
      {OPV_L, OPV_R}, {OPV_R, OPV_L}:                                 s.op = MSR_HOLD0;
      {OPV_H, OPV_F}, {OPV_F, OPV_H}:                                 s.op = MSR_HOLD1;
      default:                                                        s.fail = 1'b1;
    endcase
    return s;
  endfunction

endpackage
