// fsm_example_logic: next-state and output logic of the six-state example FSM.
//
// Purely combinational. One input x, one output y (Mealy: y depends on the present
// state and x), states a..f encoded on three bits as a=000, b=001, c=010, d=011,
// e=100, f=101. The transition and output table is the document's:
//
//   present | next x=0 | next x=1 | y x=0 | y x=1
//   a 000   |  a       |  c       |   1   |   0
//   b 001   |  d       |  b       |   1   |   0
//   c 010   |  f       |  d       |   1   |   1
//   d 011   |  c       |  a       |   0   |   1
//   e 100   |  e       |  f       |   0   |   0
//   f 101   |  b       |  e       |   1   |   1
//
// With x = 1 the pair (e, f) alternates on its own and y toggles each cycle.
// The unused codes 110 and 111 are not in the document; here they go to state a
// with y = 0.
module fsm_example_logic (
  input  logic       x,
  input  logic [2:0] state,
  output logic [2:0] next_state,
  output logic       y
);

  import msr_pkg::*;

  always_comb begin
    next_state = ST_A;
    y          = 1'b0;
    unique case (state)
      ST_A: begin next_state = x ? ST_C : ST_A; y = ~x;   end
      ST_B: begin next_state = x ? ST_B : ST_D; y = ~x;   end
      ST_C: begin next_state = x ? ST_D : ST_F; y = 1'b1; end
      ST_D: begin next_state = x ? ST_A : ST_C; y = x;    end
      ST_E: begin next_state = x ? ST_F : ST_E; y = 1'b0; end
      ST_F: begin next_state = x ? ST_E : ST_B; y = 1'b1; end
      default: begin next_state = ST_A; y = 1'b0; end
    endcase
  end

endmodule
