// fsm_example_logic_tb: exhaustive check of the example FSM's next-state and
// output logic against its transition and output table, entered here as plain
// data: for each present state a..f, next state for x=0, x=1, output for x=0, x=1.
module fsm_example_logic_tb;

  logic x;
  logic [2:0] state, next_state;
  logic y;

  int checks = 0;
  int failures = 0;

  fsm_example_logic dut (.*);

  // {next x=0, next x=1, y x=0, y x=1}
  logic [7:0] table_rows [8] = '{
    {3'd0, 3'd2, 1'b1, 1'b0},   // a
    {3'd3, 3'd1, 1'b1, 1'b0},   // b
    {3'd5, 3'd3, 1'b1, 1'b1},   // c
    {3'd2, 3'd0, 1'b0, 1'b1},   // d
    {3'd4, 3'd5, 1'b0, 1'b0},   // e
    {3'd1, 3'd4, 1'b1, 1'b1},   // f
    {3'd0, 3'd0, 1'b0, 1'b0},   // unused 110
    {3'd0, 3'd0, 1'b0, 1'b0}    // unused 111
  };

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 8; s++) begin
      for (int xi = 0; xi < 2; xi++) begin
        logic [2:0] exp_next;
        logic       exp_y;
        state = 3'(s); x = 1'(xi);
        #1;
        exp_next = xi ? table_rows[s][4:2] : table_rows[s][7:5];
        exp_y    = xi ? table_rows[s][0]   : table_rows[s][1];
        checks++;
        if (next_state !== exp_next) begin
          failures++;
          $display("FAIL state %0d x=%0d: next %0d expected %0d", s, xi, next_state, exp_next);
        end
        checks++;
        if (y !== exp_y) begin
          failures++;
          $display("FAIL state %0d x=%0d: y %0b expected %0b", s, xi, y, exp_y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
