// tpg_fsm: the state machine of the test plan generator.
//
// One test pattern is applied in GL_j + 1 clock cycles: a load cycle with
// Reset high, in which the TPR and TMR take their values from the primary
// inputs, followed by the GL_j rows of the PCTPT of group j = TMR. This FSM
// supplies the row number. While `reset` is high it returns to row 0 and
// becomes active if test mode (t1) is on; each following clock it advances
// one row, and after the last row of the selected group (length taken from
// GL_LEN[tmr]) it goes idle until the next Reset. The number of states is
// the longest table, GL_MAX, as the method states; using the TMR to stop
// at the selected group's own length, and the idle state, are this design's
// choices (the figure only shows the TMR entering the FSM). A TMR value with
// no group, or t1 low, keeps the FSM idle.
//
// Interface: clk; reset (synchronous, the controller Reset); t1 (test
// mode); tmr (group index); row (current row, valid while active); active.
// Timing: row 0 is presented in the cycle after Reset is sampled high.
module tpg_fsm #(
  parameter int unsigned M      = tc_pkg::EX_M,
  parameter int unsigned GL_MAX = tc_pkg::EX_GL_MAX,
  parameter int unsigned TMR_W  = (M > 1) ? $clog2(M) : 1,
  parameter int unsigned ROW_W  = (GL_MAX > 1) ? $clog2(GL_MAX) : 1,
  parameter logic [M-1:0][tc_pkg::EX_GL_W-1:0] GL_LEN = tc_pkg::EX_LEN_A
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             t1,
  input  logic [TMR_W-1:0] tmr,
  output logic [ROW_W-1:0] row,
  output logic             active
);

  logic [tc_pkg::EX_GL_W-1:0] len;
  logic                       run;

  // Length of the group now in the TMR. The TMR loads on the same edge as
  // the FSM restarts, so the length is looked up from the loaded value in
  // the rows that follow, never in the Reset cycle itself.
  always_comb begin
    len = '0;
    for (int unsigned g = 0; g < M; g++)
      if (tmr == TMR_W'(g)) len = GL_LEN[g];
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      row <= '0;
      run <= t1;
    end else if (run) begin
      if (!t1 || (32'(row) + 1 >= 32'(len))) begin
        run <= 1'b0;
      end else begin
        row <= row + 1'b1;
      end
    end
  end

  // A TMR value that names no group (length 0) never activates a table.
  always_comb active = run && (len != '0);

  // The row never passes the end of the selected table.
  a_row_in_table: assert property (@(posedge clk) disable iff (reset)
                                   active |-> (32'(row) < 32'(len)))
    else $error("tpg_fsm: row %0d beyond table length %0d", row, len);

endmodule
