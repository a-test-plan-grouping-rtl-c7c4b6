// tpg_fsm_tb: checks the TPG state machine with lengths 4 and 3 (the
// default example) and an out-of-range group index.
// After Reset with t1 high the FSM must present rows 0..GL-1 on successive
// cycles, with active high, then go idle; Reset with t1 low, or with a TMR
// value that names no group, must leave it idle; t1 dropping stops it.
module tpg_fsm_tb;
  logic       clk = 1'b0;
  logic       reset, t1;
  logic [1:0] tmr;
  logic [1:0] row;
  logic       active;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  // Three "groups" allowed by a 2-bit TMR, only 0..2 exist; lengths 4, 3, 1.
  tpg_fsm #(.M(3), .GL_MAX(4), .TMR_W(2), .GL_LEN({8'd1, 8'd3, 8'd4})) dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(int g, int len_exp);
    @(negedge clk); reset = 1; t1 = 1; tmr = 2'(g);
    @(negedge clk); reset = 0;
    for (int r = 0; r < len_exp; r++) begin
      #1;
      chk(active && row == 2'(r), $sformatf("group %0d row %0d: active %0b row %0d", g, r, active, row));
      @(negedge clk);
    end
    #1;
    chk(!active, $sformatf("group %0d idle after %0d rows", g, len_exp));
    @(negedge clk); #1;
    chk(!active, "stays idle");
  endtask

  initial begin
    reset = 0; t1 = 0; tmr = 0;
    run(0, 4);
    run(1, 3);
    run(2, 1);
    // group index 3 does not exist
    @(negedge clk); reset = 1; t1 = 1; tmr = 2'd3;
    @(negedge clk); reset = 0; #1;
    chk(!active, "no table for TMR 3");
    // normal mode
    @(negedge clk); reset = 1; t1 = 0; tmr = 0;
    @(negedge clk); reset = 0; #1;
    chk(!active, "Reset in normal mode keeps idle");
    // t1 dropped in row 1
    @(negedge clk); reset = 1; t1 = 1; tmr = 0;
    @(negedge clk); reset = 0;
    @(negedge clk); #1;
    chk(active && row == 2'd1, "row 1 before abort");
    t1 = 0;
    @(negedge clk); #1;
    chk(!active, "abort on t1 low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
