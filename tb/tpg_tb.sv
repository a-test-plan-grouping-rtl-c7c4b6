// tpg_tb: the test plan generator at the default example tables, fed with
// TMR and TPR values directly. For random groups and TPR values, after a
// Reset cycle the control outputs must follow the rows of the selected
// group's table (written out below as text: 0, 1, X, a/b = TPR bit 0/1),
// active must be high for exactly that table's length, and reload must
// stay low (the example tables use no reload). The number of control
// signals each group drives (GNC_j) must be 3 and 4.
module tpg_tb;
  localparam string EXP = {"a01X", "01XX", "XXbX", "XX0X",
                           "001a", "XXXX", "XbX0", "XXXX"};
  localparam int GL[2] = '{4, 3};

  logic       clk = 1'b0;
  logic       reset, t1;
  logic       tmr;
  logic [1:0] tpr;
  logic [7:0] pi;
  logic [3:0] ctrl;
  logic       reload, active;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  tpg dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    reset = 0; t1 = 1; tmr = 0; tpr = 0; pi = 0;
    // control signals driven per group: {T1,T3} drives c1..c3, {T2,T4} all four
    chk($countones(dut.DRIVE[0]) == 3, "GNC of group 0 is 3");
    chk($countones(dut.DRIVE[1]) == 4, "GNC of group 1 is 4");
    for (int it = 0; it < 40; it++) begin
      int g;
      g = $urandom % 2;
      @(negedge clk);
      reset = 1; tmr = g[0]; tpr = 2'($urandom);
      @(negedge clk);
      reset = 0;
      for (int r = 0; r < GL[g]; r++) begin
        pi = 8'($urandom);
        #1;
        chk(active, $sformatf("active group %0d row %0d", g, r));
        chk(!reload, "no reload");
        for (int k = 0; k < 4; k++) begin
          byte c;
          c = EXP.getc((g * 4 + r) * 4 + k);
          if (c != "X")
            chk(ctrl[k] == ((c == "1") ? 1'b1 : (c == "0") ? 1'b0 : tpr[c - "a"]),
                $sformatf("group %0d row %0d c%0d", g, r, k + 1));
        end
        @(negedge clk);
      end
      #1;
      chk(!active && ctrl == 0, $sformatf("idle after group %0d", g));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
