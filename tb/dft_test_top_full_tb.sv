// dft_test_top_full_tb: the test controller top at its default parameters
// (the four-module example grouped as {T1,T3} / {T2,T4}) through one
// complete test session.
//
// Modules 1..4 need 8, 3, 7 and 2 test patterns, so group 0 (table of 4
// rows) is run 8 times and group 1 (3 rows) 3 times; each pattern costs one
// Reset cycle more than its table, 8*(4+1) + 3*(3+1) = 52 cycles in all.
// The expected control values are written out below as text, one character
// per control signal c1..c4: '0', '1', 'X' (not checked), 'a'/'b' (TPR bit
// 0/1 loaded from pi[1:0] in the Reset cycle).
module dft_test_top_full_tb;

  localparam string EXP = {"a01X", "01XX", "XXbX", "XX0X",    // group 0
                           "001a", "XXXX", "XbX0", "XXXX"};   // group 1
  localparam int GL[2]    = '{4, 3};
  localparam int MAXTP[2] = '{8, 3};
  localparam int EXP_L    = 52;

  logic       clk = 1'b0;
  logic       reset, t1;
  logic [7:0] pi;
  logic [3:0] ctrl_func, ctrl_dp;
  logic       test_active;
  int         checks = 0, failures = 0, cyc = 0, start = -1;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  dft_test_top dut (
    .clk(clk), .reset(reset), .t1(t1), .pi(pi), .ctrl_func(ctrl_func),
    .ctrl_dp(ctrl_dp), .test_active(test_active)
  );

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cyc);
    end
  endtask

  task automatic apply_pattern(int g);
    logic [1:0] tpr_m;
    @(negedge clk);
    reset = 1'b1; t1 = 1'b1;
    pi = 8'($urandom); pi[2] = g[0];
    if (start < 0) start = cyc;
    #1;
    chk(test_active == 1'b0, "controller idle in load cycle");
    tpr_m = pi[1:0];
    for (int r = 0; r < GL[g]; r++) begin
      @(negedge clk);
      reset = 1'b0; pi = 8'($urandom); ctrl_func = 4'($urandom);
      #1;
      chk(test_active == 1'b1, "row active");
      for (int k = 0; k < 4; k++) begin
        byte c = EXP.getc((g * 4 + r) * 4 + k);
        bit  e;
        if (c == "X") continue;
        e = (c == "1") ? 1'b1 : (c == "0") ? 1'b0 : tpr_m[c - "a"];
        chk(ctrl_dp[k] == e, $sformatf("group %0d row %0d c%0d", g, r, k + 1));
      end
    end
  endtask

  initial begin
    reset = 1'b0; t1 = 1'b0; pi = '0; ctrl_func = '0;
    repeat (2) begin
      @(negedge clk);
      ctrl_func = 4'($urandom);
      #1;
      chk(ctrl_dp == ctrl_func, "normal mode");
    end
    for (int g = 0; g < 2; g++)
      for (int p = 0; p < MAXTP[g]; p++) apply_pattern(g);
    @(negedge clk);
    chk(cyc - start == EXP_L, $sformatf("test length %0d, expected %0d", cyc - start, EXP_L));
    $display("test session: %0d cycles", cyc - start);
    #1;
    chk(test_active == 1'b0, "idle after session");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
