// tc_scenario: drives one dft_test_top configuration through a complete
// test session and checks it against an expected table given as text.
//
// EXP holds, group after group and row after row, one character per control
// signal c1..cU: '0', '1', 'X' (not checked), 'a'..'h' (TPR bit 0..7) or
// 'P' (the most significant primary-input bit in that cycle). RLD holds one
// '0'/'1' per row: the TPR reloads from the primary inputs at the end of a
// '1' row. The expected length of a group is the index of its last non-'X'
// row + 1 unless EXP_LEN says more. For each group j the session applies
// MAXTP[j] patterns, each a Reset cycle plus the group's rows, and the whole
// session must take EXP_L cycles. It also runs normal mode, a test aborted
// by dropping t1, and the idle state after a table.
module tc_scenario #(
  parameter int unsigned M      = 2,
  parameter int unsigned U      = 4,
  parameter int unsigned GL_MAX = 4,
  parameter int unsigned TPR_W  = 2,
  parameter int unsigned PI_W   = 8,
  parameter tc_pkg::cell_t [M-1:0][GL_MAX-1:0][U-1:0] PCTPT = tc_pkg::EX_TABLE_A,
  parameter logic [M-1:0][tc_pkg::EX_GL_W-1:0]        GL_LEN = tc_pkg::EX_LEN_A,
  parameter logic [M-1:0][GL_MAX-1:0]                 RELOAD = '0,
  parameter string EXP   = "",
  parameter string RLD   = "",
  parameter logic [M-1:0][7:0] EXP_LEN = '0,
  parameter logic [M-1:0][7:0] MAXTP   = '0,
  parameter int unsigned EXP_L = 0
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_patterns,
  output int   n_group_switch,
  output int   n_reload,
  output int   n_pi_cell,
  output int   n_idle,
  output int   n_normal,
  output int   n_abort
);

  localparam int unsigned TMR_W = (M > 1) ? $clog2(M) : 1;

  logic            reset, t1;
  logic [PI_W-1:0] pi;
  logic [U-1:0]    ctrl_func, ctrl_dp;
  logic            test_active;

  dft_test_top #(
    .M(M), .U(U), .GL_MAX(GL_MAX), .TPR_W(TPR_W), .PI_W(PI_W),
    .PCTPT(PCTPT), .GL_LEN(GL_LEN), .RELOAD(RELOAD)
  ) dut (
    .clk(clk), .reset(reset), .t1(t1), .pi(pi), .ctrl_func(ctrl_func),
    .ctrl_dp(ctrl_dp), .test_active(test_active)
  );

  logic [TPR_W-1:0] tpr_m;
  int               cyc;
  int               start = -1;

  always @(posedge clk) cyc <= cyc + 1;

  function automatic byte exp_cell(int g, int r, int k);
    return EXP.getc((g * GL_MAX + r) * U + k);
  endfunction

  function automatic int glen(int g);
    int l = int'(EXP_LEN[g]);
    for (int r = 0; r < GL_MAX; r++)
      for (int k = 0; k < U; k++)
        if (exp_cell(g, r, k) != "X" && r + 1 > l) l = r + 1;
    return l;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %m: %s (cycle %0d)", what, cyc);
    end
  endtask

  task automatic check_row(int g, int r);
    for (int k = 0; k < U; k++) begin
      byte c = exp_cell(g, r, k);
      bit  e;
      if (c == "X") continue;
      if (c == "0") e = 1'b0;
      else if (c == "1") e = 1'b1;
      else if (c == "P") begin e = pi[PI_W-1]; n_pi_cell++; end
      else e = tpr_m[c - "a"];
      chk(ctrl_dp[k] == e, $sformatf("group %0d row %0d c%0d exp %0b got %0b", g, r, k + 1, e, ctrl_dp[k]));
    end
  endtask

  task automatic apply_pattern(int g);
    int gl = glen(g);
    @(negedge clk);
    reset = 1'b1; t1 = 1'b1;
    pi = PI_W'($urandom);
    pi[TPR_W +: TMR_W] = TMR_W'(g);
    ctrl_func = U'($urandom);
    if (start < 0) start = cyc;
    #1;
    chk(test_active == 1'b0, "active before load cycle");
    tpr_m = pi[TPR_W-1:0];
    for (int r = 0; r < gl; r++) begin
      @(negedge clk);
      reset = 1'b0;
      pi = PI_W'($urandom);
      ctrl_func = U'($urandom);
      #1;
      chk(test_active == 1'b1, $sformatf("active in row %0d", r));
      check_row(g, r);
      if (RLD.getc(g * GL_MAX + r) == "1") begin
        tpr_m = pi[TPR_W-1:0];
        n_reload++;
      end
    end
    n_patterns++;
  endtask

  initial begin
    int len;
    checks = 0; failures = 0; done = 0;
    n_patterns = 0; n_group_switch = 0; n_reload = 0; n_pi_cell = 0;
    n_idle = 0; n_normal = 0; n_abort = 0;
    cyc = 0; reset = 0; t1 = 0; pi = '0; ctrl_func = '0; tpr_m = '0;

    // Normal mode: functional controller drives the data path, Reset pulses
    // do not start the test controller.
    for (int i = 0; i < 6; i++) begin
      @(negedge clk);
      reset = i[0]; t1 = 1'b0;
      pi = PI_W'($urandom); ctrl_func = U'($urandom);
      #1;
      chk(ctrl_dp == ctrl_func, "normal mode passes functional controls");
      chk(test_active == 1'b0, "normal mode keeps controller idle");
      n_normal++;
    end

    // Complete test session: every group, MAXTP_j patterns each.
    for (int g = 0; g < M; g++) begin
      if (g > 0) n_group_switch++;
      for (int p = 0; p < MAXTP[g]; p++) apply_pattern(g);
    end
    @(negedge clk);
    len = cyc - start;
    chk(len == EXP_L, $sformatf("test length %0d, expected %0d", len, EXP_L));
    $display("%m: test session of %0d cycles (expected %0d)", len, EXP_L);

    // Idle after the last row: controller stops driving.
    reset = 1'b0; t1 = 1'b1;
    #1;
    chk(test_active == 1'b0, "idle after last row");
    chk(ctrl_dp == '0, "idle drives zero");
    n_idle++;

    // Abort: leave test mode in the middle of a table.
    @(negedge clk);
    reset = 1'b1; t1 = 1'b1; pi = '0; pi[TPR_W +: TMR_W] = '0;
    @(negedge clk);
    reset = 1'b0;
    #1;
    chk(test_active == 1'b1, "table started before abort");
    @(negedge clk);
    t1 = 1'b0; ctrl_func = U'($urandom);
    #1;
    chk(ctrl_dp == ctrl_func, "leaving test mode returns control");
    @(negedge clk);
    #1;
    chk(test_active == 1'b0, "abort stops the FSM");
    n_abort++;

    done = 1'b1;
  end

endmodule
