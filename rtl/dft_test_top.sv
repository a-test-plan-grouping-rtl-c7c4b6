// dft_test_top: test access for a data path with strong testability,
// driven by several partly compacted test plan tables (PCTPTs).
//
// The combinational modules of the data path are tested by test plans:
// short sequences of primary-input and control-signal values that carry a
// test pattern to a module and its response to the outputs. Test plans are
// grouped and each group compacted into one table, so that the modules of a
// group are tested at the same time. In test mode (t1 high) the test
// controller plays the table of the group held in its TMR on the data-path
// control signals; in normal mode the functional controller drives them.
// The data path and the functional controller are outside this module:
// their signals are ports.
//
// Default parameters: the method's four-module example with two groups,
// {T1,T3} (4 rows) and {T2,T4} (3 rows), four control signals and a 2-bit
// TPR. The 8-bit primary input is this design's choice.
//
// Interface: clk; reset (controller Reset: TPR/TMR load and table start);
// t1 (test mode); pi (primary inputs shared with the data path);
// ctrl_func[U] (from the functional controller); ctrl_dp[U] (to the data
// path, c1 = bit 0); test_active (a table row is on ctrl_dp).
// Timing: one test pattern of group j takes GL_LEN[j] + 1 cycles.
module dft_test_top #(
  parameter int unsigned M      = tc_pkg::EX_M,
  parameter int unsigned U      = tc_pkg::EX_U,
  parameter int unsigned GL_MAX = tc_pkg::EX_GL_MAX,
  parameter int unsigned TPR_W  = tc_pkg::EX_TPR_W,
  parameter int unsigned PI_W   = tc_pkg::EX_PI_W,
  parameter tc_pkg::cell_t [M-1:0][GL_MAX-1:0][U-1:0] PCTPT = tc_pkg::EX_TABLE_A,
  parameter logic [M-1:0][tc_pkg::EX_GL_W-1:0]        GL_LEN = tc_pkg::EX_LEN_A,
  parameter logic [M-1:0][GL_MAX-1:0]                 RELOAD = tc_pkg::EX_NO_RELOAD
) (
  input  logic            clk,
  input  logic            reset,
  input  logic            t1,
  input  logic [PI_W-1:0] pi,
  input  logic [U-1:0]    ctrl_func,
  output logic [U-1:0]    ctrl_dp,
  output logic            test_active
);

  logic [U-1:0] ctrl_test;

  test_controller #(
    .M(M), .U(U), .GL_MAX(GL_MAX), .TPR_W(TPR_W), .PI_W(PI_W),
    .PCTPT(PCTPT), .GL_LEN(GL_LEN), .RELOAD(RELOAD)
  ) u_tc (
    .clk(clk), .reset(reset), .t1(t1), .pi(pi),
    .ctrl(ctrl_test), .active(test_active)
  );

  ctrl_sel_mux #(.U(U)) u_sel (
    .t1(t1), .ctrl_func(ctrl_func), .ctrl_test(ctrl_test), .ctrl_dp(ctrl_dp)
  );

endmodule
