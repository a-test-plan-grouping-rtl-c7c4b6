// test_controller: supplies the control signals of a data path with strong
// testability from several partly compacted test plan tables.
//
// It holds a test pattern register (TPR), a target module register (TMR)
// and a test plan generator (TPG). To apply one test pattern the tester
// raises the controller Reset for one cycle while putting on the primary
// inputs the TPR bits (pi[TPR_W-1:0]) and the group index
// (pi[TPR_W +: TMR_W]); the TPG then plays the GL_j rows of PCTPT_j on the
// control signals, taking pattern bits from the TPR or directly from a free
// primary input. A pattern for group j thus takes GL_j + 1 cycles, and a
// group with MAXTP_j patterns MAXTP_j * (GL_j + 1) cycles. In rows marked
// for reload the TPR takes new bits from the primary inputs (load = Reset
// or reload), which lets a narrow TPR serve a table with many pattern
// bits. The structure, the one-cycle load and the reload rule follow the
// method; the placement of the TPR and TMR bits on the primary inputs is
// this design's choice.
//
// Interface: clk; reset (controller Reset, synchronous); t1 (test mode);
// pi[PI_W] (data-path primary inputs); ctrl[U] (c1 = bit 0); active.
module test_controller #(
  parameter int unsigned M      = tc_pkg::EX_M,
  parameter int unsigned U      = tc_pkg::EX_U,
  parameter int unsigned GL_MAX = tc_pkg::EX_GL_MAX,
  parameter int unsigned TPR_W  = tc_pkg::EX_TPR_W,
  parameter int unsigned PI_W   = tc_pkg::EX_PI_W,
  parameter int unsigned TMR_W  = (M > 1) ? $clog2(M) : 1,
  parameter tc_pkg::cell_t [M-1:0][GL_MAX-1:0][U-1:0] PCTPT = tc_pkg::EX_TABLE_A,
  parameter logic [M-1:0][tc_pkg::EX_GL_W-1:0]        GL_LEN = tc_pkg::EX_LEN_A,
  parameter logic [M-1:0][GL_MAX-1:0]                 RELOAD = tc_pkg::EX_NO_RELOAD
) (
  input  logic            clk,
  input  logic            reset,
  input  logic            t1,
  input  logic [PI_W-1:0] pi,
  output logic [U-1:0]    ctrl,
  output logic            active
);

  if (PI_W < TPR_W + TMR_W) begin : g_bad_pi
    $error("test_controller: PI_W must cover the TPR and TMR bits");
  end

  logic [TPR_W-1:0] tpr_q;
  logic [TMR_W-1:0] tmr_q;
  logic             reload;

  tpr #(.W(TPR_W)) u_tpr (
    .clk(clk), .reset(reset), .reload(reload),
    .d(pi[TPR_W-1:0]), .q(tpr_q)
  );

  tmr #(.W(TMR_W)) u_tmr (
    .clk(clk), .reset(reset), .d(pi[TPR_W +: TMR_W]), .q(tmr_q)
  );

  tpg #(
    .M(M), .U(U), .GL_MAX(GL_MAX), .TPR_W(TPR_W), .PI_W(PI_W), .TMR_W(TMR_W),
    .PCTPT(PCTPT), .GL_LEN(GL_LEN), .RELOAD(RELOAD)
  ) u_tpg (
    .clk(clk), .reset(reset), .t1(t1), .tmr(tmr_q), .tpr(tpr_q), .pi(pi),
    .ctrl(ctrl), .reload(reload), .active(active)
  );

endmodule
