// tpg: test plan generator for several partly compacted test plan tables.
//
// The test plans of the data path are partitioned into M groups and each
// group is compacted into one table (PCTPT_j, GL_LEN[j] rows). The TPG is
// split as the method proposes, so that each part stays small enough to
// synthesise: one FSM whose state is the row number (GL_MAX states, the
// longest table), one decoder per group (Decoder-G_j) that turns the row,
// the TPR and the primary inputs into that group's control values, and a
// MUX that passes on the outputs of the decoder of the group in the TMR.
// PCTPT is indexed [group][row][control signal]; RELOAD marks rows at whose
// end the TPR reloads from the primary inputs.
//
// Interface: clk, reset (controller Reset), t1 (test mode), tmr, tpr, pi;
// ctrl[U] to the data-path control signals (c1 = bit 0), reload to the TPR,
// active (a table row is being applied). Timing: row r of the table is on
// ctrl r+1 cycles after the cycle in which Reset is high. With the default
// tables, which have no reload rows, `reload` is constant 0.
module tpg #(
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
  input  logic             clk,
  input  logic             reset,
  input  logic             t1,
  input  logic [TMR_W-1:0] tmr,
  input  logic [TPR_W-1:0] tpr,
  input  logic [PI_W-1:0]  pi,
  output logic [U-1:0]     ctrl,
  output logic             reload,
  output logic             active
);

  localparam int unsigned ROW_W = (GL_MAX > 1) ? $clog2(GL_MAX) : 1;

  function automatic logic [M-1:0][U-1:0] drive_masks();
    logic [M-1:0][U-1:0] m;
    m = '0;
    for (int g = 0; g < M; g++)
      for (int r = 0; r < GL_MAX; r++)
        for (int k = 0; k < U; k++)
          if (PCTPT[g][r][k].kind != tc_pkg::CELL_X) m[g][k] = 1'b1;
    return m;
  endfunction

  localparam logic [M-1:0][U-1:0] DRIVE = drive_masks();

  // Every TPR or primary-input cell must name an existing bit and every
  // table length must fit the FSM.
  function automatic bit table_ok();
    for (int g = 0; g < M; g++) begin
      if (GL_LEN[g] == '0 || 32'(GL_LEN[g]) > GL_MAX) return 1'b0;
      for (int r = 0; r < GL_MAX; r++)
        for (int k = 0; k < U; k++) begin
          if (PCTPT[g][r][k].kind == tc_pkg::CELL_TPR && 32'(PCTPT[g][r][k].idx) >= TPR_W) return 1'b0;
          if (PCTPT[g][r][k].kind == tc_pkg::CELL_PI  && 32'(PCTPT[g][r][k].idx) >= PI_W)  return 1'b0;
        end
    end
    return 1'b1;
  endfunction

  if (!table_ok()) begin : g_bad_table
    $error("tpg: PCTPT names a missing TPR or PI bit, or a GL_LEN entry is 0 or above GL_MAX");
  end

  logic [ROW_W-1:0]    row;
  logic [M-1:0][U-1:0] dec_ctrl;
  logic [M-1:0]        dec_reload;

  tpg_fsm #(
    .M(M), .GL_MAX(GL_MAX), .TMR_W(TMR_W), .ROW_W(ROW_W), .GL_LEN(GL_LEN)
  ) u_fsm (
    .clk(clk), .reset(reset), .t1(t1), .tmr(tmr), .row(row), .active(active)
  );

  for (genvar g = 0; g < M; g++) begin : g_dec
    tpg_decoder #(
      .U(U), .GL_MAX(GL_MAX), .TPR_W(TPR_W), .PI_W(PI_W), .ROW_W(ROW_W),
      .ROWS(PCTPT[g]), .RELOAD(RELOAD[g])
    ) u_dec (
      .row(row), .active(active), .tpr(tpr), .pi(pi),
      .ctrl(dec_ctrl[g]), .reload(dec_reload[g])
    );
  end

  tpg_mux #(.M(M), .U(U), .TMR_W(TMR_W), .DRIVE(DRIVE)) u_mux (
    .tmr(tmr), .dec_ctrl(dec_ctrl), .dec_reload(dec_reload),
    .ctrl(ctrl), .reload(reload)
  );

endmodule
