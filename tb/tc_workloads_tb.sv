// tc_workloads_tb: the same test controller holding the two extreme
// groupings of the four-module example (modules need 8, 3, 7, 2 patterns).
//  - one group per test plan, i.e. testing one module at a time: four
//    tables of 3, 2, 3, 2 rows, a 1-bit TPR and a 2-bit TMR;
//    (3+1)*8 + (2+1)*3 + (3+1)*7 + (2+1)*2 = 75 cycles;
//  - all test plans in one compacted table of 6 rows with a 4-bit TPR;
//    8*(6+1) = 56 cycles.
// Each runs a complete session through tc_scenario, which checks every
// specified cell and the session length.
module tc_workloads_tb;
  import tc_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  typedef cell_t [3:0][2:0][3:0] tp_t;
  function automatic tp_t tp_table();
    tp_t t;
    for (int g = 0; g < 4; g++)
      for (int r = 0; r < 3; r++)
        for (int k = 0; k < 4; k++) t[g][r][k] = cx();
    t[0][0][0] = c0();  t[0][1][2] = cb(0); t[0][2][2] = c0();           // T1
    t[1][1][1] = cb(0); t[1][1][3] = c0();                               // T2
    t[2][0][0] = cb(0); t[2][0][1] = c0(); t[2][0][2] = c1();            // T3
    t[2][1][0] = c0();  t[2][1][1] = c1();
    t[3][0][0] = c0();  t[3][0][1] = c0(); t[3][0][2] = c1(); t[3][0][3] = cb(0); // T4
    return t;
  endfunction

  typedef cell_t [0:0][5:0][3:0] ct_t;
  function automatic ct_t ctpt_table();
    ct_t t;
    for (int r = 0; r < 6; r++)
      for (int k = 0; k < 4; k++) t[0][r][k] = cx();
    t[0][0][0] = c0();  t[0][0][1] = c0(); t[0][0][2] = c1(); t[0][0][3] = cb(0);
    t[0][1][0] = cb(1); t[0][1][1] = c0(); t[0][1][2] = c1();
    t[0][2][0] = c0();  t[0][2][1] = c1();
    t[0][3][0] = c0();  t[0][3][1] = cb(2); t[0][3][3] = c0();
    t[0][4][2] = cb(3);
    t[0][5][2] = c0();
    return t;
  endfunction

  logic done_tp, done_ct;
  int   ck_tp, fl_tp, ck_ct, fl_ct, unused_tp[7], unused_ct[7];

  tc_scenario #(
    .M(4), .GL_MAX(3), .TPR_W(1),
    .PCTPT(tp_table()), .GL_LEN({8'd2, 8'd3, 8'd2, 8'd3}),
    .RELOAD('0),
    .EXP({"0XXX", "XXaX", "XX0X",     // T1
          "XXXX", "XaX0", "XXXX",     // T2
          "a01X", "01XX", "XXXX",     // T3
          "001a", "XXXX", "XXXX"}),   // T4
    .RLD("000000000000"),
    .EXP_LEN({8'd2, 8'd3, 8'd2, 8'd3}),
    .MAXTP({8'd2, 8'd7, 8'd3, 8'd8}),
    .EXP_L(75)
  ) u_tp (
    .clk(clk), .done(done_tp), .checks(ck_tp), .failures(fl_tp),
    .n_patterns(unused_tp[0]), .n_group_switch(unused_tp[1]), .n_reload(unused_tp[2]),
    .n_pi_cell(unused_tp[3]), .n_idle(unused_tp[4]), .n_normal(unused_tp[5]), .n_abort(unused_tp[6])
  );

  tc_scenario #(
    .M(1), .GL_MAX(6), .TPR_W(4),
    .PCTPT(ctpt_table()), .GL_LEN({8'd6}),
    .RELOAD('0),
    .EXP({"001a", "b01X", "01XX", "0cX0", "XXdX", "XX0X"}),
    .RLD("000000"),
    .EXP_LEN({8'd6}),
    .MAXTP({8'd8}),
    .EXP_L(56)
  ) u_ct (
    .clk(clk), .done(done_ct), .checks(ck_ct), .failures(fl_ct),
    .n_patterns(unused_ct[0]), .n_group_switch(unused_ct[1]), .n_reload(unused_ct[2]),
    .n_pi_cell(unused_ct[3]), .n_idle(unused_ct[4]), .n_normal(unused_ct[5]), .n_abort(unused_ct[6])
  );

  initial begin
    #1;
    wait (done_tp && done_ct);
    $display("TB_RESULT checks=%0d failures=%0d", ck_tp + ck_ct, fl_tp + fl_ct);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", ck_tp + ck_ct, fl_tp + fl_ct + 1);
    $finish;
  end
endmodule
