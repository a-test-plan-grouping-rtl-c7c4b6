// dft_test_top_tb: end-to-end test of the test controller top.
//
// Two configurations run side by side, each through a full test session:
//  - the grouping {T1,T2} / {T3,T4} of the four-module example (two tables
//    of four rows), with 8 and 7 patterns: 8*(4+1) + 7*(4+1) = 75 cycles;
//  - a table built to use the reload function and a pattern bit taken
//    straight from a free primary input, with a one-bit TPR.
// Each also runs normal mode, an abort by leaving test mode and the idle
// state. Every mechanism must occur at least once.
module dft_test_top_tb;
  import tc_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  // Reload configuration: one TPR bit serves two pattern bits in group 0.
  typedef cell_t [1:0][3:0][3:0] tab_t;
  function automatic tab_t reload_table();
    tab_t t;
    for (int g = 0; g < 2; g++)
      for (int r = 0; r < 4; r++)
        for (int k = 0; k < 4; k++) t[g][r][k] = cx();
    t[0][0][0] = cb(0); t[0][0][1] = c1();
    t[0][1][2] = cp(7);                       // reload at end of row 1
    t[0][2][0] = c0();  t[0][2][3] = cb(0);
    t[1][0][1] = cb(0); t[1][0][2] = c0();
    t[1][1][3] = c1();
    return t;
  endfunction
  localparam tab_t R_TAB = reload_table();

  logic done_b, done_r;
  int   ck_b, fl_b, np_b, ng_b, nr_b, npi_b, ni_b, nn_b, na_b;
  int   ck_r, fl_r, np_r, ng_r, nr_r, npi_r, ni_r, nn_r, na_r;

  tc_scenario #(
    .PCTPT(EX_TABLE_B), .GL_LEN(EX_LEN_B),
    .EXP("0XXXXXaXXX0XXbX0a01X01XX001bXXXX"),
    .RLD("00000000"),
    .EXP_LEN({8'd4, 8'd4}),
    .MAXTP({8'd7, 8'd8}),
    .EXP_L(75)
  ) u_b (
    .clk(clk), .done(done_b), .checks(ck_b), .failures(fl_b),
    .n_patterns(np_b), .n_group_switch(ng_b), .n_reload(nr_b),
    .n_pi_cell(npi_b), .n_idle(ni_b), .n_normal(nn_b), .n_abort(na_b)
  );

  tc_scenario #(
    .TPR_W(1),
    .PCTPT(R_TAB), .GL_LEN({8'd2, 8'd3}), .RELOAD({4'b0000, 4'b0010}),
    .EXP("a1XXXXPX0XXaXXXXXa0XXXX1XXXXXXXX"),
    .RLD("01000000"),
    .EXP_LEN({8'd2, 8'd3}),
    .MAXTP({8'd3, 8'd5}),
    .EXP_L(5 * 4 + 3 * 3)
  ) u_r (
    .clk(clk), .done(done_r), .checks(ck_r), .failures(fl_r),
    .n_patterns(np_r), .n_group_switch(ng_r), .n_reload(nr_r),
    .n_pi_cell(npi_r), .n_idle(ni_r), .n_normal(nn_r), .n_abort(na_r)
  );

  int checks, failures;

  task automatic seen(int n, string what);
    checks++;
    $display("mechanism %-28s occurred %0d times", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL: mechanism %s never occurred", what);
    end
  endtask

  initial begin
    #1;
    wait (done_b && done_r);
    checks   = ck_b + ck_r;
    failures = fl_b + fl_r;
    seen(np_b + np_r, "test pattern applied");
    seen(ng_b + ng_r, "group switch (TMR)");
    seen(nr_b + nr_r, "TPR reload");
    seen(npi_b + npi_r, "pattern bit from PI");
    seen(ni_b + ni_r, "idle after table");
    seen(nn_b + nn_r, "normal mode");
    seen(na_b + na_r, "abort (t1 dropped)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", ck_b + ck_r, fl_b + fl_r + 1);
    $finish;
  end
endmodule
