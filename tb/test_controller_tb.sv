// test_controller_tb: the test controller with a one-bit TPR and a table
// that reloads it. Group 0 (3 rows): c1 = TPR, c2 = 1; then c3 = pi[7]
// with a reload at the end of the row; then c1 = 0, c4 = TPR (the reloaded
// bit). Group 1 (2 rows): c2 = TPR, c3 = 0; then c4 = 1. In the Reset cycle
// pi[0] goes to the TPR and pi[1] to the TMR. Patterns are applied in random
// group order and each must take its table length plus one cycle.
module test_controller_tb;
  import tc_pkg::*;

  typedef cell_t [1:0][3:0][3:0] tab_t;
  function automatic tab_t tab();
    tab_t t;
    for (int g = 0; g < 2; g++)
      for (int r = 0; r < 4; r++)
        for (int k = 0; k < 4; k++) t[g][r][k] = cx();
    t[0][0][0] = cb(0); t[0][0][1] = c1();
    t[0][1][2] = cp(7);
    t[0][2][0] = c0();  t[0][2][3] = cb(0);
    t[1][0][1] = cb(0); t[1][0][2] = c0();
    t[1][1][3] = c1();
    return t;
  endfunction

  localparam string EXP = {"a1XX", "XXPX", "0XXa", "XXXX",
                           "Xa0X", "XXX1", "XXXX", "XXXX"};
  localparam string RLD = "01000000";
  localparam int GL[2] = '{3, 2};

  logic       clk = 1'b0;
  logic       reset, t1;
  logic [7:0] pi;
  logic [3:0] ctrl;
  logic       active;
  int         checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  test_controller #(
    .TPR_W(1), .PCTPT(tab()), .GL_LEN({8'd2, 8'd3}), .RELOAD({4'b0000, 4'b0010})
  ) dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    reset = 0; t1 = 1; pi = 0;
    for (int it = 0; it < 40; it++) begin
      int g, c0c;
      bit tpr_m;
      g = $urandom % 2;
      @(negedge clk);
      reset = 1; pi = 8'($urandom); pi[1] = g[0];
      tpr_m = pi[0];
      c0c = cyc;
      for (int r = 0; r < GL[g]; r++) begin
        @(negedge clk);
        reset = 0; pi = 8'($urandom);
        #1;
        chk(active, $sformatf("active group %0d row %0d", g, r));
        for (int k = 0; k < 4; k++) begin
          byte c;
          bit  e;
          c = EXP.getc((g * 4 + r) * 4 + k);
          if (c == "X") continue;
          e = (c == "1") ? 1'b1 : (c == "0") ? 1'b0 : (c == "P") ? pi[7] : tpr_m;
          chk(ctrl[k] == e, $sformatf("group %0d row %0d c%0d", g, r, k + 1));
        end
        if (RLD.getc(g * 4 + r) == "1") tpr_m = pi[0];
      end
      @(negedge clk);
      #1;
      chk(!active, "idle after table");
      chk(cyc - c0c == GL[g] + 1, $sformatf("pattern length %0d", cyc - c0c));
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
