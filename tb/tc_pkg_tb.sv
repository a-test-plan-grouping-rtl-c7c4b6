// tc_pkg_tb: checks the example tables in tc_pkg cell by cell against the
// two groupings written out as text ('0', '1', 'X', 'a'/'b' = TPR bit 0/1),
// their lengths, and the number of control signals each group drives:
// 3 and 4 for {T1,T3}/{T2,T4}, 4 and 4 for {T1,T2}/{T3,T4}.
module tc_pkg_tb;
  import tc_pkg::*;

  localparam string EXP_A = {"a01X", "01XX", "XXbX", "XX0X",
                             "001a", "XXXX", "XbX0", "XXXX"};
  localparam string EXP_B = {"0XXX", "XXaX", "XX0X", "XbX0",
                             "a01X", "01XX", "001b", "XXXX"};

  int checks = 0, failures = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic check_table(ex_table_t t, string exp, string name);
    for (int g = 0; g < 2; g++)
      for (int r = 0; r < 4; r++)
        for (int k = 0; k < 4; k++) begin
          byte   c;
          cell_t e;
          c = exp.getc((g * 4 + r) * 4 + k);
          case (c)
            "0":     e = '{kind: CELL_0,   idx: 8'd0};
            "1":     e = '{kind: CELL_1,   idx: 8'd0};
            "X":     e = '{kind: CELL_X,   idx: 8'd0};
            default: e = '{kind: CELL_TPR, idx: 8'(c - "a")};
          endcase
          chk(t[g][r][k] == e, $sformatf("%s group %0d row %0d c%0d", name, g, r, k + 1));
        end
  endtask

  initial begin
    check_table(EX_TABLE_A, EXP_A, "A");
    check_table(EX_TABLE_B, EXP_B, "B");
    chk(EX_LEN_A[0] == 4 && EX_LEN_A[1] == 3, "lengths A");
    chk(EX_LEN_B[0] == 4 && EX_LEN_B[1] == 4, "lengths B");
    chk($countones(ex_drive_mask(EX_TABLE_A, 0)) == 3, "GNC A0");
    chk($countones(ex_drive_mask(EX_TABLE_A, 1)) == 4, "GNC A1");
    chk($countones(ex_drive_mask(EX_TABLE_B, 0)) == 4, "GNC B0");
    chk($countones(ex_drive_mask(EX_TABLE_B, 1)) == 4, "GNC B1");
    chk(EX_NO_RELOAD == '0, "no reload rows");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
