// tpg_decoder_tb: checks Decoder-G_j against its table written out as text.
// Group 0 of the default example ({T1,T3}) and a table with a primary-input
// cell and a reload row are decoded for every row and random TPR and PI
// values; idle must drive all zeros.
module tpg_decoder_tb;
  import tc_pkg::*;

  typedef cell_t [3:0][3:0] rows_t;
  function automatic rows_t pi_rows();
    rows_t t;
    for (int r = 0; r < 4; r++)
      for (int k = 0; k < 4; k++) t[r][k] = cx();
    t[0][3] = cp(5); t[0][0] = c1();
    t[1][1] = cb(1); t[1][2] = cp(0);
    t[3][0] = c0();  t[3][3] = cb(0);
    return t;
  endfunction

  // expected text per row, c1..c4: 0 1 X a/b (TPR bit) p/q (PI bit 0/5)
  localparam string EXP_A = {"a01X", "01XX", "XXbX", "XX0X"};
  localparam string EXP_P = {"1XXq", "XbpX", "XXXX", "0XXa"};
  localparam string RLD_P = "0110";

  logic [1:0] row;
  logic       active;
  logic [1:0] tpr;
  logic [7:0] pi;
  logic [3:0] ctrl_a, ctrl_p;
  logic       reload_a, reload_p;
  int         checks = 0, failures = 0;

  tpg_decoder u_a (.row(row), .active(active), .tpr(tpr), .pi(pi), .ctrl(ctrl_a), .reload(reload_a));
  tpg_decoder #(.ROWS(pi_rows()), .RELOAD(4'b0110)) u_p (
    .row(row), .active(active), .tpr(tpr), .pi(pi), .ctrl(ctrl_p), .reload(reload_p));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit expv(byte c);
    case (c)
      "1": return 1'b1;
      "a": return tpr[0];
      "b": return tpr[1];
      "p": return pi[0];
      "q": return pi[5];
      default: return 1'b0;
    endcase
  endfunction

  initial begin
    for (int it = 0; it < 64; it++) begin
      row = 2'(it % 4); active = 1'b1; tpr = 2'($urandom); pi = 8'($urandom);
      #1;
      for (int k = 0; k < 4; k++) begin
        byte ca, cq;
        ca = EXP_A.getc(int'(row) * 4 + k);
        cq = EXP_P.getc(int'(row) * 4 + k);
        if (ca != "X") chk(ctrl_a[k] == expv(ca), $sformatf("A row %0d c%0d", row, k + 1));
        if (cq != "X") chk(ctrl_p[k] == expv(cq), $sformatf("P row %0d c%0d", row, k + 1));
      end
      chk(reload_a == 1'b0, "no reload in table A");
      chk(reload_p == (RLD_P.getc(int'(row)) == "1"), $sformatf("reload row %0d", row));
      #1;
    end
    active = 1'b0;
    for (int r = 0; r < 4; r++) begin
      row = 2'(r); tpr = '1; pi = '1; #1;
      chk(ctrl_a == 0 && ctrl_p == 0 && !reload_p, "idle drives 0");
    end
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
