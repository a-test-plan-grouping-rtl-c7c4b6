// ctrl_sel_mux_tb: in test mode (t1 = 1) the data path must see the test
// controller's values, otherwise the functional controller's.
module ctrl_sel_mux_tb;
  logic       t1;
  logic [5:0] ctrl_func, ctrl_test, ctrl_dp;
  int         checks = 0, failures = 0;

  ctrl_sel_mux #(.U(6)) dut (.*);

  initial begin
    for (int it = 0; it < 100; it++) begin
      t1 = 1'($urandom); ctrl_func = 6'($urandom); ctrl_test = 6'($urandom);
      #1;
      checks++;
      if (ctrl_dp !== (t1 ? ctrl_test : ctrl_func)) begin
        failures++;
        $display("FAIL: t1 %0b func %b test %b dp %b", t1, ctrl_func, ctrl_test, ctrl_dp);
      end
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
