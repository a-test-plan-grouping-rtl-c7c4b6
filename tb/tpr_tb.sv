// tpr_tb: the test pattern register must load d on Reset or on reload and
// hold otherwise; q follows one clock after the load.
module tpr_tb;
  logic       clk = 1'b0;
  logic       reset, reload;
  logic [3:0] d, q, model;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  tpr #(.W(4)) dut (.*);

  initial begin
    reset = 1; reload = 0; d = 4'h5;
    @(negedge clk);
    model = 4'h5;
    for (int it = 0; it < 300; it++) begin
      reset = ($urandom % 4 == 0); reload = ($urandom % 4 == 0); d = 4'($urandom);
      @(negedge clk);
      if (reset || reload) model = d;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL: it %0d q %h exp %h", it, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
