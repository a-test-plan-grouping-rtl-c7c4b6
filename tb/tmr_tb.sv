// tmr_tb: the target module register must load d on Reset and hold
// otherwise; q follows one clock after the load.
module tmr_tb;
  logic       clk = 1'b0;
  logic       reset;
  logic [2:0] d, q, model;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  tmr #(.W(3)) dut (.*);

  initial begin
    reset = 1; d = 3'd6;
    @(negedge clk);
    model = 3'd6;
    for (int it = 0; it < 300; it++) begin
      reset = ($urandom % 3 == 0); d = 3'($urandom);
      @(negedge clk);
      if (reset) model = d;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL: it %0d q %0d exp %0d", it, q, model);
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
