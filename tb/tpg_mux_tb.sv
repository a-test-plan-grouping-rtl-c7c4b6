// tpg_mux_tb: checks the TPG multiplexer array. Three groups with drive
// masks 0011, 1110 and 1001 (c1 = bit 0); for every TMR value and random
// decoder outputs, c_k must equal the selected decoder's output where that
// group drives c_k, and 0 elsewhere or for a TMR value with no group.
module tpg_mux_tb;
  localparam logic [2:0][3:0] DRIVE = {4'b1001, 4'b1110, 4'b0011};

  logic [1:0]      tmr;
  logic [2:0][3:0] dec_ctrl;
  logic [2:0]      dec_reload;
  logic [3:0]      ctrl;
  logic            reload;
  int         checks = 0, failures = 0;

  tpg_mux #(.M(3), .U(4), .TMR_W(2), .DRIVE(DRIVE)) dut (.*);

  initial begin
    for (int it = 0; it < 200; it++) begin
      logic [3:0] e;
      logic       er;
      tmr = 2'($urandom); dec_ctrl = 12'($urandom); dec_reload = 3'($urandom);
      #1;
      e = '0; er = 1'b0;
      if (tmr < 3) begin
        for (int k = 0; k < 4; k++)
          if (DRIVE[tmr][k]) e[k] = dec_ctrl[tmr][k];
        er = dec_reload[tmr];
      end
      checks++;
      if (ctrl !== e || reload !== er) begin
        failures++;
        $display("FAIL: tmr %0d ctrl %b exp %b reload %b exp %b", tmr, ctrl, e, reload, er);
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
