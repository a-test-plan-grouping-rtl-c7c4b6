// ctrl_sel_mux: mode multiplexer on the data-path control signals.
//
// In test mode (t1 high) the data path takes its control signals from the
// test controller; in normal mode from the functional controller. The
// selection by t1 is as drawn in the method's test architecture; its
// polarity (1 = test) is this design's choice.
//
// Interface: t1; ctrl_func[U] (functional controller); ctrl_test[U] (test
// controller); ctrl_dp[U] (to the data path). Combinational.
module ctrl_sel_mux #(
  parameter int unsigned U = tc_pkg::EX_U
) (
  input  logic         t1,
  input  logic [U-1:0] ctrl_func,
  input  logic [U-1:0] ctrl_test,
  output logic [U-1:0] ctrl_dp
);

  always_comb ctrl_dp = t1 ? ctrl_test : ctrl_func;

endmodule
