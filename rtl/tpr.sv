// tpr: test pattern register.
//
// Holds the pattern bits ("b" values) of the control signals for the test
// pattern being applied. It loads from the primary inputs when the
// controller Reset is high (the load cycle before row 0 of a table) and,
// for a test controller with the reload function, also when the TPG raises
// its reload signal in a row where the primary inputs that feed the TPR are
// free; otherwise it holds. Load on Reset or reload follows the method;
// which primary-input bits feed it is set by the instantiating module.
//
// Interface: clk; reset; reload; d (from the primary inputs); q.
// Timing: q shows d one clock after a load.
module tpr #(
  parameter int unsigned W = tc_pkg::EX_TPR_W
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         reload,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (reset || reload) q <= d;
  end

endmodule
