// tmr: target module register.
//
// Holds the index of the test target. With several partly compacted test
// plan tables the target is a group of test plans, so the register selects
// PCTPT_j and needs ceil(log2 m) bits (with one test plan per module it
// would hold the module index, ceil(log2 n) bits). It loads from the
// primary inputs when the controller Reset is high and holds otherwise,
// as the method describes.
//
// Interface: clk; reset; d (from the primary inputs); q.
// Timing: q shows d one clock after Reset.
module tmr #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         reset,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (reset) q <= d;
  end

endmodule
