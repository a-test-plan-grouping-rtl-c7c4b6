// tpg_mux: the MUX of the test plan generator, an array of multiplexers.
//
// Control signal c_k takes the output of the decoder of the group held in
// the TMR if that group drives c_k (DRIVE[g][k]); otherwise, and for a TMR
// value with no group, it is 0. Each c_k therefore needs a multiplexer only
// over the groups that drive it, which is why the total of the decoders'
// output counts sets the MUX size. The reload signal is selected the same
// way. Selection by the TMR follows the figure of the TPG; the 0 for
// undriven signals is this design's choice.
//
// Interface: tmr; dec_ctrl[M][U] and dec_reload[M] from the decoders;
// ctrl[U] (c1 = bit 0) and reload out. Purely combinational.
module tpg_mux #(
  parameter int unsigned M     = tc_pkg::EX_M,
  parameter int unsigned U     = tc_pkg::EX_U,
  parameter int unsigned TMR_W = (M > 1) ? $clog2(M) : 1,
  parameter logic [M-1:0][U-1:0] DRIVE = {tc_pkg::ex_drive_mask(tc_pkg::EX_TABLE_A, 1),
                                          tc_pkg::ex_drive_mask(tc_pkg::EX_TABLE_A, 0)}
) (
  input  logic [TMR_W-1:0]      tmr,
  input  logic [M-1:0][U-1:0]   dec_ctrl,
  input  logic [M-1:0]          dec_reload,
  output logic [U-1:0]          ctrl,
  output logic                  reload
);

  always_comb begin
    ctrl   = '0;
    reload = 1'b0;
    for (int unsigned g = 0; g < M; g++) begin
      if (tmr == TMR_W'(g)) begin
        ctrl   = dec_ctrl[g] & DRIVE[g];
        reload = dec_reload[g];
      end
    end
  end

endmodule
