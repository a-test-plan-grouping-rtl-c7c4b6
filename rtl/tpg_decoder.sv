// tpg_decoder: Decoder-G_j of the test plan generator, one per PCTPT group.
//
// It is the combinational form of one partly compacted test plan table: for
// the current row it drives every control signal the table gives a value,
// taking constants from the table, pattern bits from the TPR, or pattern
// bits straight from a primary input where the table says so. Don't-care
// cells and all rows while the FSM is idle drive 0. `reload` is the reload
// signal of the table's current row. Outputs for control signals the table
// never drives are constant 0 and are dropped by synthesis; the remaining
// GNC_j outputs are the ones the MUX selects from.
// The decoder split per group and its inputs (FSM state and TPR) follow the
// method; driving don't-cares as 0 and the PI cell are this design's
// encoding.
//
// Interface: row/active from the FSM; tpr; pi; ctrl[U] (c1 = bit 0);
// reload. Purely combinational.
module tpg_decoder #(
  parameter int unsigned U      = tc_pkg::EX_U,
  parameter int unsigned GL_MAX = tc_pkg::EX_GL_MAX,
  parameter int unsigned TPR_W  = tc_pkg::EX_TPR_W,
  parameter int unsigned PI_W   = tc_pkg::EX_PI_W,
  parameter int unsigned ROW_W  = (GL_MAX > 1) ? $clog2(GL_MAX) : 1,
  parameter tc_pkg::cell_t [GL_MAX-1:0][U-1:0] ROWS = tc_pkg::EX_TABLE_A[0],
  parameter logic [GL_MAX-1:0] RELOAD = '0
) (
  input  logic [ROW_W-1:0] row,
  input  logic             active,
  input  logic [TPR_W-1:0] tpr,
  input  logic [PI_W-1:0]  pi,
  output logic [U-1:0]     ctrl,
  output logic             reload
);


  always_comb begin
    ctrl   = '0;
    reload = 1'b0;
    if (active) begin
      for (int unsigned r = 0; r < GL_MAX; r++) begin
        if (row == ROW_W'(r)) begin
          reload = RELOAD[r];
          for (int unsigned k = 0; k < U; k++) begin
            unique case (ROWS[r][k].kind)
              tc_pkg::CELL_1:   ctrl[k] = 1'b1;
              tc_pkg::CELL_TPR: ctrl[k] = 1'(tpr >> ROWS[r][k].idx);
              tc_pkg::CELL_PI:  ctrl[k] = 1'(pi >> ROWS[r][k].idx);
              default:          ctrl[k] = 1'b0;
            endcase
          end
        end
      end
    end
  end

endmodule
