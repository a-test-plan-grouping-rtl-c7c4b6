// tc_pkg: types and constants shared by the test controller.
//
// A partly compacted test plan table (PCTPT) lists, for each clock cycle of
// one test pattern, the value the test controller puts on every data-path
// control signal. A cell holds one of:
//   CELL_X    don't care (the decoder drives 0)
//   CELL_0/1  a constant
//   CELL_TPR  bit `idx` of the test pattern register (a pattern bit "b")
//   CELL_PI   bit `idx` of the primary input, for a pattern bit that the
//             tester can apply through an input the data path does not use
//             in that cycle
// A table is indexed [group][row][control signal]; control signal c1 is
// index 0. Each row also carries a reload flag: when it is set, the TPR
// reloads from the primary inputs at the end of that row.
//
// The default tables are the two-group example of a four-module data path
// with one primary input P1 and control signals c1..c4: EX_TABLE_A groups
// {T1,T3} and {T2,T4}, EX_TABLE_B groups {T1,T2} and {T3,T4}. The table
// contents follow the method's worked example; the numbering of TPR bits,
// the width of the primary input and the encoding of cells are this
// design's choices.
package tc_pkg;

  typedef enum logic [2:0] {
    CELL_X   = 3'd0,
    CELL_0   = 3'd1,
    CELL_1   = 3'd2,
    CELL_TPR = 3'd3,
    CELL_PI  = 3'd4
  } cell_kind_e;

  typedef struct packed {
    cell_kind_e  kind;
    logic [7:0]  idx;  // TPR or primary-input bit, up to 256
  } cell_t;

  // Sizes of the example configuration.
  localparam int unsigned EX_U      = 4;  // control signals c1..c4
  localparam int unsigned EX_M      = 2;  // PCTPT groups
  localparam int unsigned EX_GL_MAX = 4;  // longest PCTPT = FSM states
  localparam int unsigned EX_TPR_W  = 2;  // TPR bits
  localparam int unsigned EX_PI_W   = 8;  // primary input width (assumed)
  localparam int unsigned EX_GL_W   = 8;  // width of a stored table length

  typedef cell_t [EX_M-1:0][EX_GL_MAX-1:0][EX_U-1:0] ex_table_t;
  typedef logic  [EX_M-1:0][EX_GL_MAX-1:0]           ex_reload_t;
  typedef logic  [EX_M-1:0][EX_GL_W-1:0]             ex_len_t;

  function automatic cell_t cx();
    return '{kind: CELL_X, idx: 8'd0};
  endfunction
  function automatic cell_t c0();
    return '{kind: CELL_0, idx: 8'd0};
  endfunction
  function automatic cell_t c1();
    return '{kind: CELL_1, idx: 8'd0};
  endfunction
  function automatic cell_t cb(int unsigned i);
    return '{kind: CELL_TPR, idx: 8'(i)};
  endfunction
  function automatic cell_t cp(int unsigned i);
    return '{kind: CELL_PI, idx: 8'(i)};
  endfunction

  // Grouping {T1,T3} / {T2,T4}: lengths 4 and 3.
  function automatic ex_table_t ex_table_a();
    ex_table_t t;
    for (int g = 0; g < EX_M; g++)
      for (int r = 0; r < EX_GL_MAX; r++)
        for (int k = 0; k < EX_U; k++) t[g][r][k] = cx();
    // group 0 (T1, T3); t[group][row][k], k = 0 is c1
    t[0][0][0] = cb(0); t[0][0][1] = c0(); t[0][0][2] = c1();
    t[0][1][0] = c0();  t[0][1][1] = c1();
    t[0][2][2] = cb(1);
    t[0][3][2] = c0();
    // group 1 (T2, T4)
    t[1][0][0] = c0();  t[1][0][1] = c0(); t[1][0][2] = c1(); t[1][0][3] = cb(0);
    t[1][2][1] = cb(1); t[1][2][3] = c0();
    return t;
  endfunction

  // Grouping {T1,T2} / {T3,T4}: lengths 4 and 4.
  function automatic ex_table_t ex_table_b();
    ex_table_t t;
    for (int g = 0; g < EX_M; g++)
      for (int r = 0; r < EX_GL_MAX; r++)
        for (int k = 0; k < EX_U; k++) t[g][r][k] = cx();
    // group 0 (T1, T2)
    t[0][0][0] = c0();
    t[0][1][2] = cb(0);
    t[0][2][2] = c0();
    t[0][3][1] = cb(1); t[0][3][3] = c0();
    // group 1 (T3, T4)
    t[1][0][0] = cb(0); t[1][0][1] = c0(); t[1][0][2] = c1();
    t[1][1][0] = c0();  t[1][1][1] = c1();
    t[1][2][0] = c0();  t[1][2][1] = c0(); t[1][2][2] = c1(); t[1][2][3] = cb(1);
    return t;
  endfunction

  localparam ex_table_t  EX_TABLE_A  = ex_table_a();
  localparam ex_len_t    EX_LEN_A    = {8'd3, 8'd4};   // {group 1, group 0}
  localparam ex_table_t  EX_TABLE_B  = ex_table_b();
  localparam ex_len_t    EX_LEN_B    = {8'd4, 8'd4};
  localparam ex_reload_t EX_NO_RELOAD = '0;

  // Control signals that a group's table ever drives (its drive control
  // signal set; the number of ones is GNC_j).
  function automatic logic [EX_U-1:0] ex_drive_mask(ex_table_t t, int unsigned g);
    logic [EX_U-1:0] m;
    m = '0;
    for (int r = 0; r < EX_GL_MAX; r++)
      for (int k = 0; k < EX_U; k++)
        if (t[g][r][k].kind != CELL_X) m[k] = 1'b1;
    return m;
  endfunction

endpackage
