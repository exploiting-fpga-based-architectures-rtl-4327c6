// cp_pkg: types and constants shared by the combinatorial processor.
//
// Every matrix element is a 2-bit code for one of four values: 0, 1,
// don't care (-) and the fourth value (+) that marks unused or already
// selected parts of a matrix. The code points are this design's choice;
// only the four values and their 2-bit size come from the architecture.
//
// ctrl_t is the control word c_1..c_N that the re-programmable control
// unit (RCU) drives into the datapath every cycle; COND_* are the indices
// of the logic conditions b_1..b_L that the datapath returns. Field value 0
// of every operation field means "do nothing", so an all-zero word is a
// no-operation state.
package cp_pkg;

  // element codes
  localparam logic [1:0] E_ZERO = 2'b00;
  localparam logic [1:0] E_ONE  = 2'b01;
  localparam logic [1:0] E_DC   = 2'b10;  // don't care "-"
  localparam logic [1:0] E_PLUS = 2'b11;  // fourth value "+"

  // counter operation (row index ri, column index cj)
  typedef enum logic [1:0] {CNT_HOLD = 2'd0, CNT_CLR = 2'd1, CNT_INC = 2'd2} cnt_op_e;

  // RFU operand register operation
  typedef enum logic [2:0] {
    REG_HOLD  = 3'd0,
    REG_LOAD  = 3'd1,   // load the operand input
    REG_LDRES = 3'd2,   // load the core result (intermediate result)
    REG_SHL   = 3'd3,   // element i <- element i-1, shift-in at element 0
    REG_SHR   = 3'd4    // element i <- element i+1, shift-in at element W-1
  } reg_op_e;

  // source of the A operand register
  typedef enum logic [1:0] {A_ROWX = 2'd0, A_COLX = 2'd1, A_ROWY = 2'd2, A_COLY = 2'd3} a_src_e;

  // source of the B operand register
  typedef enum logic [2:0] {
    B_ROWY    = 3'd0,
    B_COLY    = 3'd1,
    B_MASKC   = 3'd2,   // "+" at selected column C, "-" elsewhere
    B_MASKDEL = 3'd3,   // "+" at removed rows, "-" elsewhere
    B_DC      = 3'd4,   // all "-"
    B_ROWX    = 3'd5,
    B_COLX    = 3'd6,
    B_PLUS    = 3'd7    // all "+"
  } b_src_e;

  // flag shifted into Column RG Y when y_col_flag is set
  typedef enum logic [1:0] {
    FL_ANY  = 2'd0,     // result has a one (OR of the ones)
    FL_NONE = 2'd1,     // result has no one
    FL_ODD  = 2'd2,     // odd number of ones (XOR of the ones)
    FL_ALL  = 2'd3      // every element is 1 (AND of the elements)
  } flag_sel_e;

  // best-count register operation
  typedef enum logic [1:0] {BC_HOLD = 2'd0, BC_MAX = 2'd1, BC_ZERO = 2'd2, BC_LOAD = 2'd3} bc_op_e;

  // bit-set register operation (removed rows, cover set)
  typedef enum logic [1:0] {SET_HOLD = 2'd0, SET_CLR = 2'd1, SET_BIT = 2'd2} set_op_e;

  typedef struct packed {
    cnt_op_e ri_op;      // row index
    cnt_op_e cj_op;      // column index
    logic    x_row_ld;   // Row RG X <- X[ri]
    logic    y_row_ld;   // Row RG Y <- Y[ri]
    logic    x_col_sh;   // Column RG X shifts in Row RG X element cj
    logic    y_col_sh;   // Column RG Y shifts in Row RG Y element cj
    logic    y_col_flag; // ... or, if set, the selected result flag as 0/1
    flag_sel_e flag_sel;
    logic    x_addr_cj;  // X read address is cj instead of ri
    reg_op_e ra_op;
    reg_op_e rb_op;
    a_src_e  a_src;
    b_src_e  b_src;
    logic    z_we;       // Z[addr] <- RFU result
    logic    z_addr_cj;  // Z write address is cj instead of ri
    logic    x_fb_we;    // X[ri] <- Z[ri]
    logic    y_fb_we;    // Y[ri] <- Z[ri]
    bc_op_e  bc_op;
    logic    r_ld;       // selected row R <- Row RG X
    logic    c_ld;       // C <- cj
    set_op_e rowdel_op;  // removed-row register
    set_op_e cover_op;   // cover-set register
    logic    done;
    logic    fail;
  } ctrl_t;

  localparam int unsigned CTRL_W = $bits(ctrl_t);

  // logic condition indices b_0..b_15
  localparam int unsigned COND_L       = 16;
  localparam int unsigned COND_TRUE    = 0;
  localparam int unsigned COND_START   = 1;
  localparam int unsigned COND_ROWDEL  = 2;   // row ri removed
  localparam int unsigned COND_CNT_LT  = 3;   // ones count < best count
  localparam int unsigned COND_CNT_GT  = 4;   // ones count > best count
  localparam int unsigned COND_RI_LAST = 5;
  localparam int unsigned COND_CJ_LAST = 6;
  localparam int unsigned COND_SEL_ONE = 7;   // selected row has 1 at cj
  localparam int unsigned COND_ROWX_C  = 8;   // Row RG X has 1 at C
  localparam int unsigned COND_BC_ZERO = 9;   // best count is 0
  localparam int unsigned COND_ALL_DEL = 10;  // every row removed
  localparam int unsigned COND_ALL0    = 11;  // result all 0
  localparam int unsigned COND_ALL1    = 12;  // result all 1
  localparam int unsigned COND_ALLP    = 13;  // result all +
  localparam int unsigned COND_NO_ONES = 14;  // result has no 1
  localparam int unsigned COND_FALSE   = 15;

endpackage
