// cp_top: configurable combinatorial processor.
//
// A co-processor for operations on logic matrices whose elements take four
// values (0, 1, "-", "+"), each coded in 2 bits. Three matrices live in
// row-organised RAM: operands X and Y, loaded by the host, and result Z,
// read by the host. Each operand matrix has a row register, which takes a
// whole row in one clock, and a column register, which gathers a column by
// taking one element of every row in turn. The function unit (rfu) combines
// two operand vectors element by element through run-time reprogrammable
// lookup-table primitives and reports the ones count and vector tests. The
// re-programmable control unit (rcu) sequences all of this: its program RAM
// decides which registers load, which condition is tested and where to
// branch, so a new operation needs only new RAM contents. Z can be written
// back into X or Y, so a result becomes the next operand.
//
// Besides the structure of the architecture (three matrix RAMs, row and
// column registers, RFU, RCU, Z fed back to X and Y) the datapath holds the
// special registers that matrix search algorithms such as minimal column
// cover need: row index ri and column index cj, a best-count register with
// its compare, the selected row R (index and contents) and column C, a
// removed-row register and a cover-set register. These registers, the
// control word (cp_pkg::ctrl_t) and the condition list (cp_pkg::COND_*) are
// this design's own choices.
//
// Column register Y can also collect, one step at a time, a flag of the
// function unit (any one / no one / odd number of ones / all ones) as a 0/1
// element.
// With the X read address switched to cj this gives row-against-row results
// such as orthogonality and intersection matrices and the Boolean matrix
// product with AND inside and OR or XOR outside, or the values of all the
// product or sum terms that the rows of X describe for one input vector.
//
// Vectors inside the function unit are CW = max(ROWS, COLS) elements wide;
// a row or column shorter than that is padded with "+" (unused).
//
// Host interface (use while the RCU waits in an idle state or is in reset):
//   mat_we/mat_sel/mat_addr/mat_wdata  write a row of X (mat_sel=0) or Y (1)
//   z_raddr -> z_rdata                  read a row of Z (asynchronous)
//   cfg_*                               write the primitive tables
//   prog_*                              write the RCU program
//   start                               condition COND_START for the program
//   reg_we_a/reg_we_b/reg_wdata         write RFU register RA / RB directly
//   reg_a, reg_b                        RFU register contents
// Status: done/fail are the control-word bits of the current state;
// cover_set is the cover-set register, best is the best-count register.
// An internal write of X or Y from Z (x_fb_we/y_fb_we) takes priority over
// the host write port.
module cp_top
  import cp_pkg::*;
#(
  parameter int unsigned ROWS = 16,
  parameter int unsigned COLS = 16,
  parameter int unsigned M    = 64,
  parameter int unsigned CW   = (ROWS > COLS) ? ROWS : COLS,
  parameter int unsigned RW   = (ROWS > 1) ? $clog2(ROWS) : 1,
  parameter int unsigned CJW  = (COLS > 1) ? $clog2(COLS) : 1,
  parameter int unsigned SW   = (M > 1) ? $clog2(M) : 1,
  parameter int unsigned PW   = CTRL_W + $clog2(COND_L) + 2 * SW,
  parameter int unsigned BW   = $clog2(CW + 2)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // matrix load / read
  input  logic                  mat_we,
  input  logic                  mat_sel,
  input  logic [RW-1:0]         mat_addr,
  input  logic [COLS-1:0][1:0]  mat_wdata,
  input  logic [RW-1:0]         z_raddr,
  output logic [COLS-1:0][1:0]  z_rdata,
  // primitive reconfiguration
  input  logic                  cfg_we,
  input  logic [CW-1:0]         cfg_sel,
  input  logic [3:0]            cfg_addr,
  input  logic [1:0]            cfg_data,
  // RCU program
  input  logic                  prog_we,
  input  logic [SW-1:0]         prog_addr,
  input  logic [PW-1:0]         prog_data,
  input  logic                  start,
  // RFU register I/O
  input  logic                  reg_we_a,
  input  logic                  reg_we_b,
  input  logic [CW-1:0][1:0]    reg_wdata,
  output logic [CW-1:0][1:0]    reg_a,
  output logic [CW-1:0][1:0]    reg_b,
  // status
  output logic [SW-1:0]         state,
  output logic                  done,
  output logic                  fail,
  output logic [COLS-1:0]       cover_set,
  output logic [BW-1:0]         best
);
  ctrl_t               ctl;
  logic [CTRL_W-1:0]   c_bits;
  logic [COND_L-1:0]   b;

  // ---------------- control unit ----------------
  rcu #(.L(COND_L), .N(CTRL_W), .M(M)) u_rcu (
    .clk, .rst_n, .b, .c(c_bits), .state,
    .prog_we, .prog_addr, .prog_data
  );
  assign ctl  = ctrl_t'(c_bits);
  assign done = ctl.done;
  assign fail = ctl.fail;

  // ---------------- indices ----------------
  logic [RW-1:0]  ri;
  logic [CJW-1:0] cj;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ri <= '0;
      cj <= '0;
    end else begin
      case (ctl.ri_op)
        CNT_CLR: ri <= '0;
        CNT_INC: ri <= (32'(ri) == ROWS - 1) ? '0 : ri + 1'b1;
        default: ;
      endcase
      case (ctl.cj_op)
        CNT_CLR: cj <= '0;
        CNT_INC: cj <= (32'(cj) == COLS - 1) ? '0 : cj + 1'b1;
        default: ;
      endcase
    end

  // ---------------- matrices ----------------
  logic [COLS-1:0][1:0] x_rd, y_rd, z_wq, x_wq_unused, y_wq_unused;
  logic [COLS-1:0][1:0] res_cols;
  logic                 x_we, y_we, z_we;
  logic [RW-1:0]        x_wa, y_wa, z_wa, x_ra;
  logic [COLS-1:0][1:0] x_wd, y_wd;

  always_comb begin
    x_we = ctl.x_fb_we || (mat_we && !mat_sel);
    x_wa = ctl.x_fb_we ? ri : mat_addr;
    x_wd = ctl.x_fb_we ? z_wq : mat_wdata;
    y_we = ctl.y_fb_we || (mat_we && mat_sel);
    y_wa = ctl.y_fb_we ? ri : mat_addr;
    y_wd = ctl.y_fb_we ? z_wq : mat_wdata;
    x_ra = ctl.x_addr_cj ? RW'(cj) : ri;
    z_we = ctl.z_we;
    z_wa = ctl.z_addr_cj ? RW'(cj) : ri;
  end

  matrix_ram #(.ROWS(ROWS), .COLS(COLS)) u_x (
    .clk, .we(x_we), .waddr(x_wa), .wdata(x_wd), .wq(x_wq_unused), .raddr(x_ra), .rq(x_rd)
  );
  matrix_ram #(.ROWS(ROWS), .COLS(COLS)) u_y (
    .clk, .we(y_we), .waddr(y_wa), .wdata(y_wd), .wq(y_wq_unused), .raddr(ri), .rq(y_rd)
  );
  matrix_ram #(.ROWS(ROWS), .COLS(COLS)) u_z (
    .clk, .we(z_we), .waddr(z_wa), .wdata(res_cols), .wq(z_wq), .raddr(z_raddr), .rq(z_rdata)
  );

  // ---------------- row and column registers ----------------
  logic [COLS-1:0][1:0] rowx, rowy;
  logic [1:0]           rowx_cj, rowy_cj, coly_din, flag_elem;
  logic [ROWS-1:0][1:0] colx, coly;

  row_reg #(.W(COLS)) u_rowx (
    .clk, .rst_n, .ld(ctl.x_row_ld), .d(x_rd), .sel(cj), .q(rowx), .q_sel(rowx_cj)
  );
  row_reg #(.W(COLS)) u_rowy (
    .clk, .rst_n, .ld(ctl.y_row_ld), .d(y_rd), .sel(cj), .q(rowy), .q_sel(rowy_cj)
  );
  column_reg #(.LEN(ROWS)) u_colx (
    .clk, .rst_n, .sh(ctl.x_col_sh), .din(rowx_cj), .q(colx)
  );
  column_reg #(.LEN(ROWS)) u_coly (
    .clk, .rst_n, .sh(ctl.y_col_sh), .din(coly_din), .q(coly)
  );

  // ---------------- special registers ----------------
  logic [BW-1:0]        bc;
  logic [COLS-1:0][1:0] sel_row;
  logic [CJW-1:0]       sel_c;
  logic [ROWS-1:0]      rowdel;
  logic [BW-1:0]        ones;
  logic                 all_zero, all_one, all_plus, no_ones;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      bc      <= '0;
      sel_row <= {COLS{E_PLUS}};
      sel_c   <= '0;
      rowdel  <= '0;
      cover_set <= '0;
    end else begin
      case (ctl.bc_op)
        BC_MAX:  bc <= '1;
        BC_ZERO: bc <= '0;
        BC_LOAD: bc <= ones;
        default: ;
      endcase
      if (ctl.r_ld) begin
        sel_row <= rowx;
      end
      if (ctl.c_ld) sel_c <= cj;
      case (ctl.rowdel_op)
        SET_CLR: rowdel <= '0;
        SET_BIT: rowdel[ri] <= 1'b1;
        default: ;
      endcase
      case (ctl.cover_op)
        SET_CLR: cover_set <= '0;
        SET_BIT: cover_set[sel_c] <= 1'b1;
        default: ;
      endcase
    end
  assign best = bc;

  // Column RG Y can instead collect one flag per step, which builds a result
  // row element by element (relation matrices, Boolean matrix product).
  always_comb begin
    case (ctl.flag_sel)
      FL_ANY:  flag_elem = no_ones ? E_ZERO : E_ONE;
      FL_NONE: flag_elem = no_ones ? E_ONE : E_ZERO;
      FL_ODD:  flag_elem = ones[0] ? E_ONE : E_ZERO;
      default: flag_elem = all_one ? E_ONE : E_ZERO;
    endcase
    coly_din = ctl.y_col_flag ? flag_elem : rowy_cj;
  end

  // ---------------- operand selection ----------------
  function automatic logic [CW-1:0][1:0] pad_cols(input logic [COLS-1:0][1:0] v);
    logic [CW-1:0][1:0] o;
    o = {CW{E_PLUS}};
    for (int i = 0; i < COLS; i++) o[i] = v[i];
    return o;
  endfunction

  function automatic logic [CW-1:0][1:0] pad_rows(input logic [ROWS-1:0][1:0] v);
    logic [CW-1:0][1:0] o;
    o = {CW{E_PLUS}};
    for (int i = 0; i < ROWS; i++) o[i] = v[i];
    return o;
  endfunction

  logic [CW-1:0][1:0] in_a, in_b, mask_c, mask_del;

  always_comb begin
    for (int i = 0; i < CW; i++) begin
      mask_c[i]   = (i == 32'(sel_c)) ? E_PLUS : E_DC;
      mask_del[i] = (i >= ROWS) ? E_PLUS : (rowdel[i % ROWS] ? E_PLUS : E_DC);
    end
    case (ctl.a_src)
      A_ROWX:  in_a = pad_cols(rowx);
      A_COLX:  in_a = pad_rows(colx);
      A_ROWY:  in_a = pad_cols(rowy);
      default: in_a = pad_rows(coly);
    endcase
    case (ctl.b_src)
      B_ROWY:    in_b = pad_cols(rowy);
      B_COLY:    in_b = pad_rows(coly);
      B_MASKC:   in_b = mask_c;
      B_MASKDEL: in_b = mask_del;
      B_ROWX:    in_b = pad_cols(rowx);
      B_COLX:    in_b = pad_rows(colx);
      B_PLUS:    in_b = {CW{E_PLUS}};
      default:   in_b = {CW{E_DC}};
    endcase
  end

  // ---------------- function unit ----------------
  logic [CW-1:0][1:0] res;
  logic [$clog2(CW+1)-1:0] ones_raw;

  rfu #(.W(CW)) u_rfu (
    .clk, .rst_n, .ra_op(ctl.ra_op), .rb_op(ctl.rb_op), .in_a, .in_b, .sh_in(E_PLUS),
    .io_we_a(reg_we_a), .io_we_b(reg_we_b), .io_d(reg_wdata),
    .cfg_we, .cfg_sel, .cfg_addr, .cfg_data,
    .ra(reg_a), .rb(reg_b), .res, .ones(ones_raw), .all_zero, .all_one, .all_plus, .no_ones
  );
  assign ones = BW'(ones_raw);

  always_comb
    for (int i = 0; i < COLS; i++) res_cols[i] = res[i];

  // ---------------- logic conditions ----------------
  always_comb begin
    b               = '0;
    b[COND_TRUE]    = 1'b1;
    b[COND_START]   = start;
    b[COND_ROWDEL]  = rowdel[ri];
    b[COND_CNT_LT]  = ones < bc;
    b[COND_CNT_GT]  = ones > bc;
    b[COND_RI_LAST] = (32'(ri) == ROWS - 1);
    b[COND_CJ_LAST] = (32'(cj) == COLS - 1);
    b[COND_SEL_ONE] = (sel_row[cj] == E_ONE);
    b[COND_ROWX_C]  = (rowx[sel_c] == E_ONE);
    b[COND_BC_ZERO] = (bc == '0);
    b[COND_ALL_DEL] = &rowdel;
    b[COND_ALL0]    = all_zero;
    b[COND_ALL1]    = all_one;
    b[COND_ALLP]    = all_plus;
    b[COND_NO_ONES] = no_ones;
    b[COND_FALSE]   = 1'b0;
  end

  // The write-port read data of X and Y are not needed by the datapath;
  // only Z's write-port read feeds back.
  logic unused_ok;
  assign unused_ok = ^{x_wq_unused, y_wq_unused};
endmodule
