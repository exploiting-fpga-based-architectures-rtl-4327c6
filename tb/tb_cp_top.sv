// tb_cp_top: end-to-end test of the combinatorial processor at its default
// size (16 x 16 matrices, 64-state control program).
//
// The testbench acts as the host. For each operation it writes a control
// program into the RCU and a function into the primitives, loads X and Y,
// pulses start, waits for the program's done state and reads Z back. The
// programs, each checked against a model computed here:
//   1. Z = X xor Y row by row, with Z written back into Y; run twice, so
//      the second run must return the original Y.
//   2. Z = transpose of X, gathering each column of X in the column
//      register.
//   3. Z = each row of X shifted left by one element, via an intermediate
//      result kept in the operand register.
//   4. Orthogonality and intersection matrices of the rows of a ternary X:
//      Z[i][j] = 1 when rows i and j are orthogonal (resp. intersect).
//   5. Boolean matrix product Z = X x Y with AND inside and OR, then XOR,
//      outside: Y is first transposed in place (through Z), then each row
//      of X is combined with each row of the transposed Y.
//   6. Product and sum terms whose literals are four-valued (0: not x,
//      1: x, "-": constant 1 in a product / 0 in a sum, "+": the opposite
//      constant), evaluated for random input vectors; in the last two
//      passes the input vector is written into RB through the register I/O
//      port instead of being read from Y.
//   7. Minimal column cover (greedy: row with fewest ones, then the column
//      with most ones covering it, remove, repeat), on the 4 x 4 example
//      matrix padded with "+" and on random matrices, including ones that
//      have no cover. The cover set, the done/fail outcome and the final Z
//      (X with the chosen columns marked "+") are checked.
// Every mechanism (row load, column gather, feedback Z->X and Z->Y, shift,
// intermediate result, flag collection, column-addressed X read and Z
// write, unused-row detection, failure exit, run-time
// reprogramming of RCU and primitives) is counted and must occur.
module tb_cp_top;
  import cp_pkg::*;
  localparam int ROWS = 16, COLS = 16, M = 64, SW = 6, PW = CTRL_W + 4 + 2 * SW;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, mat_we, mat_sel, cfg_we, prog_we, start, done, fail;
  logic [3:0] mat_addr, z_raddr, cfg_addr;
  logic [COLS-1:0][1:0] mat_wdata, z_rdata;
  logic [15:0] cfg_sel;
  logic [1:0] cfg_data;
  logic [SW-1:0] prog_addr, state;
  logic [PW-1:0] prog_data;
  logic [COLS-1:0] cover_set;
  logic [4:0] best;
  logic reg_we_a, reg_we_b;
  logic [15:0][1:0] reg_wdata, reg_a, reg_b;

  cp_top dut (
    .clk, .rst_n, .mat_we, .mat_sel, .mat_addr, .mat_wdata, .z_raddr, .z_rdata,
    .cfg_we, .cfg_sel, .cfg_addr, .cfg_data, .prog_we, .prog_addr, .prog_data, .start,
    .reg_we_a, .reg_we_b, .reg_wdata, .reg_a, .reg_b,
    .state, .done, .fail, .cover_set, .best
  );

  int checks = 0, failures = 0;

  // ---------------- mechanism counters ----------------
  int n_row_ld, n_col_sh, n_fb_x, n_fb_y, n_shift, n_ldres, n_unused_row, n_fail_exit,
      n_rcu_reprog, n_prim_reprog, n_cover_ok, n_z_by_col, n_flag_sh, n_x_by_col, n_term_true, n_reg_io;

  always @(posedge clk) if (rst_n) begin
    if (dut.ctl.x_row_ld) n_row_ld++;
    if (dut.ctl.x_col_sh) n_col_sh++;
    if (dut.ctl.x_fb_we) n_fb_x++;
    if (dut.ctl.y_fb_we) n_fb_y++;
    if (dut.ctl.ra_op == REG_SHL || dut.ctl.ra_op == REG_SHR) n_shift++;
    if (dut.ctl.ra_op == REG_LDRES) n_ldres++;
    if (dut.ctl.z_we && dut.ctl.z_addr_cj) n_z_by_col++;
    if (dut.ctl.y_col_sh && dut.ctl.y_col_flag) n_flag_sh++;
    if (dut.ctl.x_row_ld && dut.ctl.x_addr_cj) n_x_by_col++;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- host helpers ----------------
  typedef logic [COLS-1:0][1:0] row_t;
  row_t mx [ROWS], my [ROWS], mz [ROWS];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic st(input int s, input ctrl_t c, input int csel, input int n1, input int n0);
    prog_we = 1; prog_addr = SW'(s); prog_data = {c, 4'(csel), SW'(n1), SW'(n0)};
    @(posedge clk); #1;
    prog_we = 0;
  endtask

  function automatic ctrl_t nop();
    ctrl_t c;
    c = '0;
    return c;
  endfunction

  task automatic idle_and_done(input int done_state);
    ctrl_t c;
    c = nop();
    st(0, c, COND_START, 1, 0);
    c.done = 1;
    st(done_state, c, COND_TRUE, done_state, done_state);
  endtask

  // primitive functions, given as a function of the two operand codes
  // F_XOR / F_AND: the Boolean operation where both operands are 0 or 1,
  // "-" where either is unspecified, and a pass of a when b is "+".
  // F_PROD / F_SUM: a is a literal code, b the value of its variable;
  // the result is the literal's value: 0 -> not x, 1 -> x, and "-" / "+"
  // are the constants 1 / 0 in a product and 0 / 1 in a sum.
  typedef enum int {F_XOR, F_AND, F_MASK, F_PROD, F_SUM} fn_e;
  function automatic logic [1:0] prim_fn(input fn_e f, input logic [1:0] a, input logic [1:0] b);
    if (f == F_MASK) return (b == E_PLUS) ? E_PLUS : a;
    if (f == F_PROD || f == F_SUM) begin
      if (b == E_PLUS) return a;
      if (b[1]) return E_DC;
      case (a)
        E_ZERO:  return {1'b0, ~b[0]};
        E_ONE:   return b;
        E_DC:    return (f == F_PROD) ? E_ONE : E_ZERO;
        default: return (f == F_PROD) ? E_ZERO : E_ONE;
      endcase
    end
    if (b == E_PLUS) return a;
    if (a[1] || b[1]) return E_DC;
    return (f == F_XOR) ? (a ^ b) : (a & b);
  endfunction

  task automatic load_prims(input fn_e f);
    for (int i = 0; i < 16; i++) begin
      cfg_we = 1; cfg_sel = '1; cfg_addr = 4'(i); cfg_data = prim_fn(f, 2'(i >> 2), 2'(i));
      @(posedge clk); #1;
    end
    cfg_we = 0;
    n_prim_reprog++;
  endtask

  task automatic load_matrix(input bit sel, input row_t m [ROWS]);
    for (int i = 0; i < ROWS; i++) begin
      mat_we = 1; mat_sel = sel; mat_addr = 4'(i); mat_wdata = m[i];
      @(posedge clk); #1;
    end
    mat_we = 0;
  endtask

  task automatic read_z();
    for (int i = 0; i < ROWS; i++) begin
      z_raddr = 4'(i); #1;
      mz[i] = z_rdata;
    end
  endtask

  // start the loaded program and wait for done; returns the cycle count
  // a vector to be written into RB through the register I/O port after
  // reset is released and before start (when rb_preload is set)
  bit   rb_preload = 0;
  row_t rb_vec;

  task automatic run(output int cycles);
    @(negedge clk); rst_n = 1;
    if (rb_preload) begin
      reg_we_b = 1; reg_wdata = rb_vec;
      @(negedge clk);
      reg_we_b = 0;
      check(reg_b === rb_vec, "RB write through the register I/O port");
      n_reg_io++;
    end
    start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
      if (cycles > 100000) begin check(0, "program did not finish"); break; end
    end
    #1;
  endtask

  task automatic reset_rcu();
    @(negedge clk); rst_n = 0;
  endtask

  // ---------------- programs ----------------
  // Z = X xor Y, Y <- Z
  task automatic prog_xor();
    ctrl_t c;
    reset_rcu();
    idle_and_done(7);
    c = nop(); c.ri_op = CNT_CLR;                             st(1, c, COND_TRUE, 2, 2);
    c = nop(); c.x_row_ld = 1; c.y_row_ld = 1;                st(2, c, COND_TRUE, 3, 3);
    c = nop(); c.ra_op = REG_LOAD; c.a_src = A_ROWX;
               c.rb_op = REG_LOAD; c.b_src = B_ROWY;          st(3, c, COND_TRUE, 4, 4);
    c = nop(); c.z_we = 1;                                    st(4, c, COND_TRUE, 5, 5);
    c = nop(); c.y_fb_we = 1;                                 st(5, c, COND_RI_LAST, 7, 6);
    c = nop(); c.ri_op = CNT_INC;                             st(6, c, COND_TRUE, 2, 2);
    n_rcu_reprog++;
  endtask

  // Z[j] = column j of X
  task automatic prog_transpose();
    ctrl_t c;
    reset_rcu();
    idle_and_done(9);
    c = nop(); c.cj_op = CNT_CLR;                             st(1, c, COND_TRUE, 2, 2);
    c = nop(); c.ri_op = CNT_CLR;                             st(2, c, COND_TRUE, 3, 3);
    c = nop(); c.x_row_ld = 1;                                st(3, c, COND_TRUE, 4, 4);
    c = nop(); c.x_col_sh = 1;                                st(4, c, COND_RI_LAST, 6, 5);
    c = nop(); c.ri_op = CNT_INC;                             st(5, c, COND_TRUE, 3, 3);
    c = nop(); c.ra_op = REG_LOAD; c.a_src = A_COLX;
               c.rb_op = REG_LOAD; c.b_src = B_DC;            st(6, c, COND_TRUE, 7, 7);
    c = nop(); c.z_we = 1; c.z_addr_cj = 1;                   st(7, c, COND_CJ_LAST, 9, 8);
    c = nop(); c.cj_op = CNT_INC;                             st(8, c, COND_TRUE, 2, 2);
    n_rcu_reprog++;
  endtask

  // Z[i] = X[i] shifted left by one element ("+" enters at element 0)
  task automatic prog_shift();
    ctrl_t c;
    reset_rcu();
    idle_and_done(8);
    c = nop(); c.ri_op = CNT_CLR;                             st(1, c, COND_TRUE, 2, 2);
    c = nop(); c.x_row_ld = 1;                                st(2, c, COND_TRUE, 3, 3);
    c = nop(); c.ra_op = REG_LOAD; c.a_src = A_ROWX;
               c.rb_op = REG_LOAD; c.b_src = B_DC;            st(3, c, COND_TRUE, 4, 4);
    c = nop(); c.ra_op = REG_LDRES;                           st(4, c, COND_TRUE, 5, 5);
    c = nop(); c.ra_op = REG_SHL;                             st(5, c, COND_TRUE, 6, 6);
    c = nop(); c.z_we = 1;                                    st(6, c, COND_RI_LAST, 8, 7);
    c = nop(); c.ri_op = CNT_INC;                             st(7, c, COND_TRUE, 2, 2);
    n_rcu_reprog++;
  endtask

  // minimal column cover, flow chart steps 1-4
  localparam int S_OK = 40, S_FAIL = 41;
  task automatic prog_cover();
    ctrl_t c;
    reset_rcu();
    idle_and_done(S_OK);
    c = nop(); c.done = 1; c.fail = 1;                        st(S_FAIL, c, COND_TRUE, S_FAIL, S_FAIL);
    // mark rows that are entirely "+" (unused) as removed
    c = nop(); c.rowdel_op = SET_CLR; c.cover_op = SET_CLR;
               c.ri_op = CNT_CLR;                             st(1, c, COND_TRUE, 2, 2);
    c = nop(); c.x_row_ld = 1;                                st(2, c, COND_TRUE, 3, 3);
    c = nop(); c.ra_op = REG_LOAD; c.a_src = A_ROWX;
               c.rb_op = REG_LOAD; c.b_src = B_DC;            st(3, c, COND_TRUE, 4, 4);
    c = nop();                                                st(4, c, COND_ALLP, 5, 6);
    c = nop(); c.rowdel_op = SET_BIT;                         st(5, c, COND_TRUE, 6, 6);
    c = nop();                                                st(6, c, COND_RI_LAST, 8, 7);
    c = nop(); c.ri_op = CNT_INC;                             st(7, c, COND_TRUE, 2, 2);
    c = nop();                                                st(8, c, COND_ALL_DEL, S_OK, 10);
    // step 1: row R with the minimal number of ones
    c = nop(); c.ri_op = CNT_CLR; c.bc_op = BC_MAX;           st(10, c, COND_TRUE, 11, 11);
    c = nop(); c.x_row_ld = 1;                                st(11, c, COND_ROWDEL, 15, 12);
    c = nop(); c.ra_op = REG_LOAD; c.a_src = A_ROWX;
               c.rb_op = REG_LOAD; c.b_src = B_DC;            st(12, c, COND_TRUE, 13, 13);
    c = nop();                                                st(13, c, COND_CNT_LT, 14, 15);
    c = nop(); c.bc_op = BC_LOAD; c.r_ld = 1;                 st(14, c, COND_TRUE, 15, 15);
    c = nop();                                                st(15, c, COND_RI_LAST, 17, 16);
    c = nop(); c.ri_op = CNT_INC;                             st(16, c, COND_TRUE, 11, 11);
    c = nop();                                                st(17, c, COND_BC_ZERO, S_FAIL, 20);
    // step 2: column C with the most ones among those with a one in row R
    c = nop(); c.cj_op = CNT_CLR; c.bc_op = BC_ZERO;          st(20, c, COND_TRUE, 21, 21);
    c = nop();                                                st(21, c, COND_SEL_ONE, 22, 28);
    c = nop(); c.ri_op = CNT_CLR;                             st(22, c, COND_TRUE, 23, 23);
    c = nop(); c.x_row_ld = 1;                                st(23, c, COND_TRUE, 24, 24);
    c = nop(); c.x_col_sh = 1;                                st(24, c, COND_RI_LAST, 26, 25);
    c = nop(); c.ri_op = CNT_INC;                             st(25, c, COND_TRUE, 23, 23);
    c = nop(); c.ra_op = REG_LOAD; c.a_src = A_COLX;
               c.rb_op = REG_LOAD; c.b_src = B_MASKDEL;       st(26, c, COND_TRUE, 27, 27);
    c = nop();                                                st(27, c, COND_CNT_GT, 29, 28);
    c = nop(); c.bc_op = BC_LOAD; c.c_ld = 1;                 st(29, c, COND_TRUE, 28, 28);
    c = nop();                                                st(28, c, COND_CJ_LAST, 31, 30);
    c = nop(); c.cj_op = CNT_INC;                             st(30, c, COND_TRUE, 21, 21);
    // step 3: include C; step 4: remove C and the rows it covers
    c = nop(); c.cover_op = SET_BIT; c.ri_op = CNT_CLR;       st(31, c, COND_TRUE, 32, 32);
    c = nop(); c.x_row_ld = 1;                                st(32, c, COND_TRUE, 33, 33);
    c = nop(); c.ra_op = REG_LOAD; c.a_src = A_ROWX;
               c.rb_op = REG_LOAD; c.b_src = B_MASKC;         st(33, c, COND_ROWX_C, 34, 35);
    c = nop(); c.rowdel_op = SET_BIT;                         st(34, c, COND_TRUE, 35, 35);
    c = nop(); c.z_we = 1;                                    st(35, c, COND_TRUE, 36, 36);
    c = nop(); c.x_fb_we = 1;                                 st(36, c, COND_RI_LAST, 38, 37);
    c = nop(); c.ri_op = CNT_INC;                             st(37, c, COND_TRUE, 32, 32);
    c = nop();                                                st(38, c, COND_ALL_DEL, S_OK, 10);
    n_rcu_reprog++;
  endtask

  // Z[i][j] = flag(P(X[i], V[j])) with V = X or Y: row-against-row relation
  task automatic prog_relation(input bit inner_y, input flag_sel_e fs);
    ctrl_t c;
    reset_rcu();
    idle_and_done(11);
    c = nop(); c.cj_op = CNT_CLR;                             st(1, c, COND_TRUE, 2, 2);
    c = nop(); c.x_addr_cj = 1; c.x_row_ld = 1;               st(2, c, COND_TRUE, 3, 3);
    c = nop(); c.ra_op = REG_LOAD; c.a_src = A_ROWX;
               c.ri_op = CNT_CLR;                             st(3, c, COND_TRUE, 4, 4);
    c = nop(); if (inner_y) c.y_row_ld = 1; else c.x_row_ld = 1;
                                                              st(4, c, COND_TRUE, 5, 5);
    c = nop(); c.rb_op = REG_LOAD; c.b_src = inner_y ? B_ROWY : B_ROWX;
                                                              st(5, c, COND_TRUE, 6, 6);
    c = nop(); c.y_col_sh = 1; c.y_col_flag = 1; c.flag_sel = fs;
                                                              st(6, c, COND_RI_LAST, 8, 7);
    c = nop(); c.ri_op = CNT_INC;                             st(7, c, COND_TRUE, 4, 4);
    c = nop(); c.ra_op = REG_LOAD; c.a_src = A_COLY;
               c.rb_op = REG_LOAD; c.b_src = B_PLUS;          st(8, c, COND_TRUE, 9, 9);
    c = nop(); c.z_we = 1; c.z_addr_cj = 1;                   st(9, c, COND_CJ_LAST, 11, 10);
    c = nop(); c.cj_op = CNT_INC;                             st(10, c, COND_TRUE, 2, 2);
    n_rcu_reprog++;
  endtask

  // Y <- transpose of Y, through Z
  task automatic prog_transpose_y();
    ctrl_t c;
    reset_rcu();
    idle_and_done(12);
    c = nop(); c.cj_op = CNT_CLR;                             st(1, c, COND_TRUE, 2, 2);
    c = nop(); c.ri_op = CNT_CLR;                             st(2, c, COND_TRUE, 3, 3);
    c = nop(); c.y_row_ld = 1;                                st(3, c, COND_TRUE, 4, 4);
    c = nop(); c.y_col_sh = 1;                                st(4, c, COND_RI_LAST, 6, 5);
    c = nop(); c.ri_op = CNT_INC;                             st(5, c, COND_TRUE, 3, 3);
    c = nop(); c.ra_op = REG_LOAD; c.a_src = A_COLY;
               c.rb_op = REG_LOAD; c.b_src = B_PLUS;          st(6, c, COND_TRUE, 7, 7);
    c = nop(); c.z_we = 1; c.z_addr_cj = 1;                   st(7, c, COND_CJ_LAST, 9, 8);
    c = nop(); c.cj_op = CNT_INC;                             st(8, c, COND_TRUE, 2, 2);
    c = nop(); c.ri_op = CNT_CLR;                             st(9, c, COND_TRUE, 10, 10);
    c = nop(); c.y_fb_we = 1;                                 st(10, c, COND_RI_LAST, 12, 13);
    c = nop(); c.ri_op = CNT_INC;                             st(13, c, COND_TRUE, 10, 10);
    n_rcu_reprog++;
  endtask

  // Z[0][i] = value of the term described by row i of X for the input
  // vector held in Y[0]; the flag is AND (products) or OR (sums)
  // With rb_from_host the input vector is instead written into RB by the
  // host through the register I/O port, and states 2 and 3 are skipped.
  task automatic prog_terms(input flag_sel_e fs, input bit rb_from_host);
    ctrl_t c;
    reset_rcu();
    idle_and_done(10);
    c = nop(); c.ri_op = CNT_CLR;                             st(1, c, COND_TRUE, rb_from_host ? 4 : 2, 2);
    c = nop(); c.y_row_ld = 1;                                st(2, c, COND_TRUE, 3, 3);
    c = nop(); c.rb_op = REG_LOAD; c.b_src = B_ROWY;          st(3, c, COND_TRUE, 4, 4);
    c = nop(); c.x_row_ld = 1;                                st(4, c, COND_TRUE, 5, 5);
    c = nop(); c.ra_op = REG_LOAD; c.a_src = A_ROWX;          st(5, c, COND_TRUE, 6, 6);
    c = nop(); c.y_col_sh = 1; c.y_col_flag = 1; c.flag_sel = fs;
                                                              st(6, c, COND_RI_LAST, 8, 7);
    c = nop(); c.ri_op = CNT_INC;                             st(7, c, COND_TRUE, 4, 4);
    c = nop(); c.ra_op = REG_LOAD; c.a_src = A_COLY;
               c.rb_op = REG_LOAD; c.b_src = B_PLUS;          st(8, c, COND_TRUE, 9, 9);
    c = nop(); c.z_we = 1; c.z_addr_cj = 1;                   st(9, c, COND_TRUE, 10, 10);
    n_rcu_reprog++;
  endtask

  // ---------------- reference model of the cover algorithm ----------------
  function automatic bit cover_model(input row_t x0 [ROWS], output logic [COLS-1:0] cov);
    row_t x [ROWS];
    bit del [ROWS];
    cov = '0;
    foreach (x0[i]) x[i] = x0[i];
    foreach (del[i]) del[i] = (x[i] == {COLS{E_PLUS}});
    forever begin
      int r, best_n, cbest, cbest_n;
      bit any;
      any = 0;
      foreach (del[i]) if (!del[i]) any = 1;
      if (!any) return 1;
      best_n = 1000; r = 0;
      for (int i = 0; i < ROWS; i++) if (!del[i]) begin
        int n;
        n = 0;
        for (int j = 0; j < COLS; j++) if (x[i][j] == E_ONE) n++;
        if (n < best_n) begin best_n = n; r = i; end
      end
      if (best_n == 0) return 0;
      cbest = 0; cbest_n = 0;
      for (int j = 0; j < COLS; j++) if (x[r][j] == E_ONE) begin
        int n;
        n = 0;
        for (int i = 0; i < ROWS; i++) if (!del[i] && x[i][j] == E_ONE) n++;
        if (n > cbest_n) begin cbest_n = n; cbest = j; end
      end
      cov[cbest] = 1'b1;
      for (int i = 0; i < ROWS; i++) begin
        if (x[i][cbest] == E_ONE) del[i] = 1;
        x[i][cbest] = E_PLUS;
      end
    end
  endfunction

  task automatic run_cover(input row_t x0 [ROWS], input string name);
    logic [COLS-1:0] cov;
    bit ok;
    int cyc;
    ok = cover_model(x0, cov);
    reset_rcu();
    load_matrix(0, x0);
    run(cyc);
    check(fail === !ok, $sformatf("%s: fail=%0b expected %0b", name, fail, !ok));
    if (ok) begin
      n_cover_ok++;
      check(cover_set === cov, $sformatf("%s: cover %b expected %b", name, cover_set, cov));
      read_z();
      for (int i = 0; i < ROWS; i++) begin
        row_t e;
        e = x0[i];
        for (int j = 0; j < COLS; j++) if (cov[j]) e[j] = E_PLUS;
        check(mz[i] === e, $sformatf("%s: Z row %0d", name, i));
      end
    end else n_fail_exit++;
    if (dut.rowdel != 0 && x0[ROWS-1] == {COLS{E_PLUS}}) n_unused_row++;
  endtask

  // ---------------- test sequence ----------------
  initial begin
    int cyc;
    row_t y0 [ROWS];
    rst_n = 0; mat_we = 0; mat_sel = 0; mat_addr = 0; mat_wdata = '0; z_raddr = 0;
    cfg_we = 0; cfg_sel = '0; cfg_addr = 0; cfg_data = 0; prog_we = 0; prog_addr = 0;
    prog_data = '0; start = 0; reg_we_a = 0; reg_we_b = 0; reg_wdata = '0;
    n_row_ld = 0; n_col_sh = 0; n_fb_x = 0; n_fb_y = 0; n_shift = 0; n_ldres = 0;
    n_unused_row = 0; n_fail_exit = 0; n_rcu_reprog = 0; n_prim_reprog = 0; n_cover_ok = 0;
    n_z_by_col = 0; n_flag_sh = 0; n_x_by_col = 0; n_term_true = 0; n_reg_io = 0;
    repeat (2) @(posedge clk); #1;

    // 1. XOR with feedback into Y
    for (int i = 0; i < ROWS; i++) begin
      for (int j = 0; j < COLS; j++) begin mx[i][j] = 2'($urandom_range(0, 1)); my[i][j] = 2'($urandom_range(0, 1)); end
      y0[i] = my[i];
    end
    load_matrix(0, mx);
    load_matrix(1, my);
    load_prims(F_XOR);
    prog_xor();
    run(cyc);
    // 1 idle cycle + 5 states per row - 1 (last row does not increment)
    check(cyc == 1 + 5 * ROWS, $sformatf("xor cycles %0d expected %0d", cyc, 1 + 5 * ROWS));
    read_z();
    for (int i = 0; i < ROWS; i++) begin
      row_t e;
      for (int j = 0; j < COLS; j++) e[j] = prim_fn(F_XOR, mx[i][j], y0[i][j]);
      check(mz[i] === e, $sformatf("xor Z row %0d", i));
    end
    reset_rcu();
    run(cyc);
    read_z();
    for (int i = 0; i < ROWS; i++) check(mz[i] === y0[i], $sformatf("xor feedback row %0d", i));

    // 2. transpose
    for (int i = 0; i < ROWS; i++) for (int j = 0; j < COLS; j++) mx[i][j] = 2'($urandom);
    load_matrix(0, mx);
    load_prims(F_MASK);
    prog_transpose();
    run(cyc);
    read_z();
    for (int j = 0; j < COLS; j++) begin
      row_t e;
      for (int i = 0; i < ROWS; i++) e[i] = mx[i][j];
      check(mz[j] === e, $sformatf("transpose Z row %0d", j));
    end

    // 3. shift left
    prog_shift();
    run(cyc);
    read_z();
    for (int i = 0; i < ROWS; i++) check(mz[i] === {mx[i][COLS-2:0], E_PLUS}, $sformatf("shift Z row %0d", i));

    // 4. relation matrices over ternary rows (0, 1, -):
    //    orthogonal = some position where both are specified and differ
    for (int i = 0; i < ROWS; i++) for (int j = 0; j < COLS; j++) mx[i][j] = 2'($urandom_range(0, 2));
    mx[5] = mx[2];                       // make sure some rows intersect
    load_matrix(0, mx);
    load_prims(F_XOR);
    for (int pass = 0; pass < 2; pass++) begin
      prog_relation(0, pass == 0 ? FL_ANY : FL_NONE);
      run(cyc);
      read_z();
      for (int i = 0; i < ROWS; i++)
        for (int j = 0; j < ROWS; j++) begin
          bit ort;
          ort = 0;
          for (int k = 0; k < COLS; k++)
            if (mx[i][k] != E_DC && mx[j][k] != E_DC && mx[i][k] != mx[j][k]) ort = 1;
          check(mz[i][j] === ((ort ^ (pass == 1)) ? E_ONE : E_ZERO),
                $sformatf("%s Z[%0d][%0d]", pass == 0 ? "ort" : "int", i, j));
        end
    end

    // 5. Boolean matrix product Z = X x Y, AND inside, OR then XOR outside
    for (int i = 0; i < ROWS; i++)
      for (int j = 0; j < COLS; j++) begin
        mx[i][j] = ($urandom_range(0, 3) == 0) ? E_ONE : E_ZERO;
        my[i][j] = ($urandom_range(0, 3) == 0) ? E_ONE : E_ZERO;
      end
    load_matrix(0, mx);
    load_matrix(1, my);
    load_prims(F_AND);
    prog_transpose_y();
    run(cyc);
    for (int pass = 0; pass < 2; pass++) begin
      prog_relation(1, pass == 0 ? FL_ANY : FL_ODD);
      run(cyc);
      read_z();
      for (int i = 0; i < ROWS; i++)
        for (int k = 0; k < COLS; k++) begin
          bit acc;
          acc = 0;
          for (int j = 0; j < COLS; j++) begin
            bit p;
            p = (mx[i][j] == E_ONE) && (my[j][k] == E_ONE);
            acc = (pass == 0) ? (acc | p) : (acc ^ p);
          end
          check(mz[i][k] === (acc ? E_ONE : E_ZERO),
                $sformatf("product %s Z[%0d][%0d]", pass == 0 ? "or" : "xor", i, k));
        end
    end

    // 6. product and sum terms with four-valued literals, evaluated for
    //    random input vectors
    for (int i = 0; i < ROWS; i++) for (int j = 0; j < COLS; j++)
      mx[i][j] = ($urandom_range(0, 5) < 4) ? E_DC : 2'($urandom);
    load_matrix(0, mx);
    for (int pass = 0; pass < 6; pass++) begin
      bit is_prod;
      is_prod = (pass % 2 == 0);
      for (int j = 0; j < COLS; j++) my[0][j] = 2'($urandom_range(0, 1));
      load_matrix(1, my);
      load_prims(is_prod ? F_PROD : F_SUM);
      prog_terms(is_prod ? FL_ALL : FL_ANY, pass >= 4);
      rb_preload = (pass >= 4);
      rb_vec = my[0];
      if (rb_preload) begin             // Y[0] must not be used: spoil it
        row_t junk [ROWS];
        foreach (junk[i]) junk[i] = {COLS{E_DC}};
        load_matrix(1, junk);
      end
      run(cyc);
      rb_preload = 0;
      read_z();
      for (int i = 0; i < ROWS; i++) begin
        bit v;
        v = is_prod;
        for (int j = 0; j < COLS; j++) begin
          logic [1:0] lit;
          lit = prim_fn(is_prod ? F_PROD : F_SUM, mx[i][j], my[0][j]);
          if (is_prod) v &= (lit == E_ONE); else v |= (lit == E_ONE);
        end
        if (v) n_term_true++;
        check(mz[0][i] === (v ? E_ONE : E_ZERO), $sformatf("%s term %0d", is_prod ? "product" : "sum", i));
      end
    end

    // 7. column cover: the 4 x 4 example, padded with "+"
    load_prims(F_MASK);
    prog_cover();
    for (int i = 0; i < ROWS; i++) mx[i] = {COLS{E_PLUS}};
    mx[0][3:0] = {E_ZERO, E_ZERO, E_ONE, E_ONE};   // row 1: 1 1 0 0
    mx[1][3:0] = {E_ZERO, E_ZERO, E_ONE, E_ONE};   // row 2: 1 1 0 0
    mx[2][3:0] = {E_ONE, E_ZERO, E_ONE, E_ZERO};   // row 3: 0 1 0 1
    mx[3][3:0] = {E_ONE, E_ONE, E_ZERO, E_ZERO};   // row 4: 0 0 1 1
    run_cover(mx, "example");
    check(cover_set === 16'b0110, $sformatf("example cover %b, expected columns 2 and 3", cover_set));

    // random matrices, some with unused rows/columns and some with no cover
    for (int k = 0; k < 40; k++) begin
      int nr, nc, dens;
      nr = (k % 3 == 0) ? $urandom_range(3, ROWS - 1) : ROWS;
      nc = (k % 4 == 1) ? $urandom_range(3, COLS - 1) : COLS;
      dens = $urandom_range(10, 40);
      for (int i = 0; i < ROWS; i++)
        for (int j = 0; j < COLS; j++)
          mx[i][j] = (i >= nr || j >= nc) ? E_PLUS : (($urandom_range(0, 99) < dens) ? E_ONE : E_ZERO);
      if (k % 5 == 2) for (int j = 0; j < COLS; j++) if (mx[0][j] == E_ONE) mx[0][j] = E_ZERO;
      run_cover(mx, $sformatf("random %0d", k));
    end

    // mechanism coverage
    check(n_row_ld > 0,      "row load never happened");
    check(n_col_sh > 0,      "column gather never happened");
    check(n_fb_x > 0,        "Z->X feedback never happened");
    check(n_fb_y > 0,        "Z->Y feedback never happened");
    check(n_shift > 0,       "register shift never happened");
    check(n_ldres > 0,       "intermediate result never kept");
    check(n_z_by_col > 0,    "column-addressed Z write never happened");
    check(n_flag_sh > 0,     "flag collection never happened");
    check(n_term_true > 0 && n_term_true < 6 * ROWS, "term values never varied");
    check(n_reg_io > 0,      "register I/O write never happened");
    check(n_x_by_col > 0,    "column-addressed X read never happened");
    check(n_unused_row > 0,  "unused-row detection never happened");
    check(n_fail_exit > 0,   "no-cover exit never happened");
    check(n_cover_ok > 1,    "cover found too rarely");
    check(n_rcu_reprog >= 8, "RCU reprogrammed too rarely");
    check(n_prim_reprog >= 4, "primitives reprogrammed too rarely");
    $display("mechanisms: row_ld=%0d col_sh=%0d fb_x=%0d fb_y=%0d shift=%0d ldres=%0d zcol=%0d xcol=%0d flag=%0d unused=%0d fail=%0d ok=%0d rcu=%0d prim=%0d",
      n_row_ld, n_col_sh, n_fb_x, n_fb_y, n_shift, n_ldres, n_z_by_col, n_x_by_col, n_flag_sh,
      n_unused_row, n_fail_exit, n_cover_ok, n_rcu_reprog, n_prim_reprog);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
