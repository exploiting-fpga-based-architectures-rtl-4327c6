// tb_rfu: checks the function unit as a whole.
// The core is loaded with element-wise XOR of the operand codes, operands
// are loaded into the registers, and one clock later the result and flags
// must match a model. The core is then reprogrammed at run time to the
// "mask" function and an intermediate result is fed back into RA (load
// result) and shifted, checking the register/core/flag loop.
module tb_rfu;
  import cp_pkg::*;
  localparam int W = 16;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n;
  reg_op_e ra_op, rb_op;
  logic [W-1:0][1:0] in_a, in_b, ra, rb, res, exp_res, io_d;
  logic io_we_a, io_we_b;
  logic [1:0] sh_in, cfg_data;
  logic cfg_we;
  logic [W-1:0] cfg_sel;
  logic [3:0] cfg_addr;
  logic [4:0] ones;
  logic all_zero, all_one, all_plus, no_ones;
  int checks = 0, failures = 0;
  bit use_mask;

  rfu #(.W(W)) dut (.clk, .rst_n, .ra_op, .rb_op, .in_a, .in_b, .sh_in, .io_we_a, .io_we_b, .io_d,
    .cfg_we, .cfg_sel, .cfg_addr, .cfg_data,
    .ra, .rb, .res, .ones, .all_zero, .all_one, .all_plus, .no_ones);

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [1:0] f(input logic [1:0] x, input logic [1:0] y);
    if (use_mask) return (y == E_PLUS) ? E_PLUS : x;
    return x ^ y;
  endfunction

  task automatic prog();
    for (int i = 0; i < 16; i++) begin
      cfg_we = 1; cfg_sel = '1; cfg_addr = 4'(i); cfg_data = f(2'(i >> 2), 2'(i));
      @(posedge clk); #1;
    end
    cfg_we = 0;
  endtask

  task automatic check_out(input logic [W-1:0][1:0] a, input logic [W-1:0][1:0] b);
    int n;
    n = 0;
    for (int i = 0; i < W; i++) begin
      exp_res[i] = f(a[i], b[i]);
      if (exp_res[i] == E_ONE) n++;
    end
    checks++;
    if (res !== exp_res || ones !== 5'(n) || no_ones !== (n == 0) ||
        all_one !== (n == W)) begin
      failures++;
      $display("FAIL res=%h exp %h ones=%0d exp %0d", res, exp_res, ones, n);
    end
  endtask

  initial begin
    rst_n = 0; ra_op = REG_HOLD; rb_op = REG_HOLD; in_a = '0; in_b = '0; sh_in = E_PLUS;
    cfg_we = 0; cfg_sel = '0; cfg_addr = 0; cfg_data = 0; use_mask = 0;
    io_we_a = 0; io_we_b = 0; io_d = '0;
    #12 rst_n = 1;
    prog();
    for (int k = 0; k < 50; k++) begin
      for (int i = 0; i < W; i++) begin in_a[i] = 2'($urandom); in_b[i] = 2'($urandom); end
      ra_op = REG_LOAD; rb_op = REG_LOAD;
      @(posedge clk); #1;
      ra_op = REG_HOLD; rb_op = REG_HOLD;
      check_out(in_a, in_b);
    end
    // equal operands give all zeros under XOR
    in_b = in_a; rb_op = REG_LOAD; ra_op = REG_LOAD;
    @(posedge clk); #1;
    ra_op = REG_HOLD; rb_op = REG_HOLD;
    checks++;
    if (!all_zero) begin failures++; $display("FAIL all_zero"); end
    // operand written through the register I/O port
    for (int i = 0; i < W; i++) io_d[i] = 2'($urandom);
    io_we_b = 1;
    @(posedge clk); #1;
    io_we_b = 0;
    check_out(in_a, io_d);
    // run-time switch to the mask function
    use_mask = 1;
    prog();
    for (int k = 0; k < 30; k++) begin
      logic [W-1:0][1:0] hold_a, shifted;
      for (int i = 0; i < W; i++) begin in_a[i] = 2'($urandom); in_b[i] = 2'($urandom_range(2, 3)); end
      ra_op = REG_LOAD; rb_op = REG_LOAD;
      @(posedge clk); #1;
      check_out(in_a, in_b);
      // keep the intermediate result, then shift it right by one element
      hold_a = exp_res;
      ra_op = REG_LDRES; rb_op = REG_HOLD;
      @(posedge clk); #1;
      check_out(hold_a, in_b);
      ra_op = REG_SHR;
      @(posedge clk); #1;
      ra_op = REG_HOLD;
      shifted = {E_PLUS, hold_a[W-1:1]};
      checks++;
      if (ra !== shifted) begin failures++; $display("FAIL shift"); end
      check_out(shifted, in_b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
