// tb_rfu_regs: checks the operand registers against a model: reset value,
// load, load of the result, shift left, shift right, hold and direct
// writes through the I/O port, with random operations on both registers
// over many cycles.
module tb_rfu_regs;
  import cp_pkg::*;
  localparam int W = 16;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n;
  reg_op_e ra_op, rb_op;
  logic [W-1:0][1:0] in_a, in_b, res, ra, rb, ma, mb, io_d;
  logic io_we_a, io_we_b;
  int n_io;
  logic [1:0] sh_in;
  int checks = 0, failures = 0;
  int seen [5];

  rfu_regs #(.W(W)) dut (.clk, .rst_n, .ra_op, .rb_op, .in_a, .in_b, .res, .sh_in,
    .io_we_a, .io_we_b, .io_d, .ra, .rb);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0][1:0] model(input reg_op_e op, input logic [W-1:0][1:0] cur,
      input logic [W-1:0][1:0] din, input logic [W-1:0][1:0] r, input logic [1:0] si);
    logic [W-1:0][1:0] v;
    case (op)
      REG_LOAD:  v = din;
      REG_LDRES: v = r;
      REG_SHL:   v = {cur[W-2:0], si};
      REG_SHR:   v = {si, cur[W-1:1]};
      default:   v = cur;
    endcase
    return v;
  endfunction

  initial begin
    io_we_a = 0; io_we_b = 0; io_d = '0; n_io = 0;
    rst_n = 0; ra_op = REG_HOLD; rb_op = REG_HOLD; in_a = '0; in_b = '0; res = '0; sh_in = 0;
    #12;
    checks++;
    if (ra !== {W{E_PLUS}} || rb !== {W{E_PLUS}}) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    ma = ra; mb = rb;
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      ra_op = reg_op_e'($urandom_range(0, 4));
      rb_op = reg_op_e'($urandom_range(0, 4));
      seen[ra_op]++;
      for (int i = 0; i < W; i++) begin
        in_a[i] = 2'($urandom); in_b[i] = 2'($urandom); res[i] = 2'($urandom);
      end
      sh_in = 2'($urandom);
      io_d = {$urandom, $urandom};
      io_we_a = ($urandom_range(0, 7) == 0);
      io_we_b = ($urandom_range(0, 7) == 0);
      if (io_we_a || io_we_b) n_io++;
      ma = io_we_a ? io_d : model(ra_op, ma, in_a, res, sh_in);
      mb = io_we_b ? io_d : model(rb_op, mb, in_b, res, sh_in);
      @(posedge clk); #1;
      checks++;
      if (ra !== ma || rb !== mb) begin
        failures++;
        $display("FAIL step %0d op %0d/%0d ra=%h exp %h rb=%h exp %h", k, ra_op, rb_op, ra, ma, rb, mb);
      end
    end
    if (n_io == 0) begin failures++; $display("I/O write never used"); end
    for (int i = 0; i < 5; i++) if (seen[i] == 0) begin failures++; $display("op %0d never used", i); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
