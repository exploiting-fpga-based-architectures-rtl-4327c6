// tb_reconf_core: checks the array of primitives.
// Broadcasts one function to all primitives (the "mask" function: b = "+"
// gives "+", otherwise a), checks random operand vectors element by
// element, then reprograms a single primitive to XOR and checks that only
// that element changes behaviour.
module tb_reconf_core;
  import cp_pkg::*;
  localparam int W = 16;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [W-1:0][1:0] a, b, r;
  logic              cfg_we;
  logic [W-1:0]      cfg_sel;
  logic [3:0]        cfg_addr;
  logic [1:0]        cfg_data;
  int checks = 0, failures = 0;
  int xor_lane;

  reconf_core #(.W(W)) dut (.clk, .a, .b, .r, .cfg_we, .cfg_sel, .cfg_addr, .cfg_data);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [1:0] f_mask(input logic [1:0] x, input logic [1:0] y);
    return (y == E_PLUS) ? E_PLUS : x;
  endfunction

  task automatic prog(input logic [W-1:0] sel, input bit use_xor);
    for (int i = 0; i < 16; i++) begin
      cfg_we = 1; cfg_sel = sel; cfg_addr = 4'(i);
      cfg_data = use_xor ? (2'(i >> 2) ^ 2'(i)) : f_mask(2'(i >> 2), 2'(i));
      @(posedge clk); #1;
    end
    cfg_we = 0;
  endtask

  task automatic check_random(input int n);
    for (int k = 0; k < n; k++) begin
      for (int i = 0; i < W; i++) begin a[i] = 2'($urandom); b[i] = 2'($urandom); end
      #1;
      for (int i = 0; i < W; i++) begin
        logic [1:0] e;
        e = (i == xor_lane) ? (a[i] ^ b[i]) : f_mask(a[i], b[i]);
        checks++;
        if (r[i] !== e) begin
          failures++;
          $display("FAIL lane %0d a=%0d b=%0d r=%0d exp=%0d", i, a[i], b[i], r[i], e);
        end
      end
    end
  endtask

  initial begin
    cfg_we = 0; cfg_sel = '0; cfg_addr = 0; cfg_data = 0; a = '0; b = '0;
    xor_lane = -1;
    @(posedge clk); #1;
    prog('1, 1'b0);
    check_random(20);
    xor_lane = 5;
    prog(W'(1) << xor_lane, 1'b1);
    check_random(20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
