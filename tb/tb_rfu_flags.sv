// tb_rfu_flags: checks ones count and vector tests on random vectors and on
// the special vectors (all 0, all 1, all "+").
module tb_rfu_flags;
  import cp_pkg::*;
  localparam int W = 16;
  logic [W-1:0][1:0] v;
  logic [4:0] ones;
  logic all_zero, all_one, all_plus, no_ones;
  int checks = 0, failures = 0;

  rfu_flags #(.W(W)) dut (.v, .ones, .all_zero, .all_one, .all_plus, .no_ones);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    int n; bit z, o, p;
    n = 0; z = 1; o = 1; p = 1;
    #1;
    for (int i = 0; i < W; i++) begin
      if (v[i] == 2'b01) n++;
      if (v[i] != 2'b00) z = 0;
      if (v[i] != 2'b01) o = 0;
      if (v[i] != 2'b11) p = 0;
    end
    checks++;
    if (ones !== 5'(n) || all_zero !== z || all_one !== o || all_plus !== p || no_ones !== (n == 0)) begin
      failures++;
      $display("FAIL v=%h ones=%0d exp %0d flags %b%b%b%b exp %b%b%b%b", v, ones, n,
               all_zero, all_one, all_plus, no_ones, z, o, p, n == 0);
    end
  endtask

  initial begin
    v = '0;               check();
    v = {W{2'b01}};       check();
    v = {W{2'b11}};       check();
    v = {W{2'b10}};       check();
    for (int k = 0; k < 500; k++) begin
      for (int i = 0; i < W; i++) v[i] = 2'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
