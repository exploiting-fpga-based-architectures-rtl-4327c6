// tb_row_reg: checks reset to "+", parallel load, hold when ld is low, and
// the selected-element output for every index.
module tb_row_reg;
  localparam int W = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, ld;
  logic [W-1:0][1:0] d, q, m;
  logic [3:0] sel;
  logic [1:0] q_sel;
  int checks = 0, failures = 0;

  row_reg #(.W(W)) dut (.clk, .rst_n, .ld, .d, .sel, .q, .q_sel);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; ld = 0; d = '0; sel = 0;
    #12;
    checks++;
    if (q !== {W{2'b11}}) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    m = q;
    for (int k = 0; k < 100; k++) begin
      @(negedge clk);
      ld = 1'($urandom); d = {$urandom, $urandom};
      if (ld) m = d;
      @(posedge clk); #1;
      checks++;
      if (q !== m) begin failures++; $display("FAIL load/hold step %0d", k); end
      for (int i = 0; i < W; i++) begin
        sel = 4'(i); #1;
        checks++;
        if (q_sel !== m[i]) begin failures++; $display("FAIL sel %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
