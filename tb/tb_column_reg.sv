// tb_column_reg: shifts in the elements of a column row by row and checks
// that after LEN shifts element i holds row i's element; also checks hold
// when sh is low and the reset value.
module tb_column_reg;
  localparam int LEN = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, sh;
  logic [1:0] din;
  logic [LEN-1:0][1:0] q, col;
  int checks = 0, failures = 0;

  column_reg #(.LEN(LEN)) dut (.clk, .rst_n, .sh, .din, .q);

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; sh = 0; din = 0;
    #12;
    checks++;
    if (q !== {LEN{2'b11}}) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    for (int k = 0; k < 20; k++) begin
      col = {$urandom, $urandom};
      for (int i = 0; i < LEN; i++) begin
        @(negedge clk);
        sh = 1; din = col[i];
        @(negedge clk);
        sh = 0; din = ~col[i];     // idle cycle: must hold
        checks++;
        if (q[LEN-1] !== col[i]) begin failures++; $display("FAIL top after shift %0d", i); end
      end
      @(negedge clk);
      checks++;
      if (q !== col) begin failures++; $display("FAIL column %h exp %h", q, col); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
