// tb_matrix_ram: fills the RAM with random rows, reads them back through
// both ports, and checks that a write is visible on the write-port read
// right after the clock edge while the other port reads another row.
module tb_matrix_ram;
  localparam int ROWS = 16, COLS = 16;
  logic clk = 0;
  always #5 clk = ~clk;

  logic we;
  logic [3:0] waddr, raddr;
  logic [COLS-1:0][1:0] wdata, wq, rq;
  logic [COLS-1:0][1:0] model [ROWS];
  int checks = 0, failures = 0;

  matrix_ram #(.ROWS(ROWS), .COLS(COLS)) dut (.clk, .we, .waddr, .wdata, .wq, .raddr, .rq);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = '0;
    @(negedge clk);
    for (int i = 0; i < ROWS; i++) begin
      we = 1; waddr = 4'(i); wdata = {$urandom, $urandom};
      model[i] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < ROWS; i++) begin
      waddr = 4'(i); raddr = 4'(ROWS - 1 - i); #1;
      checks += 2;
      if (wq !== model[i]) begin failures++; $display("FAIL wq row %0d", i); end
      if (rq !== model[ROWS-1-i]) begin failures++; $display("FAIL rq row %0d", ROWS-1-i); end
    end
    for (int k = 0; k < 100; k++) begin
      @(negedge clk);
      we = 1; waddr = 4'($urandom); wdata = {$urandom, $urandom}; raddr = 4'($urandom);
      #1;
      checks++;
      if (rq !== model[raddr]) begin failures++; $display("FAIL rq before write"); end
      @(posedge clk); #1;
      model[waddr] = wdata;
      checks++;
      if (wq !== model[waddr] || rq !== model[raddr]) begin failures++; $display("FAIL after write"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
