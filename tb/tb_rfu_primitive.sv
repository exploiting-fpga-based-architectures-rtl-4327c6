// tb_rfu_primitive: checks the 16x2 lookup-table primitive.
// Writes a random table through the configuration port, reads every one of
// the 16 operand combinations through the function port and compares with
// the table kept in the testbench; then rewrites the table to the
// element-wise XOR of the two operand codes while running, and checks again.
module tb_rfu_primitive;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [1:0] a, b, r, cfg_data;
  logic       cfg_we;
  logic [3:0] cfg_addr;
  logic [1:0] model [16];
  int checks = 0, failures = 0;

  rfu_primitive dut (.clk, .a, .b, .r, .cfg_we, .cfg_addr, .cfg_data);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_entry(input int adr, input logic [1:0] d);
    cfg_we = 1; cfg_addr = 4'(adr); cfg_data = d;
    @(posedge clk); #1;
    cfg_we = 0;
    model[adr] = d;
  endtask

  task automatic check_all();
    for (int i = 0; i < 16; i++) begin
      a = 2'(i >> 2); b = 2'(i); #1;
      checks++;
      if (r !== model[i]) begin
        failures++;
        $display("FAIL a=%0d b=%0d r=%0d exp=%0d", a, b, r, model[i]);
      end
    end
  endtask

  initial begin
    cfg_we = 0; cfg_addr = 0; cfg_data = 0; a = 0; b = 0;
    @(posedge clk); #1;
    for (int i = 0; i < 16; i++) write_entry(i, 2'($urandom));
    check_all();
    for (int i = 0; i < 16; i++) write_entry(i, 2'(i >> 2) ^ 2'(i));
    check_all();
    // the new value is visible right after the write edge
    a = 2'd3; b = 2'd1; #1;
    write_entry(13, ~model[13]);
    checks++;
    if (r !== model[13]) begin failures++; $display("FAIL rewrite"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
