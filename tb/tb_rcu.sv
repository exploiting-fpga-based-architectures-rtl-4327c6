// tb_rcu: checks the RAM-based control unit against a reference FSM.
// A random program (outputs, tested condition and two successors per
// state) is written, the unit is reset into state 0 and run with random
// condition inputs; every cycle the state and the outputs are compared with
// the model. Program words are then rewritten at random while the machine
// runs, which must change its behaviour from the next cycle on exactly as
// in the model. Finally a fixed four-state loop checks the one-state-per-
// clock timing.
module tb_rcu;
  localparam int L = 16, N = 32, M = 64, SW = 6, LW = 4, PW = N + LW + 2 * SW;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n;
  logic [L-1:0] b;
  logic [N-1:0] c;
  logic [SW-1:0] state, mstate;
  logic prog_we;
  logic [SW-1:0] prog_addr;
  logic [PW-1:0] prog_data;
  logic [PW-1:0] model [M];
  int checks = 0, failures = 0;

  rcu #(.L(L), .N(N), .M(M)) dut (.clk, .rst_n, .b, .c, .state, .prog_we, .prog_addr, .prog_data);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [PW-1:0] word(input logic [N-1:0] cc, input int csel, input int n1, input int n0);
    return {cc, LW'(csel), SW'(n1), SW'(n0)};
  endfunction

  task automatic write_word(input int adr, input logic [PW-1:0] w);
    prog_we = 1; prog_addr = SW'(adr); prog_data = w;
    @(posedge clk); #1;
    prog_we = 0;
    model[adr] = w;
  endtask

  task automatic run(input int cycles, input bit rewrite);
    // called right after a falling edge
    for (int k = 0; k < cycles; k++) begin
      logic [PW-1:0] w;
      logic [LW-1:0] cs;
      int adr;
      w = model[mstate];
      checks++;
      if (state !== mstate || c !== w[PW-1 -: N]) begin
        failures++;
        $display("FAIL cycle %0d state=%0d exp %0d c=%h exp %h", k, state, mstate, c, w[PW-1 -: N]);
      end
      b = L'($urandom);
      #1;
      cs = w[2*SW +: LW];
      // next state from the word as read before the clock edge
      mstate = b[cs] ? w[SW +: SW] : w[0 +: SW];
      adr = -1;
      if (rewrite && ($urandom_range(0, 3) == 0)) begin
        adr = $urandom_range(0, M - 1);
        prog_we = 1; prog_addr = SW'(adr);
        prog_data = word($urandom, $urandom_range(0, L-1), $urandom_range(0, M-1), $urandom_range(0, M-1));
      end
      @(posedge clk); #1;
      if (adr >= 0) model[adr] = prog_data;
      prog_we = 0;
      @(negedge clk);
    end
  endtask

  initial begin
    rst_n = 0; b = '0; prog_we = 0; prog_addr = 0; prog_data = 0;
    for (int i = 0; i < M; i++)
      write_word(i, word($urandom, $urandom_range(0, L-1), $urandom_range(0, M-1), $urandom_range(0, M-1)));
    @(negedge clk); rst_n = 1;
    mstate = 0;
    run(400, 0);
    run(400, 1);
    // fixed loop 0 -> 1 -> 2 -> 3 -> 0 with unconditional branches (b[0] tied 1 below)
    rst_n = 0;
    for (int i = 0; i < 4; i++) write_word(i, word(N'(32'hC0DE0000 + i), 0, (i + 1) % 4, 63));
    @(negedge clk); rst_n = 1;
    b = '1;
    for (int k = 0; k < 12; k++) begin
      checks++;
      if (state !== SW'(k % 4) || c !== N'(32'hC0DE0000 + k % 4)) begin
        failures++; $display("FAIL loop step %0d state %0d", k, state);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
