// rcu: re-programmable control unit, a RAM-based finite state machine.
//
// The machine S = (A, B, C, phi, psi, a1) has L logic-condition inputs b
// and N control outputs c whose number and wiring are fixed; its states A,
// transition function phi and output function psi live in a program RAM of
// M words and may be rewritten at run time through the prog_* port. Each
// word, addressed by the current state, holds
//   {c[N-1:0], csel, next1, next0}
// c is the Moore output of the state; csel picks one condition b[csel]; the
// next state is next1 if that condition is 1 and next0 otherwise. So every
// state tests one condition and branches two ways, which is enough for a
// flow chart of operations and decisions. Reset puts the machine in the
// initial state a1 = 0. The program RAM reads asynchronously, so c changes
// in the clock after the state does; one state lasts one clock.
// The FSM model, fixed L and N and the run-time rewritable A, phi and psi
// follow the architecture; the word layout with one tested condition per
// state is this design's choice.
module rcu #(
  parameter int unsigned L  = 16,
  parameter int unsigned N  = 32,
  parameter int unsigned M  = 64,
  parameter int unsigned SW = (M > 1) ? $clog2(M) : 1,
  parameter int unsigned LW = (L > 1) ? $clog2(L) : 1,
  parameter int unsigned PW = N + LW + 2 * SW
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [L-1:0]   b,
  output logic [N-1:0]   c,
  output logic [SW-1:0]  state,
  input  logic           prog_we,
  input  logic [SW-1:0]  prog_addr,
  input  logic [PW-1:0]  prog_data
);
  typedef struct packed {
    logic [N-1:0]  c;
    logic [LW-1:0] csel;
    logic [SW-1:0] next1;
    logic [SW-1:0] next0;
  } word_t;

  word_t prog [M];
  word_t cur;

  always_ff @(posedge clk)
    if (prog_we) prog[prog_addr] <= word_t'(prog_data);

  assign cur = prog[state];
  assign c   = cur.c;

  logic cond;
  assign cond = (32'(cur.csel) < L) ? b[cur.csel] : 1'b0;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) state <= '0;
    else        state <= cond ? cur.next1 : cur.next0;
endmodule
