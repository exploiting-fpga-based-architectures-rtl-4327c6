// matrix_ram: one logic matrix held in distributed (LUT) RAM.
//
// ROWS words, each a row of COLS 2-bit elements. It has the organisation of
// the dual-port distributed RAM of LUT-based FPGAs: a write port whose
// address also reads (wq = mem[waddr]) and a second, read-only port
// (rq = mem[raddr]); both reads are asynchronous and the write takes effect
// at the clock edge. The processor uses it for X, Y and Z. Row organisation
// and the dual port follow the architecture; the sizes are parameters
// because the architecture fixes them per problem. The contents are not
// reset.
module matrix_ram #(
  parameter int unsigned ROWS = 16,
  parameter int unsigned COLS = 16,
  parameter int unsigned AW   = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic                  clk,
  input  logic                  we,
  input  logic [AW-1:0]         waddr,
  input  logic [COLS-1:0][1:0]  wdata,
  output logic [COLS-1:0][1:0]  wq,
  input  logic [AW-1:0]         raddr,
  output logic [COLS-1:0][1:0]  rq
);
  logic [COLS-1:0][1:0] mem [ROWS];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign wq = mem[waddr];
  assign rq = mem[raddr];
endmodule
