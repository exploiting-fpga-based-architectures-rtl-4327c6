// rfu: re-programmable function unit.
//
// Operand vectors in_a and in_b (from the row and column registers of the
// matrices) are loaded into the operand registers RA and RB under control
// of the RCU. The reconfigurable core forms res = P(RA, RB) element by
// element, combinationally, and the flag circuits derive from res the
// ones count and the all-0 / all-1 / all-"+" tests that return to the RCU.
// res also goes out to the Z matrix and back into the registers, which keep
// intermediate results. The core tables are rewritten through the cfg_*
// port at run time, and the registers can be written directly through the
// io_* port (the register I/O). The three parts and their connections follow the
// architecture; the single-cycle timing (register load on one clock, result
// and flags valid after it) is this design's choice.
module rfu
  import cp_pkg::*;
#(
  parameter int unsigned W  = 16,
  parameter int unsigned CW = $clog2(W + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  reg_op_e            ra_op,
  input  reg_op_e            rb_op,
  input  logic [W-1:0][1:0]  in_a,
  input  logic [W-1:0][1:0]  in_b,
  input  logic [1:0]         sh_in,
  input  logic               io_we_a,
  input  logic               io_we_b,
  input  logic [W-1:0][1:0]  io_d,
  input  logic               cfg_we,
  input  logic [W-1:0]       cfg_sel,
  input  logic [3:0]         cfg_addr,
  input  logic [1:0]         cfg_data,
  output logic [W-1:0][1:0]  ra,
  output logic [W-1:0][1:0]  rb,
  output logic [W-1:0][1:0]  res,
  output logic [CW-1:0]      ones,
  output logic               all_zero,
  output logic               all_one,
  output logic               all_plus,
  output logic               no_ones
);
  rfu_regs #(.W(W)) u_regs (
    .clk, .rst_n, .ra_op, .rb_op, .in_a, .in_b, .res, .sh_in, .io_we_a, .io_we_b, .io_d, .ra, .rb
  );

  reconf_core #(.W(W)) u_core (
    .clk, .a(ra), .b(rb), .r(res), .cfg_we, .cfg_sel, .cfg_addr, .cfg_data
  );

  rfu_flags #(.W(W), .CW(CW)) u_flags (
    .v(res), .ones, .all_zero, .all_one, .all_plus, .no_ones
  );
endmodule
