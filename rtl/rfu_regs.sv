// rfu_regs: the operand registers of the function unit.
//
// Two registers, RA and RB, each W elements of 2 bits, feed the
// reconfigurable core. Each clock a register holds, loads its operand input,
// loads the core result (to keep an intermediate result), or shifts by one
// element to the left (towards higher indices) or right, taking sh_in into
// the freed element. Loading and shifting come from the architecture; the
// operation set and its encoding (cp_pkg::reg_op_e) are this design's
// choice. The I/O port (io_we_a / io_we_b with io_d) lets the host write a
// register directly; it takes priority over the operation of that register
// in the same clock, and the contents are always readable on ra / rb.
// Reset fills both registers with "+" (unused).
module rfu_regs
  import cp_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  reg_op_e            ra_op,
  input  reg_op_e            rb_op,
  input  logic [W-1:0][1:0]  in_a,
  input  logic [W-1:0][1:0]  in_b,
  input  logic [W-1:0][1:0]  res,
  input  logic [1:0]         sh_in,
  input  logic               io_we_a,
  input  logic               io_we_b,
  input  logic [W-1:0][1:0]  io_d,
  output logic [W-1:0][1:0]  ra,
  output logic [W-1:0][1:0]  rb
);
  function automatic logic [W-1:0][1:0] next_val(
    input reg_op_e op, input logic [W-1:0][1:0] cur,
    input logic [W-1:0][1:0] din, input logic [W-1:0][1:0] r, input logic [1:0] si);
    logic [W-1:0][1:0] v;
    v = cur;
    case (op)
      REG_LOAD:  v = din;
      REG_LDRES: v = r;
      REG_SHL: begin
        for (int i = W-1; i > 0; i--) v[i] = cur[i-1];
        v[0] = si;
      end
      REG_SHR: begin
        for (int i = 0; i < W-1; i++) v[i] = cur[i+1];
        v[W-1] = si;
      end
      default: v = cur;
    endcase
    return v;
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ra <= {W{E_PLUS}};
      rb <= {W{E_PLUS}};
    end else begin
      ra <= io_we_a ? io_d : next_val(ra_op, ra, in_a, res, sh_in);
      rb <= io_we_b ? io_d : next_val(rb_op, rb, in_b, res, sh_in);
    end
endmodule
