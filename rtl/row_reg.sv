// row_reg: row register (Row RG) between a matrix RAM and the function unit.
//
// On ld it takes a whole row of W 2-bit elements in parallel, so the row is
// read from RAM in one clock and stays available while the RAM address
// moves on. It also exposes element sel (q_sel) so that one element of the
// row can be passed to a column register or tested. Reset fills it with
// "+" (unused). The parallel row load follows the architecture; the element
// output and reset value are this design's choice.
module row_reg
  import cp_pkg::*;
#(
  parameter int unsigned W  = 16,
  parameter int unsigned SW = (W > 1) ? $clog2(W) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ld,
  input  logic [W-1:0][1:0]  d,
  input  logic [SW-1:0]      sel,
  output logic [W-1:0][1:0]  q,
  output logic [1:0]         q_sel
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  q <= {W{E_PLUS}};
    else if (ld) q <= d;

  assign q_sel = (32'(sel) < W) ? q[sel] : E_PLUS;
endmodule
