// column_reg: column register (Column RG) that gathers one matrix column.
//
// A column cannot be read from a row-organised RAM at once. Instead the
// control unit reads rows 0..LEN-1 in turn and, for each, shifts element j
// of the row (din) into this register: on sh every element moves one place
// down and din enters at the top, so after LEN shifts element i holds row
// i's element. Gathering a column by sequential reads and shifts follows
// the architecture; the shift direction is this design's choice. Reset
// fills it with "+".
module column_reg
  import cp_pkg::*;
#(
  parameter int unsigned LEN = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 sh,
  input  logic [1:0]           din,
  output logic [LEN-1:0][1:0]  q
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)   q <= {LEN{E_PLUS}};
    else if (sh) begin
      for (int i = 0; i < LEN-1; i++) q[i] <= q[i+1];
      q[LEN-1] <= din;
    end
endmodule
