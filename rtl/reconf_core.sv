// reconf_core: the dynamically reconfigurable ALU of the function unit.
//
// W primitives P_1..P_W work side by side: element i of the result vector is
// r_i = P_i(a_i, b_i), where a and b are vectors of 2-bit matrix elements.
// The result is combinational. Reconfiguration writes table entry cfg_addr
// with cfg_data into every primitive whose bit is set in cfg_sel, one clock
// per entry; setting all bits loads the same function into every primitive,
// a single bit reprograms one primitive alone. The array of primitives
// follows the architecture; the select mask is this design's own choice.
module reconf_core #(
  parameter int unsigned W = 16
) (
  input  logic               clk,
  input  logic [W-1:0][1:0]  a,
  input  logic [W-1:0][1:0]  b,
  output logic [W-1:0][1:0]  r,
  input  logic               cfg_we,
  input  logic [W-1:0]       cfg_sel,
  input  logic [3:0]         cfg_addr,
  input  logic [1:0]         cfg_data
);
  for (genvar i = 0; i < W; i++) begin : g_prim
    rfu_primitive u_prim (
      .clk      (clk),
      .a        (a[i]),
      .b        (b[i]),
      .r        (r[i]),
      .cfg_we   (cfg_we && cfg_sel[i]),
      .cfg_addr (cfg_addr),
      .cfg_data (cfg_data)
    );
  end
endmodule
