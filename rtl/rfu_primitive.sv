// rfu_primitive: one run-time re-programmable computational primitive P_i.
//
// The primitive is a 16-word by 2-bit dual-port RAM used as a lookup table.
// The first port is addressed by the two 2-bit operands {a, b} and gives the
// 2-bit result r combinationally, so any pair of Boolean functions of the
// four operand bits can be realised. The second port (cfg_we, cfg_addr,
// cfg_data) rewrites one table entry per clock, which changes the function
// while the rest of the processor keeps running. The 16x2 dual-port
// organisation and the use of the two ports follow the architecture; the
// address order {a, b} is this design's choice. The table is not reset: it
// must be written before it is used.
module rfu_primitive (
  input  logic       clk,
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [1:0] r,
  input  logic       cfg_we,
  input  logic [3:0] cfg_addr,
  input  logic [1:0] cfg_data
);
  logic [1:0] lut [16];

  always_ff @(posedge clk)
    if (cfg_we) lut[cfg_addr] <= cfg_data;

  assign r = lut[{a, b}];
endmodule
