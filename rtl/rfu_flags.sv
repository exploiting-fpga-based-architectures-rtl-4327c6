// rfu_flags: the combinational condition circuits of the function unit.
//
// From a vector of W 2-bit elements it counts the elements equal to 1 and
// tests whether every element is 0, every element is 1, or every element is
// "+" (an unused vector). The results are purely combinational and go to
// the control unit as logic conditions. Counting ones and the all-zeros /
// all-ones tests are the examples the architecture names; the all-"+" test
// is this design's addition for recognising unused rows.
module rfu_flags
  import cp_pkg::*;
#(
  parameter int unsigned W  = 16,
  parameter int unsigned CW = $clog2(W + 1)
) (
  input  logic [W-1:0][1:0] v,
  output logic [CW-1:0]     ones,
  output logic              all_zero,
  output logic              all_one,
  output logic              all_plus,
  output logic              no_ones
);
  always_comb begin
    ones     = '0;
    all_zero = 1'b1;
    all_one  = 1'b1;
    all_plus = 1'b1;
    for (int i = 0; i < W; i++) begin
      ones     = ones + CW'(v[i] == E_ONE);
      all_zero = all_zero & (v[i] == E_ZERO);
      all_one  = all_one  & (v[i] == E_ONE);
      all_plus = all_plus & (v[i] == E_PLUS);
    end
    no_ones = (ones == '0);
  end
endmodule
