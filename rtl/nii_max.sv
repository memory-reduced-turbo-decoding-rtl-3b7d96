// nii_max: the simplified MAX module of the range finder.
//
// One signed comparator (A > B) and one 2:1 multiplexer give MAX(A,B). The
// comparator output is brought out so that the index of the winner can be
// selected next to the value. On a tie B is taken (this design's choice).
//
// Purely combinational.
module nii_max #(
  parameter int unsigned D = nii_pkg::D_METRIC           // metric width (two's complement)
) (
  input  logic signed [D-1:0] a,
  input  logic signed [D-1:0] b,
  output logic signed [D-1:0] max_o,      // MAX(A,B)
  output logic                a_gt_b      // comparator output, A > B
);
  always_comb begin
    a_gt_b = (a > b);
    max_o  = a_gt_b ? a : b;
  end
endmodule
