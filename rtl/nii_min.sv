// nii_min: the simplified MIN module of the range finder.
//
// One signed comparator (A > B) and one 2:1 multiplexer give MIN(A,B). The
// comparator output is brought out so that the index of the winner can be
// selected next to the value. On a tie A is taken (this design's choice).
//
// Purely combinational.
module nii_min #(
  parameter int unsigned D = nii_pkg::D_METRIC           // metric width (two's complement)
) (
  input  logic signed [D-1:0] a,
  input  logic signed [D-1:0] b,
  output logic signed [D-1:0] min_o,      // MIN(A,B)
  output logic                a_gt_b      // comparator output, A > B
);
  always_comb begin
    a_gt_b = (a > b);
    min_o  = a_gt_b ? b : a;
  end
endmodule
