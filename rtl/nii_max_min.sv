// nii_max_min: the MAX-MIN module of the range finder.
//
// One magnitude comparator (A > B, signed) drives two 2:1 multiplexers, so
// the pair {A, B} is sorted into its maximum and its minimum with a single
// comparison. The comparison result is brought out as well: the range finder
// collects these bits to form the indexes of the maximum and minimum state.
//
// Ties (A == B): the comparator answers 0, so MAX takes B and MIN takes A.
// This tie rule is this design's choice.
//
// Purely combinational.
module nii_max_min #(
  parameter int unsigned D = nii_pkg::D_METRIC           // metric width (two's complement)
) (
  input  logic signed [D-1:0] a,
  input  logic signed [D-1:0] b,
  output logic signed [D-1:0] max_o,      // MAX(A,B)
  output logic signed [D-1:0] min_o,      // MIN(A,B)
  output logic                a_gt_b      // comparator output, A > B
);
  always_comb begin
    a_gt_b = (a > b);
    max_o  = a_gt_b ? a : b;
    min_o  = a_gt_b ? b : a;
  end
endmodule
