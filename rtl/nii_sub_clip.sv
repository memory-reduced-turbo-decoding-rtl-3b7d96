// nii_sub_clip: the SUB/CLIP unit at the end of the range finder.
//
// Subtracts the minimum from the maximum of the K state metrics and saturates
// the difference to DP bits: ranges at or above 2**DP - 1 are all stored as
// 2**DP - 1. Saturating large ranges is what lets the range take fewer bits
// than one state metric.
//
// The difference of two D-bit signed numbers with max >= min lies in
// [0, 2**D - 1], so it is formed in D+1 bits and treated as unsigned. The
// unit assumes max_i >= min_i, which the range finder guarantees; the
// 'clipped' flag tells when saturation took place.
//
// Requires DP < D. Purely combinational.
module nii_sub_clip #(
  parameter int unsigned D  = nii_pkg::D_METRIC,         // metric width d
  parameter int unsigned DP = nii_pkg::DP_RANGE           // range width d'
) (
  input  logic signed [D-1:0]  max_i,
  input  logic signed [D-1:0]  min_i,
  output logic        [DP-1:0] delta_o,   // saturated range
  output logic                 clipped    // range did not fit in DP bits
);
  localparam logic [D:0] RANGE_MAX = (D+1)'((1 << DP) - 1);

  logic [D:0] diff;                       // max - min, non-negative
  always_comb begin
    diff    = {max_i[D-1], max_i} - {min_i[D-1], min_i};
    clipped = (diff > RANGE_MAX);
    delta_o = clipped ? '1 : diff[DP-1:0];
  end
endmodule
