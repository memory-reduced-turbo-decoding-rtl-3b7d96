// nii_compressor: NII metric compression of one window boundary.
//
// Input: the K final backward state metrics of a sliding window. Output: the
// range of the metrics (maximum minus minimum, saturated to DP bits) and the
// indexes IMAX and IMIN of the maximum and minimum states. Those three fields
// are all that is kept for the next iteration.
//
// Comparators are shared between the search for the maximum and the search
// for the minimum:
//   level 1  K/2 MAX-MIN modules sort the pairs (0,1), (2,3), ...; each uses
//            one comparator for both the pair's maximum and its minimum,
//   then     a tree of K/2-1 MAX modules over the pair maxima and a tree of
//            K/2-1 MIN modules over the pair minima,
//   last     the SUB/CLIP unit forms the saturated range.
// For K = 8 this is 4 MAX-MIN, 2+1 MAX, 2+1 MIN: 10 comparators, against 14
// for two independent searches. The upper operand A of every module comes
// from the lower state numbers.
//
// IMAX and IMIN are not computed separately: every tree node passes on the
// index of the operand its comparator chose, so the indexes are built from
// the comparison results already made. On equal metrics IMAX names the
// highest and IMIN the lowest of the tied states (tie rule of this design).
//
// The whole unit is combinational; a register stage, where needed, belongs to
// the surrounding logic. K must be a power of two, at least 2, and DP < D.
module nii_compressor #(
  parameter int unsigned K  = nii_pkg::K_STATES,          // trellis states
  parameter int unsigned D  = nii_pkg::D_METRIC,         // metric width d
  parameter int unsigned DP = nii_pkg::DP_RANGE,          // range width d'
  localparam int unsigned IW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned H  = K / 2      // pairs, i.e. MAX-MIN modules
) (
  input  logic signed [D-1:0]  beta_i [K],   // final backward state metrics
  output logic        [DP-1:0] delta_o,      // saturated range
  output logic        [IW-1:0] imax_o,       // index of the maximum state
  output logic        [IW-1:0] imin_o,       // index of the minimum state
  output logic                 clipped_o     // range was saturated
);
  // Heap-ordered trees: node n has children 2n (operand A) and 2n+1
  // (operand B); leaves H .. 2H-1 are the outputs of the MAX-MIN modules and
  // node 1 is the root. Entry 0 is unused.
  logic signed [D-1:0]  mx_v [2*H];
  logic signed [D-1:0]  mn_v [2*H];
  logic        [IW-1:0] mx_i [2*H];
  logic        [IW-1:0] mn_i [2*H];

  assign mx_v[0] = '0;
  assign mn_v[0] = '0;
  assign mx_i[0] = '0;
  assign mn_i[0] = '0;

  for (genvar j = 0; j < H; j++) begin : g_pair
    logic gt;
    nii_max_min #(.D(D)) u_max_min (
      .a      (beta_i[2*j]),
      .b      (beta_i[2*j+1]),
      .max_o  (mx_v[H+j]),
      .min_o  (mn_v[H+j]),
      .a_gt_b (gt)
    );
    assign mx_i[H+j] = gt ? IW'(2*j) : IW'(2*j+1);
    assign mn_i[H+j] = gt ? IW'(2*j+1) : IW'(2*j);
  end

  for (genvar n = 1; n < H; n++) begin : g_node
    logic gt_mx, gt_mn;
    nii_max #(.D(D)) u_max (
      .a      (mx_v[2*n]),
      .b      (mx_v[2*n+1]),
      .max_o  (mx_v[n]),
      .a_gt_b (gt_mx)
    );
    nii_min #(.D(D)) u_min (
      .a      (mn_v[2*n]),
      .b      (mn_v[2*n+1]),
      .min_o  (mn_v[n]),
      .a_gt_b (gt_mn)
    );
    assign mx_i[n] = gt_mx ? mx_i[2*n] : mx_i[2*n+1];
    assign mn_i[n] = gt_mn ? mn_i[2*n+1] : mn_i[2*n];
  end

  nii_sub_clip #(.D(D), .DP(DP)) u_sub_clip (
    .max_i   (mx_v[1]),
    .min_i   (mn_v[1]),
    .delta_o (delta_o),
    .clipped (clipped_o)
  );

  assign imax_o = mx_i[1];
  assign imin_o = mn_i[1];
endmodule
