// nii_recovery: recovery network for compressed NII metrics.
//
// Rebuilds K starting metrics for a backward recursion from one compressed
// word {range, IMAX, IMIN}. Every output is a multiplexer over three values
// that need no arithmetic:
//   state IMAX         -> range                (most reliable state)
//   state IMIN         -> 0                    (least reliable state)
//   every other state  -> range / 2            (a wired right shift)
// The max-log-MAP recursion depends only on differences of state metrics,
// so anchoring the minimum at 0 instead of the decoder's own normalisation
// changes nothing downstream. The outputs are D-bit two's complement values,
// zero-extended from the DP-bit range.
//
// The recovered value of the states that are neither maximum nor minimum is
// this design's choice: only the range and the two indexes are stored, so
// those states keep no value of their own. IMAX takes priority should IMAX
// and IMIN ever be equal (only possible when the range is 0, where all
// outputs are 0 anyway).
//
// Purely combinational. Requires DP < D.
module nii_recovery #(
  parameter int unsigned K  = nii_pkg::K_STATES,          // trellis states
  parameter int unsigned D  = nii_pkg::D_METRIC,         // metric width d
  parameter int unsigned DP = nii_pkg::DP_RANGE,          // range width d'
  localparam int unsigned IW = (K > 1) ? $clog2(K) : 1
) (
  input  logic        [DP-1:0] delta_i,       // stored range
  input  logic        [IW-1:0] imax_i,        // index of the maximum state
  input  logic        [IW-1:0] imin_i,        // index of the minimum state
  output logic signed [D-1:0]  beta_o [K]     // recovered starting metrics
);
  logic signed [D-1:0] v_max, v_mid;

  assign v_max = D'(delta_i);
  assign v_mid = D'(delta_i >> 1);

  for (genvar s = 0; s < K; s++) begin : g_state
    always_comb begin
      if (imax_i == IW'(s))      beta_o[s] = v_max;
      else if (imin_i == IW'(s)) beta_o[s] = '0;
      else                       beta_o[s] = v_mid;
    end
  end
endmodule
