// nii_pkg: shared constants and types of the NII (next-iteration
// initialization) metric compression datapath.
//
// A turbo decoder using sliding windows keeps, at every window boundary, the
// final backward state metrics of one iteration to start the backward
// recursion of the same window in the next iteration. Instead of storing all
// K metrics, this design stores one compact word per boundary: the range
// (maximum minus minimum) of the K metrics, saturated to DP bits, and the
// indexes of the maximum and of the minimum state.
//
// The default numbers follow the LTE-advanced case the design targets:
// 8 trellis states, 12-bit state metrics, an 8-bit range, a 6144-bit code
// word decoded in 32-bit windows, two decoding phases (in-order and
// interleaved). With these numbers one compressed word is 8+3+3 = 14 bits
// and the whole NII store is 2*192*14 = 5376 bits.
package nii_pkg;

  // Number of trellis states per window boundary.
  localparam int unsigned K_STATES   = 8;
  // Bit-width d of one state metric (two's complement).
  localparam int unsigned D_METRIC   = 12;
  // Bit-width d' of the stored, saturated range.
  localparam int unsigned DP_RANGE   = 8;
  // Code word length n and sliding-window length w.
  localparam int unsigned N_CODE     = 6144;
  localparam int unsigned W_WINDOW   = 32;
  // Two decoding phases share the store: in-order and interleaved.
  localparam int unsigned N_PHASES   = 2;

  localparam int unsigned IDX_W      = $clog2(K_STATES);

  // Decoding phase of the word being stored or loaded.
  typedef enum logic {
    PHASE_IN_ORDER    = 1'b0,
    PHASE_INTERLEAVED = 1'b1
  } phase_e;

  // One compressed NII word at the default sizes: {range, IMAX, IMIN}.
  typedef struct packed {
    logic [DP_RANGE-1:0] delta;
    logic [IDX_W-1:0]    imax;
    logic [IDX_W-1:0]    imin;
  } nii_word_t;

endpackage
