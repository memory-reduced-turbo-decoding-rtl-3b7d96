// nii_top: NII metric store of a sliding-window turbo decoder.
//
// Sits beside the SISO decoder. At the end of each window's backward
// recursion the decoder hands over the K final backward state metrics of
// that window (store side). The compressor reduces them to one word
// {range, IMAX, IMIN} which is written to the NII memory at the address of
// the window and decoding phase. When the decoder starts the backward
// recursion of the same window and phase in the next iteration it requests
// the word (load side) and receives K recovered starting metrics.
//
// Address map: in-order phase words at 0 .. NW-1, interleaved phase words
// at NW .. 2*NW-1, with NW = N/W windows.
//
// Timing:
//   store  st_valid_i with st_beta_i in cycle t; the compressor output is
//          registered at the end of t and written to memory at the end of
//          t+1. st_clipped_o (registered) reports in t+1 whether the range
//          was saturated. One store may be issued every cycle.
//   load   ld_valid_i in cycle t; ld_valid_o and ld_beta_o in cycle t+1.
//          One load may be issued every cycle. A load must come at least two
//          cycles after the store of the same word; a load in the cycle the
//          word is being written returns the previous contents.
// The compressed word read back is also brought out (ld_delta_o, ld_imax_o,
// ld_imin_o) for observation.
//
// The split into compressor, NII memory and recovery network, and the field
// sizes, follow the memory-reduced compression scheme; the register stage on
// the store side, the address map and the handshake are this design's own.
module nii_top
  import nii_pkg::*;
#(
  parameter int unsigned K  = K_STATES,
  parameter int unsigned D  = D_METRIC,
  parameter int unsigned DP = DP_RANGE,
  parameter int unsigned N  = N_CODE,
  parameter int unsigned W  = W_WINDOW,
  localparam int unsigned IW    = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned NW    = N / W,
  localparam int unsigned WINW  = (NW > 1) ? $clog2(NW) : 1,
  localparam int unsigned DEPTH = N_PHASES * NW,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned WORDW = DP + 2 * IW
) (
  input  logic                clk,
  input  logic                rst_n,
  // store side: final backward metrics of one window
  input  logic                st_valid_i,
  input  phase_e              st_phase_i,
  input  logic [WINW-1:0]     st_win_i,
  input  logic signed [D-1:0] st_beta_i [K],
  output logic                st_clipped_o,
  // load side: starting metrics for one window
  input  logic                ld_valid_i,
  input  phase_e              ld_phase_i,
  input  logic [WINW-1:0]     ld_win_i,
  output logic                ld_valid_o,
  output logic signed [D-1:0] ld_beta_o [K],
  output logic [DP-1:0]       ld_delta_o,
  output logic [IW-1:0]       ld_imax_o,
  output logic [IW-1:0]       ld_imin_o
);
  function automatic logic [AW-1:0] word_addr(phase_e ph, logic [WINW-1:0] win);
    return (ph == PHASE_INTERLEAVED) ? AW'(win) + AW'(NW) : AW'(win);
  endfunction

  // ---------------- store side ----------------
  logic [DP-1:0]    c_delta;
  logic [IW-1:0]    c_imax, c_imin;
  logic             c_clip;

  nii_compressor #(.K(K), .D(D), .DP(DP)) u_compressor (
    .beta_i    (st_beta_i),
    .delta_o   (c_delta),
    .imax_o    (c_imax),
    .imin_o    (c_imin),
    .clipped_o (c_clip)
  );

  logic             wr_en;
  logic [AW-1:0]    wr_addr;
  logic [WORDW-1:0] wr_word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_en        <= 1'b0;
      wr_addr      <= '0;
      wr_word      <= '0;
      st_clipped_o <= 1'b0;
    end else begin
      wr_en        <= st_valid_i;
      st_clipped_o <= st_valid_i & c_clip;
      if (st_valid_i) begin
        wr_addr <= word_addr(st_phase_i, st_win_i);
        wr_word <= {c_delta, c_imax, c_imin};
      end
    end
  end

  // ---------------- NII memory ----------------
  logic [WORDW-1:0] rd_word;

  nii_memory #(.DEPTH(DEPTH), .WIDTH(WORDW)) u_memory (
    .clk        (clk),
    .rst_n      (rst_n),
    .wr_en_i    (wr_en),
    .wr_addr_i  (wr_addr),
    .wr_data_i  (wr_word),
    .rd_en_i    (ld_valid_i),
    .rd_addr_i  (word_addr(ld_phase_i, ld_win_i)),
    .rd_data_o  (rd_word),
    .rd_valid_o (ld_valid_o)
  );

  // ---------------- load side ----------------
  assign {ld_delta_o, ld_imax_o, ld_imin_o} = rd_word;

  nii_recovery #(.K(K), .D(D), .DP(DP)) u_recovery (
    .delta_i (ld_delta_o),
    .imax_i  (ld_imax_o),
    .imin_i  (ld_imin_o),
    .beta_o  (ld_beta_o)
  );

  a_st_win: assert property (@(posedge clk) disable iff (!rst_n)
                             st_valid_i |-> (int'(st_win_i) < NW));
  a_ld_win: assert property (@(posedge clk) disable iff (!rst_n)
                             ld_valid_i |-> (int'(ld_win_i) < NW));
endmodule
