// tb_nii_top: end-to-end test of the NII metric store at its default size
// (8 states, 12-bit metrics, 8-bit range, 6144-bit code, 32-bit windows:
// 192 windows per phase, 384 words).
//
// It plays the part of a sliding-window SISO decoder over ITER iterations.
// Each iteration runs the in-order phase and then the interleaved phase; in
// each phase the windows are visited in order. In cycle c of a phase the
// decoder loads the starting metrics of window c (from the previous
// iteration) and stores the final backward metrics of window c-2 for the
// next iteration, so loads and stores overlap as in a pipelined decoder.
// Random idle cycles are inserted. The first iteration has nothing to load.
//
// Reference: for every store the testbench computes the range, the index of
// the maximum (highest tied index) and of the minimum (lowest tied index)
// by a linear scan, saturates the range, and derives the recovered metrics
// (IMAX state: range, IMIN state: 0, others: range/2). Checked: the
// recovered metrics and the read-back word one cycle after each load, the
// one-cycle latency of ld_valid_o and of st_clipped_o, and the clip flag.
// Mechanisms counted, each of which must occur: saturated and unsaturated
// ranges, both phases, a load and a store in the same cycle, idle cycles.
module tb_nii_top;
  import nii_pkg::*;
  localparam int K = K_STATES, D = D_METRIC, DP = DP_RANGE;
  localparam int NW = N_CODE / W_WINDOW;
  localparam int IW = $clog2(K);
  localparam int WINW = $clog2(NW);
  localparam int LIM = (1 << DP) - 1;
  localparam int ITER = 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n;
  logic st_valid, ld_valid, ld_valid_o, st_clipped;
  phase_e st_phase, ld_phase;
  logic [WINW-1:0] st_win, ld_win;
  logic signed [D-1:0] st_beta [K];
  logic signed [D-1:0] ld_beta [K];
  logic [DP-1:0] ld_delta;
  logic [IW-1:0] ld_imax, ld_imin;

  nii_top dut (
    .clk(clk), .rst_n(rst_n),
    .st_valid_i(st_valid), .st_phase_i(st_phase), .st_win_i(st_win), .st_beta_i(st_beta),
    .st_clipped_o(st_clipped),
    .ld_valid_i(ld_valid), .ld_phase_i(ld_phase), .ld_win_i(ld_win),
    .ld_valid_o(ld_valid_o), .ld_beta_o(ld_beta),
    .ld_delta_o(ld_delta), .ld_imax_o(ld_imax), .ld_imin_o(ld_imin));

  // reference contents of the store, per phase and window
  nii_word_t ref_word [2][NW];

  int checks = 0, failures = 0;
  int n_clip = 0, n_noclip = 0, n_ld_inorder = 0, n_ld_interleaved = 0;
  int n_overlap = 0, n_idle = 0, n_loads = 0, n_stores = 0;

  function automatic int rnd(int lo, int hi);
    return lo + int'($urandom_range(0, hi - lo));
  endfunction

  // Reference compression of one set of metrics.
  function automatic nii_word_t compress(input logic signed [D-1:0] b [K], output bit clip);
    int vmax, vmin, emax, emin, r;
    nii_word_t w;
    vmax = int'(b[0]); vmin = int'(b[0]); emax = 0; emin = 0;
    for (int s = 1; s < K; s++) begin
      if (int'(b[s]) >= vmax) begin vmax = int'(b[s]); emax = s; end
      if (int'(b[s]) <  vmin) begin vmin = int'(b[s]); emin = s; end
    end
    r    = vmax - vmin;
    clip = (r > LIM);
    w.delta = DP'(clip ? LIM : r);
    w.imax  = IW'(emax);
    w.imin  = IW'(emin);
    return w;
  endfunction

  // Final backward metrics of one window, state 0 normalised to 0 most of
  // the time; one window in four spreads over the full metric range.
  task automatic make_metrics(output logic signed [D-1:0] b [K]);
    int spread;
    spread = (rnd(0, 3) == 0) ? (1 << (D-1)) - 1 : rnd(1, LIM);
    for (int s = 0; s < K; s++) b[s] = D'(rnd(-spread, spread) / 2);
    if (rnd(0, 3) != 0) begin
      for (int s = 1; s < K; s++) b[s] = D'(int'(b[s]) - int'(b[0]));
      b[0] = '0;
    end
  endtask

  // state of the previous cycle, checked after the clock edge
  bit        prev_ld, prev_st, prev_clip;
  nii_word_t prev_exp;

  task automatic check_outputs();
    int e;
    checks++;
    if (ld_valid_o != prev_ld || st_clipped != (prev_st && prev_clip)) begin
      failures++;
      $display("FAIL latency: ld_valid_o=%0b expected %0b, st_clipped_o=%0b expected %0b",
               ld_valid_o, prev_ld, st_clipped, prev_st && prev_clip);
    end
    if (prev_ld) begin
      checks++;
      if (ld_delta != prev_exp.delta || ld_imax != prev_exp.imax || ld_imin != prev_exp.imin) begin
        failures++;
        $display("FAIL word: %0d/%0d/%0d expected %0d/%0d/%0d", ld_delta, ld_imax, ld_imin,
                 prev_exp.delta, prev_exp.imax, prev_exp.imin);
      end
      for (int s = 0; s < K; s++) begin
        if (s == int'(prev_exp.imax))      e = int'(prev_exp.delta);
        else if (s == int'(prev_exp.imin)) e = 0;
        else                               e = int'(prev_exp.delta) / 2;
        checks++;
        if (int'(ld_beta[s]) != e) begin
          failures++;
          $display("FAIL recovered state %0d: %0d expected %0d", s, ld_beta[s], e);
        end
      end
    end
  endtask

  initial begin
    logic signed [D-1:0] b [K];
    bit clip;
    int c;
    rst_n = 1'b0;
    st_valid = 1'b0; ld_valid = 1'b0;
    st_phase = PHASE_IN_ORDER; ld_phase = PHASE_IN_ORDER;
    st_win = '0; ld_win = '0;
    foreach (st_beta[s]) st_beta[s] = '0;
    prev_ld = 1'b0; prev_st = 1'b0; prev_clip = 1'b0; prev_exp = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int it = 0; it < ITER; it++) begin
      for (int ph = 0; ph < 2; ph++) begin
        c = 0;
        while (c < NW + 2) begin
          // drive this cycle's requests
          if (rnd(0, 15) == 0) begin
            st_valid = 1'b0; ld_valid = 1'b0;
            n_idle++;
          end else begin
            ld_valid = (it > 0) && (c < NW);
            ld_phase = phase_e'(ph);
            ld_win   = WINW'(c < NW ? c : 0);
            st_valid = (c >= 2);
            st_phase = phase_e'(ph);
            st_win   = WINW'(c >= 2 ? c - 2 : 0);
            c++;
          end
          prev_ld = ld_valid;
          if (ld_valid) begin
            prev_exp = ref_word[ph][int'(ld_win)];
            n_loads++;
            if (ph == 0) n_ld_inorder++; else n_ld_interleaved++;
          end
          prev_st = st_valid;
          if (st_valid) begin
            make_metrics(b);
            foreach (st_beta[s]) st_beta[s] = b[s];
            ref_word[ph][int'(st_win)] = compress(b, clip);
            prev_clip = clip;
            n_stores++;
            if (clip) n_clip++; else n_noclip++;
          end
          if (st_valid && ld_valid) n_overlap++;
          @(posedge clk);
          #1 check_outputs();
        end
      end
    end
    st_valid = 1'b0; ld_valid = 1'b0; prev_ld = 1'b0; prev_st = 1'b0;
    @(posedge clk);
    #1 check_outputs();

    $display("coverage: stores=%0d loads=%0d saturated=%0d unsaturated=%0d in_order_loads=%0d interleaved_loads=%0d overlapped=%0d idle=%0d",
             n_stores, n_loads, n_clip, n_noclip, n_ld_inorder, n_ld_interleaved, n_overlap, n_idle);
    if (n_clip == 0)           begin failures++; $display("FAIL no saturated range"); end
    if (n_noclip == 0)         begin failures++; $display("FAIL no unsaturated range"); end
    if (n_ld_inorder == 0)     begin failures++; $display("FAIL no in-order load"); end
    if (n_ld_interleaved == 0) begin failures++; $display("FAIL no interleaved load"); end
    if (n_overlap == 0)        begin failures++; $display("FAIL no overlapped load/store"); end
    if (n_idle == 0)           begin failures++; $display("FAIL no idle cycle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
