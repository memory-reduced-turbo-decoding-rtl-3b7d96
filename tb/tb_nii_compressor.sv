// tb_nii_compressor: self-checking test of the NII metric compressor.
// A reference model here scans the K metrics linearly (not as a tree) for the
// maximum, the minimum, the highest index holding the maximum and the lowest
// index holding the minimum, and saturates max - min to DP bits. Stimuli:
// all-equal metrics, a single outlier in every position, the normalised case
// with state 0 held at 0, narrow random ranges (no saturation), full-range
// random metrics (saturation) and many ties. Both saturation outcomes must
// occur, or the test fails.
module tb_nii_compressor;
  localparam int K = 8, D = 12, DP = 8;
  localparam int IW = $clog2(K);
  localparam int LIM = (1 << DP) - 1;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [D-1:0] beta [K];
  logic [DP-1:0] delta;
  logic [IW-1:0] imax, imin;
  logic clipped;
  int checks = 0, failures = 0, n_clip = 0, n_noclip = 0;

  nii_compressor #(.K(K), .D(D), .DP(DP)) dut (
    .beta_i(beta), .delta_o(delta), .imax_o(imax), .imin_o(imin), .clipped_o(clipped));

  task automatic check();
    int vmax, vmin, emax, emin, r, e;
    @(posedge clk);
    vmax = int'(beta[0]); vmin = int'(beta[0]); emax = 0; emin = 0;
    for (int s = 1; s < K; s++) begin
      if (int'(beta[s]) >= vmax) begin vmax = int'(beta[s]); emax = s; end
      if (int'(beta[s]) <  vmin) begin vmin = int'(beta[s]); emin = s; end
    end
    r = vmax - vmin;
    e = (r > LIM) ? LIM : r;
    if (r > LIM) n_clip++; else n_noclip++;
    checks++;
    if (int'(delta) != e || int'(imax) != emax || int'(imin) != emin || clipped != (r > LIM)) begin
      failures++;
      $display("FAIL delta=%0d/%0d imax=%0d/%0d imin=%0d/%0d", delta, e, imax, emax, imin, emin);
    end
  endtask

  function automatic int rnd(int lo, int hi);
    return lo + int'($urandom_range(0, hi - lo));
  endfunction

  initial begin
    int base;
    foreach (beta[s]) beta[s] = '0;
    check();
    for (int p = 0; p < K; p++) begin
      foreach (beta[s]) beta[s] = D'(-20);
      beta[p] = D'(37);  check();
      beta[p] = D'(-900); check();
    end
    for (int i = 0; i < 3000; i++) begin
      case (i % 4)
        0: begin                      // normalised, narrow range
             beta[0] = '0;
             for (int s = 1; s < K; s++) beta[s] = D'(rnd(-120, 120));
           end
        1: begin                      // full width
             foreach (beta[s]) beta[s] = D'(rnd(-(1 << (D-1)), (1 << (D-1)) - 1));
           end
        2: begin                      // ties: only a few distinct values
             base = rnd(-1000, 1000);
             foreach (beta[s]) beta[s] = D'(base + 100 * rnd(0, 3));
           end
        default: begin                // ranges around the saturation limit
             base = rnd(-1500, 1200);
             foreach (beta[s]) beta[s] = D'(base + rnd(0, LIM + 4));
           end
      endcase
      check();
    end
    if (n_clip == 0 || n_noclip == 0) begin
      failures++;
      $display("FAIL saturation coverage clip=%0d noclip=%0d", n_clip, n_noclip);
    end
    $display("coverage: saturated=%0d not_saturated=%0d", n_clip, n_noclip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
