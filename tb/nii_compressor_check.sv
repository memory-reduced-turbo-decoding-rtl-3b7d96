// nii_compressor_check: testbench helper that checks one nii_compressor and
// one nii_recovery of a given size.
//
// After start_i rises it applies NVEC random metric vectors (values drawn
// from a few narrow or wide spreads, so that ties and saturation both
// appear), compares range, IMAX, IMIN and the clip flag with a linear-scan
// reference model, feeds the reference word through nii_recovery and checks
// every recovered metric, then raises done_o. One vector per clock cycle.
module nii_compressor_check #(
  parameter int K    = 4,
  parameter int D    = 10,
  parameter int DP   = 6,
  parameter int NVEC = 1000
) (
  input  logic clk,
  input  logic start_i,
  output logic done_o,
  output int   checks_o,
  output int   failures_o,
  output int   clips_o
);
  localparam int IW  = (K > 1) ? $clog2(K) : 1;
  localparam int LIM = (1 << DP) - 1;

  logic signed [D-1:0] beta [K];
  logic signed [D-1:0] rec  [K];
  logic [DP-1:0] delta;
  logic [IW-1:0] imax, imin;
  logic clipped;

  nii_compressor #(.K(K), .D(D), .DP(DP)) u_cmp (
    .beta_i(beta), .delta_o(delta), .imax_o(imax), .imin_o(imin), .clipped_o(clipped));
  nii_recovery #(.K(K), .D(D), .DP(DP)) u_rec (
    .delta_i(delta), .imax_i(imax), .imin_i(imin), .beta_o(rec));

  initial begin
    int vmax, vmin, emax, emin, r, e, spread, lo;
    done_o = 1'b0; checks_o = 0; failures_o = 0; clips_o = 0;
    foreach (beta[s]) beta[s] = '0;
    lo = -(1 << (D-1));
    wait (start_i);
    for (int v = 0; v < NVEC; v++) begin
      case (v % 3)
        0:       spread = 3;
        1:       spread = LIM;
        default: spread = (1 << D) - 1;
      endcase
      foreach (beta[s]) beta[s] = D'(lo + int'($urandom_range(0, spread)) + ((v % 3 == 2) ? 0 : (1 << (D-2))));
      @(posedge clk);
      vmax = int'(beta[0]); vmin = int'(beta[0]); emax = 0; emin = 0;
      for (int s = 1; s < K; s++) begin
        if (int'(beta[s]) >= vmax) begin vmax = int'(beta[s]); emax = s; end
        if (int'(beta[s]) <  vmin) begin vmin = int'(beta[s]); emin = s; end
      end
      r = vmax - vmin;
      if (r > LIM) clips_o++;
      e = (r > LIM) ? LIM : r;
      checks_o++;
      if (int'(delta) != e || int'(imax) != emax || int'(imin) != emin || clipped != (r > LIM)) begin
        failures_o++;
        $display("FAIL K=%0d: delta=%0d/%0d imax=%0d/%0d imin=%0d/%0d", K, delta, e, imax, emax, imin, emin);
      end
      for (int s = 0; s < K; s++) begin
        checks_o++;
        if (int'(rec[s]) != ((s == emax) ? e : (s == emin) ? 0 : e / 2)) begin
          failures_o++;
          $display("FAIL K=%0d: recovered state %0d = %0d", K, s, rec[s]);
        end
      end
    end
    done_o = 1'b1;
  end
endmodule
