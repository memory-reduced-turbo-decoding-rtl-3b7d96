// tb_nii_recovery: self-checking test of the recovery network.
// For every (IMAX, IMIN) pair, including IMAX == IMIN, and a set of ranges
// (0, 1, odd, even, full scale and random), checks that the IMAX state gets
// the range, the IMIN state gets 0 and every other state gets range / 2.
module tb_nii_recovery;
  localparam int K = 8, D = 12, DP = 8;
  localparam int IW = $clog2(K);
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [DP-1:0] delta;
  logic [IW-1:0] imax, imin;
  logic signed [D-1:0] beta [K];
  int checks = 0, failures = 0;

  nii_recovery #(.K(K), .D(D), .DP(DP)) dut (
    .delta_i(delta), .imax_i(imax), .imin_i(imin), .beta_o(beta));

  task automatic apply(int dl, int ix, int in_);
    int e;
    delta = DP'(dl); imax = IW'(ix); imin = IW'(in_);
    @(posedge clk);
    for (int s = 0; s < K; s++) begin
      if (s == ix)       e = dl;
      else if (s == in_) e = 0;
      else               e = dl / 2;
      checks++;
      if (int'(beta[s]) != e) begin
        failures++;
        $display("FAIL delta=%0d imax=%0d imin=%0d state %0d: %0d expected %0d", dl, ix, in_, s, beta[s], e);
      end
    end
  endtask

  initial begin
    int ranges [6];
    ranges = '{0, 1, 77, 128, (1 << DP) - 1, 0};
    for (int ix = 0; ix < K; ix++)
      for (int in_ = 0; in_ < K; in_++) begin
        ranges[5] = int'($urandom_range(0, (1 << DP) - 1));
        foreach (ranges[r]) apply(ranges[r], ix, in_);
      end
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
