// tb_nii_sub_clip: self-checking test of the SUB/CLIP unit.
// Drives max/min pairs with max >= min, including ranges just below, at and
// above the saturation limit 2**DP - 1 and the widest possible range, and
// compares the saturated range and the clip flag with integer arithmetic.
module tb_nii_sub_clip;
  localparam int D = 12, DP = 8;
  localparam int LIM = (1 << DP) - 1;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [D-1:0] mx, mn;
  logic [DP-1:0] delta;
  logic clipped;
  int checks = 0, failures = 0;

  nii_sub_clip #(.D(D), .DP(DP)) dut (.max_i(mx), .min_i(mn), .delta_o(delta), .clipped(clipped));

  task automatic apply(int imx, int imn);
    int r, e;
    mx = D'(imx); mn = D'(imn);
    @(posedge clk);
    r = imx - imn;
    e = (r > LIM) ? LIM : r;
    checks++;
    if (int'(delta) != e || clipped != (r > LIM)) begin
      failures++;
      $display("FAIL max=%0d min=%0d delta=%0d clipped=%0b", imx, imn, delta, clipped);
    end
  endtask

  initial begin
    int lo, hi, x, y;
    lo = -(1 << (D-1)); hi = (1 << (D-1)) - 1;
    apply(0, 0); apply(LIM - 1, 0); apply(LIM, 0); apply(LIM + 1, 0);
    apply(100, -155); apply(100, -156); apply(hi, lo); apply(lo, lo); apply(hi, hi);
    apply(-10, -300); apply(-3, -4);
    for (int i = 0; i < 2000; i++) begin
      x = int'($urandom_range(0, (1 << D) - 1)) + lo;
      y = (i % 2 == 0) ? x - int'($urandom_range(0, 2 * LIM)) : int'($urandom_range(0, (1 << D) - 1)) + lo;
      if (y < lo) y = lo;
      if (y > x) apply(y, x); else apply(x, y);
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
