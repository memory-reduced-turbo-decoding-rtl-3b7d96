// tb_nii_min: self-checking test of the MIN module.
// Drives corner pairs (equal, extremes of the two's-complement range) and
// random pairs, and compares the minimum and the comparator bit with values
// computed here from plain integer arithmetic. A watchdog ends the run.
module tb_nii_min;
  localparam int D = 12;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [D-1:0] a, b, mn;
  logic gt;
  int checks = 0, failures = 0;

  nii_min #(.D(D)) dut (.a(a), .b(b), .min_o(mn), .a_gt_b(gt));

  task automatic apply(int ia, int ib);
    int emn;
    a = D'(ia); b = D'(ib);
    @(posedge clk);
    emn = (ia > ib) ? ib : ia;
    checks++;
    if (int'(mn) != emn || gt != (ia > ib)) begin
      failures++;
      $display("FAIL a=%0d b=%0d min=%0d gt=%0b", ia, ib, mn, gt);
    end
  endtask

  initial begin
    int lo, hi;
    lo = -(1 << (D-1)); hi = (1 << (D-1)) - 1;
    apply(0, 0); apply(5, -5); apply(-5, 5); apply(lo, hi); apply(hi, lo);
    apply(lo, lo); apply(hi, hi); apply(-1, 0); apply(0, -1);
    for (int i = 0; i < 2000; i++)
      apply(int'($urandom_range(0, (1 << D) - 1)) + lo, int'($urandom_range(0, (1 << D) - 1)) + lo);
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
