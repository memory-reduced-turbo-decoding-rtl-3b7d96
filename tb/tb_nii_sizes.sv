// tb_nii_sizes: checks the compressor and the recovery network at state
// counts other than the default eight: K = 2 (a single MAX-MIN module), 4 and
// 16 (a four-level tree), at several metric and range widths. Each size runs
// in its own nii_compressor_check instance against a linear-scan reference;
// every size must also produce at least one saturated range.
module tb_nii_sizes;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0;
  logic done [3];
  int c [3], f [3], cl [3];
  int checks = 0, failures = 0;

  nii_compressor_check #(.K(2),  .D(8),  .DP(5)) u_k2  (
    .clk(clk), .start_i(start), .done_o(done[0]), .checks_o(c[0]), .failures_o(f[0]), .clips_o(cl[0]));
  nii_compressor_check #(.K(4),  .D(10), .DP(6)) u_k4  (
    .clk(clk), .start_i(start), .done_o(done[1]), .checks_o(c[1]), .failures_o(f[1]), .clips_o(cl[1]));
  nii_compressor_check #(.K(16), .D(14), .DP(9)) u_k16 (
    .clk(clk), .start_i(start), .done_o(done[2]), .checks_o(c[2]), .failures_o(f[2]), .clips_o(cl[2]));

  initial begin
    repeat (2) @(posedge clk);
    start = 1'b1;
    wait (done[0] && done[1] && done[2]);
    for (int i = 0; i < 3; i++) begin
      checks   += c[i];
      failures += f[i];
      if (cl[i] == 0) begin failures++; $display("FAIL size %0d never saturated", i); end
    end
    $display("saturated ranges per size: K2=%0d K4=%0d K16=%0d", cl[0], cl[1], cl[2]);
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
