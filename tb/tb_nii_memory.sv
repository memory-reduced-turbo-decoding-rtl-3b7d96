// tb_nii_memory: self-checking test of the NII memory at its full size.
// Writes every address with a random word, then reads every address back in
// a random order, one read per cycle, checking the data and that rd_valid_o
// follows rd_en_i by exactly one cycle. It also reads an address in the very
// cycle it is rewritten and expects the old word (read-first), then the new
// word on the next read. A shadow array in the testbench is the reference.
module tb_nii_memory;
  localparam int DEPTH = 384, WIDTH = 14;
  localparam int AW = $clog2(DEPTH);
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n;
  logic wr_en, rd_en, rd_valid;
  logic [AW-1:0] wr_addr, rd_addr;
  logic [WIDTH-1:0] wr_data, rd_data;
  logic [WIDTH-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  nii_memory #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (
    .clk(clk), .rst_n(rst_n), .wr_en_i(wr_en), .wr_addr_i(wr_addr), .wr_data_i(wr_data),
    .rd_en_i(rd_en), .rd_addr_i(rd_addr), .rd_data_o(rd_data), .rd_valid_o(rd_valid));

  task automatic expect_word(logic [WIDTH-1:0] e, string what);
    checks++;
    if (!rd_valid || rd_data !== e) begin
      failures++;
      $display("FAIL %s: valid=%0b data=%h expected %h", what, rd_valid, rd_data, e);
    end
  endtask

  initial begin
    int order [DEPTH];
    int tmp, j;
    logic [WIDTH-1:0] old_w, new_w;
    rst_n = 1'b0; wr_en = 1'b0; rd_en = 1'b0; wr_addr = '0; rd_addr = '0; wr_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    checks++;
    if (rd_valid) begin failures++; $display("FAIL rd_valid set after reset"); end
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      shadow[a] = WIDTH'($urandom);
      wr_en <= 1'b1; wr_addr <= AW'(a); wr_data <= shadow[a];
      @(posedge clk);
    end
    wr_en <= 1'b0;
    // read back in shuffled order, back to back
    foreach (order[i]) order[i] = i;
    for (int i = DEPTH - 1; i > 0; i--) begin
      j = int'($urandom_range(0, i)); tmp = order[i]; order[i] = order[j]; order[j] = tmp;
    end
    for (int i = 0; i < DEPTH; i++) begin
      rd_en <= 1'b1; rd_addr <= AW'(order[i]);
      @(posedge clk);
      #1 expect_word(shadow[order[i]], "read back");
    end
    rd_en <= 1'b0;
    @(posedge clk);
    #1;
    checks++;
    if (rd_valid) begin failures++; $display("FAIL rd_valid stays high after reads"); end
    // read during write of the same address
    old_w = shadow[17];
    new_w = ~old_w;
    @(posedge clk);
    wr_en <= 1'b1; wr_addr <= AW'(17); wr_data <= new_w;
    rd_en <= 1'b1; rd_addr <= AW'(17);
    @(posedge clk);
    wr_en <= 1'b0;
    #1 expect_word(old_w, "read-first");
    @(posedge clk);
    rd_en <= 1'b0;
    #1 expect_word(new_w, "after write");
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
