// nii_memory: the NII metric memory.
//
// Holds one compressed word per window boundary and decoding phase. It is a
// simple dual-port RAM: one write port, one read port, both on the same
// clock. A read returns its word on the clock edge after the request
// (rd_valid_o marks it). A read of the address being written in the same
// cycle returns the old word (read-first). The array has no reset: only
// words written during the current decoding are read back, and words that
// were never written hold no meaning.
//
// Default size: 2 phases x 6144/32 windows = 384 words of 14 bits, 5376 bits,
// the storage budget of the compression scheme. Ports, latency and
// read-during-write behaviour are this design's choice.
module nii_memory #(
  parameter int unsigned DEPTH = nii_pkg::N_PHASES * nii_pkg::N_CODE / nii_pkg::W_WINDOW,
  parameter int unsigned WIDTH = nii_pkg::DP_RANGE + 2 * nii_pkg::IDX_W,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,         // clears rd_valid_o only
  input  logic             wr_en_i,
  input  logic [AW-1:0]    wr_addr_i,
  input  logic [WIDTH-1:0] wr_data_i,
  input  logic             rd_en_i,
  input  logic [AW-1:0]    rd_addr_i,
  output logic [WIDTH-1:0] rd_data_o,
  output logic             rd_valid_o
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en_i) mem[wr_addr_i] <= wr_data_i;
    if (rd_en_i) rd_data_o <= mem[rd_addr_i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_valid_o <= 1'b0;
    else        rd_valid_o <= rd_en_i;
  end

  // Addresses beyond the last word are a caller error.
  a_wr_addr: assert property (@(posedge clk) disable iff (!rst_n)
                              wr_en_i |-> (int'(wr_addr_i) < DEPTH));
  a_rd_addr: assert property (@(posedge clk) disable iff (!rst_n)
                              rd_en_i |-> (int'(rd_addr_i) < DEPTH));
endmodule
