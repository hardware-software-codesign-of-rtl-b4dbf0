// Output private local memory: DEPTH entries of WIDTH (64) bits.
//
// The computational unit uses one read port (to fetch a previous partial sum
// when accumulating across runs) and one write port (to store a finished
// accumulator). The memory interface reads a 64-bit entry as two 32-bit
// halves: dma_rd_hi = 0 returns bits [31:0], 1 returns bits [63:32], so an
// output leaves as two consecutive DMA words, low half first.
// All reads are synchronous (data valid the cycle after the enable and held
// until the next enable); a write and a read of the same entry in one cycle
// return the old value. Contents are not reset.
// Size (32 x 64 bit) and the split 32-bit read follow the published design;
// giving the core separate read and write ports is this design's choice.
module plm_output #(
  parameter int DEPTH = 32,
  parameter int WIDTH = 64,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic                 clk,
  // computational unit
  input  logic                 core_rd_en,
  input  logic [AW-1:0]        core_rd_addr,
  output logic [WIDTH-1:0]     core_rd_data,
  input  logic                 core_wr_en,
  input  logic [AW-1:0]        core_wr_addr,
  input  logic [WIDTH-1:0]     core_wr_data,
  // memory interface
  input  logic                 dma_rd_en,
  input  logic [AW-1:0]        dma_rd_addr,
  input  logic                 dma_rd_hi,
  output logic [WIDTH/2-1:0]   dma_rd_data
);

  logic [WIDTH-1:0] ram [DEPTH];

  always_ff @(posedge clk) begin
    if (core_wr_en) ram[core_wr_addr] <= core_wr_data;
    if (core_rd_en) core_rd_data <= ram[core_rd_addr];
    if (dma_rd_en)
      dma_rd_data <= dma_rd_hi ? ram[dma_rd_addr][WIDTH-1:WIDTH/2]
                               : ram[dma_rd_addr][WIDTH/2-1:0];
  end

endmodule
