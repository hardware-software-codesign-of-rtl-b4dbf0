// Interleaved private local memory (PLM) for input activations or weights.
//
// DEPTH lines of WIDTH bits are spread over BANKS single-port-read RAM banks:
// line i lives in bank (i mod BANKS), row (i / BANKS). This lets the memory
//   - take one 32-bit DMA word per cycle as two 16-bit lines written together
//     (line wr_line gets wr_data[15:0], line wr_line+1 gets wr_data[31:16];
//     wr_line must be even), and
//   - deliver BANKS consecutive lines per cycle, starting at any line: every
//     bank computes its own row address, and the bank outputs are rotated so
//     that rd_data[j] is line rd_line + j (wrapping at DEPTH).
// Reads are synchronous: rd_data is valid the cycle after rd_en and holds its
// value until the next rd_en. Contents are not reset.
// The sizes (256 input lines, 8192 weight lines, 64 banks, 16-bit lines) and
// the even/odd dual write port are the published ones; the per-bank address
// and output rotation are how this design meets the 64-read-port requirement.
module plm_interleaved #(
  parameter int DEPTH = 256,
  parameter int BANKS = 64,
  parameter int WIDTH = 16,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic                          clk,
  // write port (from the memory interface)
  input  logic                          wr_en,
  input  logic [AW-1:0]                 wr_line,
  input  logic [2*WIDTH-1:0]            wr_data,
  // wide read port (to the computational unit)
  input  logic                          rd_en,
  input  logic [AW-1:0]                 rd_line,
  output logic [BANKS-1:0][WIDTH-1:0]   rd_data
);

  localparam int BW   = $clog2(BANKS);
  localparam int ROWS = DEPTH / BANKS;
  localparam int RW   = (ROWS > 1) ? $clog2(ROWS) : 1;

  logic [BW-1:0]                 rd_shift, rd_shift_q;
  logic [RW-1:0]                 rd_row;
  logic [RW-1:0]                 wr_row;
  logic [BANKS-1:0][WIDTH-1:0]   bank_q;

  assign rd_shift = rd_line[BW-1:0];
  assign rd_row   = RW'(rd_line >> BW);
  assign wr_row   = RW'(wr_line >> BW);

  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    logic [WIDTH-1:0] ram [ROWS];
    logic [RW-1:0]    row;

    // banks below the start bank hold lines of the next row
    assign row = rd_row + RW'(b < int'(rd_shift));

    always_ff @(posedge clk) begin
      if (wr_en && (wr_line[BW-1:1] == (BW-1)'(b >> 1)))
        ram[wr_row] <= (b % 2 == 1) ? wr_data[2*WIDTH-1:WIDTH] : wr_data[WIDTH-1:0];
      if (rd_en)
        bank_q[b] <= ram[row];
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_shift_q <= rd_shift;
  end

  // rotate bank outputs so that lane j carries line rd_line + j
  always_comb begin
    for (int j = 0; j < BANKS; j++)
      rd_data[j] = bank_q[BW'(int'(rd_shift_q) + j)];
  end

  // the dual write port covers an even/odd pair of lines
  a_wr_even: assert property (@(posedge clk) wr_en |-> !wr_line[0]);

  initial begin
    assert (DEPTH % BANKS == 0 && BANKS % 2 == 0 && BANKS == (1 << BW))
      else $error("DEPTH must be a multiple of BANKS, BANKS an even power of two");
  end

endmodule
