// Array of PE_NUM sum-together multipliers followed by an adder plane.
//
// Every lane multiplies one 16-bit weight line by one 16-bit input line with an
// st_multiplier (so each lane performs 1, 2 or 4 MACs depending on cfg); a
// balanced binary adder tree then reduces the PE_NUM 32-bit lane results to one
// sum of 32 + log2(PE_NUM) bits. Lanes whose lane_en bit is low contribute
// zero, which lets the controller run a partial last chunk of an input vector.
// The 64-lane width and the adder plane are the published architecture; the
// tree shape and lane masking are this design's choices. Fully combinational:
// the caller registers the sum. PE_NUM must be a power of two.
module st_mac_array
  import fc_pkg::*;
#(
  parameter int PE_NUM = 64,
  localparam int SUM_W = PROD_WIDTH + $clog2(PE_NUM)
) (
  input  logic [2:0]                  cfg,
  input  logic [PE_NUM-1:0]           lane_en,
  input  logic [PE_NUM-1:0][15:0]     w,
  input  logic [PE_NUM-1:0][15:0]     x,
  output logic signed [SUM_W-1:0]     sum
);

  localparam int LEVELS = $clog2(PE_NUM);

  logic [PE_NUM-1:0][31:0] prod;

  for (genvar i = 0; i < PE_NUM; i++) begin : g_pe
    st_multiplier u_st (
      .cfg (cfg),
      .a   (w[i]),
      .b   (x[i]),
      .p   (prod[i])
    );
  end

  // Adder plane: pairwise reduction, level by level, in place. At level width
  // wd, node i of the next level is the sum of nodes 2i and 2i+1 of this one.
  always_comb begin
    logic signed [SUM_W-1:0] t [PE_NUM];
    for (int i = 0; i < PE_NUM; i++)
      t[i] = lane_en[i] ? SUM_W'($signed(prod[i])) : '0;
    for (int wd = PE_NUM / 2; wd >= 1; wd = wd / 2)
      for (int i = 0; i < wd; i++)
        t[i] = t[2*i] + t[2*i+1];
    sum = t[0];
  end

  initial begin
    assert (PE_NUM == (1 << LEVELS)) else $error("PE_NUM must be a power of two");
  end

endmodule
