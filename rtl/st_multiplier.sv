// Sum-together (ST) precision-scalable multiplier.
//
// A 16x16-bit signed multiplier that, at reduced precision, computes several
// products in parallel and returns their sum. A is the weight line, B the input
// line. The 3-bit configuration selects:
//   000 16x16  P = A[15:0]*B[15:0]
//   100 16x8   P = A[15:0]*B[7:0]
//   010 8x8    P = A[15:8]*B[7:0]  + A[7:0]*B[15:8]
//   011 8x4    P = A[15:8]*B[3:0]  + A[7:0]*B[11:8]
//   001 4x4    P = A[15:12]*B[3:0] + A[11:8]*B[7:4] + A[7:4]*B[11:8] + A[3:0]*B[15:12]
// Note the crossed pairing: the highest field of A meets the lowest field of B.
// The operand mapping is the published one; treating every field as signed
// two's complement and sending unused codes (101..111) to 16x16 are this
// design's choices. Purely combinational, no registers.
module st_multiplier
  import fc_pkg::*;
(
  input  logic [2:0]  cfg,
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] p
);

  // sign-extend a field to 32 bits
  function automatic logic signed [31:0] sx16(logic [15:0] v);
    return {{16{v[15]}}, v};
  endfunction
  function automatic logic signed [31:0] sx8(logic [7:0] v);
    return {{24{v[7]}}, v};
  endfunction
  function automatic logic signed [31:0] sx4(logic [3:0] v);
    return {{28{v[3]}}, v};
  endfunction

  logic signed [31:0] p16x16, p16x8, p8x8, p8x4, p4x4;

  always_comb begin
    p16x16 = sx16(a) * sx16(b);
    p16x8  = sx16(a) * sx8(b[7:0]);
    p8x8   = sx8(a[15:8]) * sx8(b[7:0])  + sx8(a[7:0]) * sx8(b[15:8]);
    p8x4   = sx8(a[15:8]) * sx4(b[3:0])  + sx8(a[7:0]) * sx4(b[11:8]);
    p4x4   = sx4(a[15:12]) * sx4(b[3:0])  + sx4(a[11:8]) * sx4(b[7:4])
           + sx4(a[7:4])   * sx4(b[11:8]) + sx4(a[3:0])  * sx4(b[15:12]);
    case (cfg)
      ST_16X8: p = p16x8;
      ST_8X8:  p = p8x8;
      ST_8X4:  p = p8x4;
      ST_4X4:  p = p4x4;
      default: p = p16x16;
    endcase
  end

endmodule
