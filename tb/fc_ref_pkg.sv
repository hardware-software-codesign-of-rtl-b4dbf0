// Reference models shared by the accelerator testbenches: the sum-together
// product of one weight line and one input line, computed by extracting each
// signed field arithmetically, and the word count of an input vector.
package fc_ref_pkg;

  function automatic longint field(logic [15:0] v, int off, int w);
    longint f = (longint'(v) >> off) & ((64'sd1 << w) - 1);
    if (f >= (64'sd1 << (w - 1))) f -= (64'sd1 << w);
    return f;
  endfunction

  // A = weight line, B = input line
  function automatic longint st_ref(logic [2:0] c, logic [15:0] av, logic [15:0] bv);
    case (c)
      3'b100: return field(av, 0, 16) * field(bv, 0, 8);
      3'b010: return field(av, 8, 8) * field(bv, 0, 8) + field(av, 0, 8) * field(bv, 8, 8);
      3'b011: return field(av, 8, 8) * field(bv, 0, 4) + field(av, 0, 8) * field(bv, 8, 4);
      3'b001: return field(av, 12, 4) * field(bv, 0, 4) + field(av, 8, 4) * field(bv, 4, 4)
                   + field(av, 4, 4) * field(bv, 8, 4) + field(av, 0, 4) * field(bv, 12, 4);
      default: return field(av, 0, 16) * field(bv, 0, 16);
    endcase
  endfunction

  // 32-bit words holding n values at configuration c
  function automatic int words_for(int n, logic [2:0] c);
    int per_line = (c == 3'b001) ? 4 : (c == 3'b010 || c == 3'b011) ? 2 : 1;
    int lines = (n + per_line - 1) / per_line;
    return (lines + 1) / 2;
  endfunction

  // ---- packing of plain integer vectors into 16-bit lines
  // values per line, input field width and weight field width of a mode
  function automatic int per_line(logic [2:0] c);
    return (c == 3'b001) ? 4 : (c == 3'b010 || c == 3'b011) ? 2 : 1;
  endfunction
  function automatic int x_bits(logic [2:0] c);
    return (c == 3'b000) ? 16 : (c == 3'b001 || c == 3'b011) ? 4 : 8;
  endfunction
  function automatic int w_bits(logic [2:0] c);
    return (c == 3'b000 || c == 3'b100) ? 16 : (c == 3'b001) ? 4 : 8;
  endfunction
  // bit offset of input slot s, and of the weight slot it is paired with
  function automatic int x_off(logic [2:0] c, int s);
    return (c == 3'b001) ? 4 * s : (c == 3'b010 || c == 3'b011) ? 8 * s : 0;
  endfunction
  function automatic int w_off(logic [2:0] c, int s);
    return (c == 3'b001) ? 12 - 4 * s : (c == 3'b010 || c == 3'b011) ? 8 - 8 * s : 0;
  endfunction
  // place the low bits of v into line at off
  function automatic logic [15:0] put(logic [15:0] line, int v, int off, int bits);
    logic [15:0] mask = 16'((32'd1 << bits) - 1);
    return (line & ~(mask << off)) | ((16'(v) & mask) << off);
  endfunction
  function automatic int rnd_signed(int bits);
    return int'($urandom % (1 << bits)) - (1 << (bits - 1));
  endfunction
  function automatic int words_of(logic [2:0] c, int count);
    int lines = (count + per_line(c) - 1) / per_line(c);
    return (lines + 1) / 2;
  endfunction

endpackage
