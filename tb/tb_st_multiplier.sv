// Self-checking test of st_multiplier: every configuration code, corner
// operands (most negative / most positive fields) and random operands are
// compared with a reference that extracts each field arithmetically.
module tb_st_multiplier;
  import fc_pkg::*;

  logic        clk = 1'b0;
  logic [2:0]  cfg;
  logic [15:0] a, b;
  logic [31:0] p;
  int checks = 0, failures = 0;

  st_multiplier dut (.cfg, .a, .b, .p);

  always #5 clk = ~clk;

  // signed value of the w-bit field of v starting at bit off
  function automatic longint field(logic [15:0] v, int off, int w);
    longint f = (longint'(v) >> off) & ((64'sd1 << w) - 1);
    if (f >= (64'sd1 << (w - 1))) f -= (64'sd1 << w);
    return f;
  endfunction

  function automatic longint ref_p(logic [2:0] c, logic [15:0] av, logic [15:0] bv);
    case (c)
      3'b100: return field(av, 0, 16) * field(bv, 0, 8);
      3'b010: return field(av, 8, 8) * field(bv, 0, 8) + field(av, 0, 8) * field(bv, 8, 8);
      3'b011: return field(av, 8, 8) * field(bv, 0, 4) + field(av, 0, 8) * field(bv, 8, 4);
      3'b001: return field(av, 12, 4) * field(bv, 0, 4) + field(av, 8, 4) * field(bv, 4, 4)
                   + field(av, 4, 4) * field(bv, 8, 4) + field(av, 0, 4) * field(bv, 12, 4);
      default: return field(av, 0, 16) * field(bv, 0, 16);
    endcase
  endfunction

  task automatic check(logic [2:0] c, logic [15:0] av, logic [15:0] bv);
    longint exp;
    cfg = c; a = av; b = bv;
    #1;
    exp = ref_p(c, av, bv);
    checks++;
    if ($signed(p) != exp) begin
      failures++;
      $display("FAIL cfg=%b a=%h b=%h p=%0d exp=%0d", c, av, bv, $signed(p), exp);
    end
  endtask

  initial begin
    logic [15:0] corners [6] = '{16'h0000, 16'hFFFF, 16'h8000, 16'h7FFF, 16'h8888, 16'h7777};
    for (int c = 0; c < 8; c++) begin
      foreach (corners[i]) foreach (corners[j]) check(3'(c), corners[i], corners[j]);
      for (int n = 0; n < 400; n++) check(3'(c), 16'($urandom), 16'($urandom));
    end
    // a hand-worked 4x4 case: (-1*1) + (2*2) + (3*-3) + (-8*7) = -62
    cfg = ST_4X4; a = 16'hF238; b = 16'h7D21; #1;
    checks++;
    if ($signed(p) != -62) begin
      failures++;
      $display("FAIL hand-worked 4x4: p=%0d", $signed(p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
