// Self-checking test of st_mac_array (64 ST multipliers + adder plane):
// random lines, random lane masks and every configuration, plus all-extreme
// operands that push the adder plane to its largest magnitudes.
module tb_st_mac_array;
  import fc_pkg::*;
  import fc_ref_pkg::*;

  localparam int PE = 64;
  logic clk = 1'b0;
  logic [2:0] cfg;
  logic [PE-1:0] lane_en;
  logic [PE-1:0][15:0] w, x;
  logic signed [37:0] sum;
  int checks = 0, failures = 0;

  st_mac_array #(.PE_NUM(PE)) dut (.cfg, .lane_en, .w, .x, .sum);

  always #5 clk = ~clk;

  task automatic check_now(string what);
    longint exp = 0;
    #1;
    for (int i = 0; i < PE; i++) if (lane_en[i]) exp += st_ref(cfg, w[i], x[i]);
    checks++;
    if (longint'(sum) != exp) begin
      failures++;
      $display("FAIL %s cfg=%b sum=%0d exp=%0d", what, cfg, sum, exp);
    end
  endtask

  initial begin
    logic [2:0] cfgs [5] = '{3'b000, 3'b100, 3'b010, 3'b011, 3'b001};
    foreach (cfgs[ci]) begin
      cfg = cfgs[ci];
      for (int n = 0; n < 200; n++) begin
        for (int i = 0; i < PE; i++) begin
          w[i] = 16'($urandom);
          x[i] = 16'($urandom);
        end
        lane_en = (n % 4 == 0) ? '1 : {$urandom, $urandom};
        if (n % 7 == 1) lane_en = PE'((64'd1 << ($urandom % 64)) - 1);
        check_now("random");
      end
      // extremes: all lanes most negative x most negative, then min x max
      lane_en = '1;
      for (int i = 0; i < PE; i++) begin w[i] = 16'h8000; x[i] = 16'h8000; end
      check_now("min*min");
      for (int i = 0; i < PE; i++) begin w[i] = 16'h8888; x[i] = 16'h7777; end
      check_now("min*max");
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
