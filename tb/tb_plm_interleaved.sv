// Self-checking test of plm_interleaved at the weight-PLM size (8192 lines):
// fills the memory through the dual 16-bit write port, then reads 64-line
// windows from aligned, unaligned and wrapping start lines and checks every
// lane against a shadow array. Also checks the one-cycle read latency and
// that rd_data holds while rd_en is low.
module tb_plm_interleaved;
  localparam int DEPTH = 8192, BANKS = 64, AW = $clog2(DEPTH);
  logic clk = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [AW-1:0] wr_line = '0, rd_line = '0;
  logic [31:0] wr_data = '0;
  logic [BANKS-1:0][15:0] rd_data;
  logic [15:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  plm_interleaved #(.DEPTH(DEPTH), .BANKS(BANKS), .WIDTH(16)) dut (.*);

  always #5 clk = ~clk;

  task automatic read_check(int start);
    @(negedge clk);
    rd_en = 1'b1; rd_line = AW'(start);
    @(negedge clk);
    rd_en = 1'b0; rd_line = AW'(start + 4321);   // must not disturb held data
    for (int j = 0; j < BANKS; j++) begin
      checks++;
      if (rd_data[j] !== shadow[(start + j) % DEPTH]) begin
        failures++;
        if (failures < 10)
          $display("FAIL start=%0d lane=%0d got=%h exp=%h", start, j, rd_data[j],
                   shadow[(start + j) % DEPTH]);
      end
    end
    @(negedge clk);
    checks++;
    if (rd_data[0] !== shadow[start % DEPTH]) begin
      failures++;
      $display("FAIL rd_data not held at start=%0d", start);
    end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i += 2) begin
      @(negedge clk);
      wr_en = 1'b1; wr_line = AW'(i); wr_data = $urandom;
      shadow[i] = wr_data[15:0];
      shadow[i+1] = wr_data[31:16];
    end
    @(negedge clk); wr_en = 1'b0;
    read_check(0);    read_check(1);    read_check(63);   read_check(64);
    read_check(65);   read_check(130);  read_check(511);  read_check(4000);
    read_check(8127); read_check(8128); read_check(8150); read_check(8191);
    for (int n = 0; n < 50; n++) read_check($urandom % DEPTH);
    // overwrite a pair and read it back
    @(negedge clk);
    wr_en = 1'b1; wr_line = AW'(200); wr_data = 32'hBEEF_CAFE;
    shadow[200] = 16'hCAFE; shadow[201] = 16'hBEEF;
    @(negedge clk); wr_en = 1'b0;
    read_check(170);
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
