// Self-checking test of plm_output: writes all 32 entries through the core
// write port, reads them back through the 64-bit core port and as two 32-bit
// halves through the memory-interface port, and checks read-before-write
// behaviour when the core reads and writes one entry in the same cycle.
module tb_plm_output;
  localparam int DEPTH = 32, AW = 5;
  logic clk = 1'b0;
  logic core_rd_en = 0, core_wr_en = 0, dma_rd_en = 0, dma_rd_hi = 0;
  logic [AW-1:0] core_rd_addr = '0, core_wr_addr = '0, dma_rd_addr = '0;
  logic [63:0] core_rd_data, core_wr_data = '0;
  logic [31:0] dma_rd_data;
  logic [63:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  plm_output #(.DEPTH(DEPTH), .WIDTH(64)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect64(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      core_wr_en = 1; core_wr_addr = AW'(i); core_wr_data = {$urandom, $urandom};
      shadow[i] = core_wr_data;
    end
    @(negedge clk); core_wr_en = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      core_rd_en = 1; core_rd_addr = AW'(i);
      dma_rd_en = 1; dma_rd_addr = AW'(DEPTH - 1 - i); dma_rd_hi = i[0];
      @(negedge clk);
      core_rd_en = 0; dma_rd_en = 0;
      expect64(core_rd_data, shadow[i], "core read");
      expect64(64'(dma_rd_data),
               64'(i[0] ? shadow[DEPTH-1-i][63:32] : shadow[DEPTH-1-i][31:0]), "dma half read");
    end
    // same-cycle read and write of entry 7: old value first, new value after
    @(negedge clk);
    core_rd_en = 1; core_rd_addr = 7; core_wr_en = 1; core_wr_addr = 7;
    core_wr_data = 64'h0123_4567_89AB_CDEF;
    @(negedge clk);
    core_wr_en = 0;
    expect64(core_rd_data, shadow[7], "read-before-write");
    @(negedge clk);
    core_rd_en = 0;
    expect64(core_rd_data, 64'h0123_4567_89AB_CDEF, "read after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
