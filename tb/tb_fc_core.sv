// Self-checking test of fc_core with full-size PLMs around it. The input and
// weight PLMs are filled directly with random lines; each run's output-PLM
// writes are compared with a reference dot product, and the number of cycles
// from start to done is checked against n_out * ceil(2*in_words/64) + 2.
// Covers every ST configuration, vectors shorter than, equal to and longer
// than one 64-line chunk (partial last chunk masking), 1..32 outputs, and the
// accumulate mode that adds a run's results to the previous run's outputs.
module tb_fc_core;
  import fc_pkg::*;
  import fc_ref_pkg::*;

  localparam int PE = 64, IN_D = 256, W_D = 8192, OUT_D = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, acc_en = 1'b0, busy, done;
  logic [2:0] cfg = '0;
  logic [7:0] in_words = '0;
  logic [5:0] n_out = '0;

  logic in_rd_en, w_rd_en, out_rd_en, out_wr_en;
  logic [7:0] in_rd_line;
  logic [12:0] w_rd_line;
  logic [PE-1:0][15:0] in_rd_data, w_rd_data;
  logic [4:0] out_rd_addr, out_wr_addr;
  logic [63:0] out_rd_data, out_wr_data;
  logic in_wr_en = 1'b0, w_wr_en = 1'b0;
  logic [7:0] in_wr_line = '0;
  logic [12:0] w_wr_line = '0;
  logic [31:0] in_wr_data = '0, w_wr_data = '0;
  logic [31:0] unused_dma_data;

  logic [15:0] xs [IN_D];
  logic [15:0] ws [W_D];
  longint expect_out [OUT_D];
  int checks = 0, failures = 0, writes_seen;
  int partial_chunks = 0, acc_runs = 0;

  fc_core #(.PE_NUM(PE), .IN_DEPTH(IN_D), .W_DEPTH(W_D), .OUT_DEPTH(OUT_D)) dut (.*);

  plm_interleaved #(.DEPTH(IN_D), .BANKS(PE)) u_in (
    .clk, .wr_en(in_wr_en), .wr_line(in_wr_line), .wr_data(in_wr_data),
    .rd_en(in_rd_en), .rd_line(in_rd_line), .rd_data(in_rd_data));
  plm_interleaved #(.DEPTH(W_D), .BANKS(PE)) u_w (
    .clk, .wr_en(w_wr_en), .wr_line(w_wr_line), .wr_data(w_wr_data),
    .rd_en(w_rd_en), .rd_line(w_rd_line), .rd_data(w_rd_data));
  plm_output #(.DEPTH(OUT_D)) u_out (
    .clk, .core_rd_en(out_rd_en), .core_rd_addr(out_rd_addr), .core_rd_data(out_rd_data),
    .core_wr_en(out_wr_en), .core_wr_addr(out_wr_addr), .core_wr_data(out_wr_data),
    .dma_rd_en(1'b0), .dma_rd_addr('0), .dma_rd_hi(1'b0), .dma_rd_data(unused_dma_data));

  always #5 clk = ~clk;

  // compare every output write with the reference
  always @(posedge clk) if (rst_n && out_wr_en) begin
    checks++;
    writes_seen++;
    if (longint'(out_wr_data) != expect_out[out_wr_addr]) begin
      failures++;
      if (failures < 10)
        $display("FAIL out[%0d] = %0d exp %0d (cfg=%b words=%0d)", out_wr_addr,
                 $signed(out_wr_data), expect_out[out_wr_addr], cfg, in_words);
    end
  end

  task automatic fill(int lines, int outs);
    for (int i = 0; i < IN_D; i += 2) begin
      @(negedge clk);
      in_wr_en = 1; in_wr_line = 8'(i); in_wr_data = $urandom;
      xs[i] = in_wr_data[15:0]; xs[i+1] = in_wr_data[31:16];
    end
    @(negedge clk); in_wr_en = 0;
    for (int i = 0; i < lines * outs; i += 2) begin
      @(negedge clk);
      w_wr_en = 1; w_wr_line = 13'(i); w_wr_data = $urandom;
      ws[i] = w_wr_data[15:0]; ws[i+1] = w_wr_data[31:16];
    end
    @(negedge clk); w_wr_en = 0;
  endtask

  task automatic run(logic [2:0] c, int words, int outs, bit accumulate, bit refill);
    int lines = 2 * words, chunks = (2 * words + PE - 1) / PE, cycles = 0;
    if (refill) fill(lines, outs);
    for (int k = 0; k < outs; k++) begin
      longint s = accumulate ? expect_out[k] : 0;
      for (int l = 0; l < lines; l++) s += st_ref(c, ws[k * lines + l], xs[l]);
      expect_out[k] = s;
    end
    if (lines % PE != 0) partial_chunks++;
    if (accumulate) acc_runs++;
    writes_seen = 0;
    @(negedge clk);
    cfg = c; in_words = 8'(words); n_out = 6'(outs); acc_en = accumulate; start = 1;
    @(negedge clk);
    start = 0;
    cfg = 3'(~c); in_words = '0; n_out = '0;    // run must use its captured values
    while (!done) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != outs * chunks + 2) begin
      failures++;
      $display("FAIL cycles=%0d exp=%0d", cycles, outs * chunks + 2);
    end
    checks++;
    if (writes_seen != outs) begin
      failures++;
      $display("FAIL %0d output writes, expected %0d", writes_seen, outs);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(ST_16X16, 128, 32, 0, 1);
    run(ST_8X8,   1,   5,  0, 1);
    run(ST_4X4,   33,  32, 0, 1);
    run(ST_16X8,  32,  7,  0, 1);
    run(ST_8X4,   50,  3,  0, 1);
    // accumulate: same data again, results must double
    run(ST_8X4,   50,  3,  1, 0);
    run(ST_4X4,   100, 20, 0, 1);
    run(ST_8X8,   100, 20, 1, 1);
    for (int n = 0; n < 6; n++)
      run(3'($urandom % 5), 1 + $urandom % 128, 1 + $urandom % 32, 0, 1);
    // empty run finishes with no writes
    @(negedge clk);
    n_out = 0; in_words = 8; start = 1;
    @(negedge clk); start = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL empty run still busy"); end
    checks++;
    if (partial_chunks == 0 || acc_runs == 0) begin
      failures++;
      $display("FAIL coverage: partial chunks %0d, accumulate runs %0d", partial_chunks, acc_runs);
    end
    $display("partial-chunk runs %0d, accumulate runs %0d", partial_chunks, acc_runs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
