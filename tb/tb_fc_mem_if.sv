// Self-checking test of fc_mem_if against the behavioural DMA memory model.
// For several (in_words, n_out) pairs it runs a load phase and checks every
// PLM line written (input lines 2i/2i+1, weight lines 2*(mi*in_words+i)),
// the request addresses and lengths, then a store phase from a modelled
// output PLM and checks the 2*n_out words that reach memory (low half
// first). Random stalls on every channel are counted and must occur.
module tb_fc_mem_if;
  import fc_pkg::*;

  localparam int IN_D = 256, W_D = 8192, OUT_D = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  logic load_start = 0, store_start = 0, load_done, store_done;
  logic [7:0] in_words = '0;
  logic [5:0] n_out = '0;
  logic [31:0] in_add = '0, w_add = '0, out_add = '0;
  logic dma_read_ctrl_valid, dma_read_ctrl_ready, dma_read_chnl_valid, dma_read_chnl_ready;
  logic dma_write_ctrl_valid, dma_write_ctrl_ready, dma_write_chnl_valid, dma_write_chnl_ready;
  dma_info_t dma_read_ctrl_data, dma_write_ctrl_data;
  logic [31:0] dma_read_chnl_data, dma_write_chnl_data;
  logic in_wr_en, w_wr_en, out_rd_en, out_rd_hi;
  logic [7:0] in_wr_line;
  logic [12:0] w_wr_line;
  logic [31:0] in_wr_data, w_wr_data, out_rd_data;
  logic [4:0] out_rd_addr;

  logic [15:0] in_plm [IN_D];
  logic [15:0] w_plm [W_D];
  logic [63:0] out_plm [OUT_D];
  int checks = 0, failures = 0;
  int rd_reqs_seen;

  fc_mem_if dut (.*);
  dma_mem_model #(.MEM_WORDS(16384), .STALL_PCT(30)) u_mem (.*);

  always #5 clk = ~clk;

  // PLM models: record writes, serve the output PLM half reads (1-cycle latency)
  always @(posedge clk) begin
    if (in_wr_en) begin in_plm[in_wr_line] <= in_wr_data[15:0]; in_plm[in_wr_line + 1] <= in_wr_data[31:16]; end
    if (w_wr_en)  begin w_plm[w_wr_line]   <= w_wr_data[15:0];  w_plm[w_wr_line + 1]   <= w_wr_data[31:16]; end
    if (out_rd_en) out_rd_data <= out_rd_hi ? out_plm[out_rd_addr][63:32] : out_plm[out_rd_addr][31:0];
  end

  // request check: every read request must match the expected sequence
  always @(posedge clk) if (rst_n && dma_read_ctrl_valid && dma_read_ctrl_ready) begin
    logic [31:0] exp_idx;
    exp_idx = (rd_reqs_seen == 0) ? in_add : w_add + 32'((rd_reqs_seen - 1) * int'(in_words));
    checks++;
    if (dma_read_ctrl_data.index != exp_idx || dma_read_ctrl_data.length != 32'(in_words)
        || dma_read_ctrl_data.size != DMA_SIZE_WORD) begin
      failures++;
      $display("FAIL read request %0d: index %0d length %0d", rd_reqs_seen,
               dma_read_ctrl_data.index, dma_read_ctrl_data.length);
    end
    rd_reqs_seen++;
  end

  task automatic expect_eq(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  task automatic one_run(int words, int outs);
    in_add = 32'(100 + $urandom % 50);
    w_add = in_add + 32'(words) + 7;
    out_add = 32'(12000 + $urandom % 100);
    for (int i = 0; i < words; i++) u_mem.mem[in_add + 32'(i)] = $urandom;
    for (int i = 0; i < words * outs; i++) u_mem.mem[w_add + 32'(i)] = $urandom;
    for (int k = 0; k < OUT_D; k++) out_plm[k] = {$urandom, $urandom};
    for (int i = 12000; i < 12200; i++) u_mem.mem[i] = 32'hDEAD_0000;
    rd_reqs_seen = 0;
    @(negedge clk);
    in_words = 8'(words); n_out = 6'(outs); load_start = 1;
    @(negedge clk); load_start = 0;
    while (!load_done) @(negedge clk);
    expect_eq(rd_reqs_seen, (words == 0) ? 0 : 1 + outs, "read request count");
    for (int i = 0; i < words; i++) begin
      expect_eq({in_plm[2*i+1], in_plm[2*i]}, u_mem.mem[in_add + 32'(i)], "input line pair");
    end
    for (int i = 0; i < words * outs; i++) begin
      expect_eq({w_plm[2*i+1], w_plm[2*i]}, u_mem.mem[w_add + 32'(i)], "weight line pair");
    end
    @(negedge clk);
    store_start = 1;
    @(negedge clk); store_start = 0;
    while (!store_done) @(negedge clk);
    repeat (2) @(negedge clk);
    for (int k = 0; k < outs; k++) begin
      expect_eq(u_mem.mem[out_add + 32'(2*k)], out_plm[k][31:0], "output low word");
      expect_eq(u_mem.mem[out_add + 32'(2*k+1)], out_plm[k][63:32], "output high word");
    end
    expect_eq(u_mem.mem[out_add + 32'(2*outs)], 32'hDEAD_0000, "no write past the outputs");
  endtask

  initial begin
    for (int i = 0; i < 16384; i++) u_mem.mem[i] = 32'hDEAD_0000;
    repeat (3) @(negedge clk);
    rst_n = 1;
    one_run(128, 32);
    one_run(1, 1);
    one_run(17, 5);
    one_run(64, 3);
    for (int n = 0; n < 4; n++) begin
      one_run(1 + $urandom % 128, 1 + $urandom % 32);
    end
    expect_eq(longint'(u_mem.protocol_errors), 0, "DMA protocol errors");
    checks++;
    if (u_mem.read_gaps == 0 || u_mem.write_backpressure == 0 || u_mem.ctrl_waits == 0) begin
      failures++;
      $display("FAIL stalls never happened");
    end
    $display("read gaps %0d, write backpressure %0d, request waits %0d",
             u_mem.read_gaps, u_mem.write_backpressure, u_mem.ctrl_waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
