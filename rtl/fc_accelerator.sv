// Fully connected / GEMM accelerator with sum-together multipliers.
//
// Loosely coupled, memory-bus attached accelerator for the weight x input
// multiply-accumulate of a quantized fully connected layer:
//     out[k] (+)= sum_l w[k][l] * x[l],   k < M, l < N
// at 16-, 8- or 4-bit precision (plus the mixed 16x8 and 8x4 modes). The CPU
// writes the configuration registers (fc_conf_regs) and sets CMD.start. The
// run controller (fc_ctrl) then lets the DMA memory interface (fc_mem_if)
// fill the input PLM (256 x 16 bit) and the weight PLM (8192 x 16 bit), lets
// the computational unit (fc_core: 64 ST multipliers + adder plane + 64-bit
// accumulator) fill the output PLM (32 x 64 bit), lets the memory interface
// write the outputs back as 2*M 32-bit words, and pulses acc_done. Loading,
// computing and storing never overlap, so the accelerator makes no assumption
// on memory bandwidth. Layers larger than the PLMs are split by software; the
// ACC register makes a run add to the previous run's outputs.
//
// Interfaces: APB-style register slave (8-bit byte address), ESP-style DMA
// channels (request = {index, length, size} in 32-bit words, 32-bit data),
// each a valid/ready pair. rst_n is an asynchronous active-low reset.
// Bias, zero-point handling and requantization are left to the CPU.
module fc_accelerator
  import fc_pkg::*;
#(
  parameter int PE_NUM       = 64,
  parameter int MAX_IN_LINES = 256,
  parameter int MAX_OUT      = 32,
  parameter int MAX_W_LINES  = 8192
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // configuration register bus
  input  logic                  psel,
  input  logic                  penable,
  input  logic                  pwrite,
  input  logic [7:0]            paddr,
  input  logic [31:0]           pwdata,
  output logic [31:0]           prdata,
  output logic                  pready,
  // DMA read
  output logic                  dma_read_ctrl_valid,
  input  logic                  dma_read_ctrl_ready,
  output dma_info_t             dma_read_ctrl_data,
  input  logic                  dma_read_chnl_valid,
  output logic                  dma_read_chnl_ready,
  input  logic [DMA_WIDTH-1:0]  dma_read_chnl_data,
  // DMA write
  output logic                  dma_write_ctrl_valid,
  input  logic                  dma_write_ctrl_ready,
  output dma_info_t             dma_write_ctrl_data,
  output logic                  dma_write_chnl_valid,
  input  logic                  dma_write_chnl_ready,
  output logic [DMA_WIDTH-1:0]  dma_write_chnl_data,
  // completion interrupt
  output logic                  acc_done
);

  localparam int IN_AW   = $clog2(MAX_IN_LINES);
  localparam int W_AW    = $clog2(MAX_W_LINES);
  localparam int OUT_AW  = $clog2(MAX_OUT);
  localparam int WORDS_W = $clog2(MAX_IN_LINES / 2 + 1);
  localparam int NOUT_W  = $clog2(MAX_OUT + 1);

  conf_info_t          conf;
  logic                start, busy;
  logic                load_start, load_done, comp_start, comp_done;
  logic                store_start, store_done, core_busy;
  logic [2:0]          cfg;
  logic [WORDS_W-1:0]  in_words;
  logic [NOUT_W-1:0]   n_out;
  logic                acc_en;
  logic [31:0]         in_add, w_add, out_add;

  logic                          in_wr_en, w_wr_en;
  logic [IN_AW-1:0]              in_wr_line;
  logic [W_AW-1:0]               w_wr_line;
  logic [DMA_WIDTH-1:0]          in_wr_data, w_wr_data;
  logic                          in_rd_en, w_rd_en;
  logic [IN_AW-1:0]              in_rd_line;
  logic [W_AW-1:0]               w_rd_line;
  logic [PE_NUM-1:0][15:0]       in_rd_data, w_rd_data;
  logic                          out_rd_en, out_wr_en, dma_out_rd_en, dma_out_rd_hi;
  logic [OUT_AW-1:0]             out_rd_addr, out_wr_addr, dma_out_rd_addr;
  logic [OUT_WIDTH-1:0]          out_rd_data, out_wr_data;
  logic [DMA_WIDTH-1:0]          dma_out_rd_data;

  fc_conf_regs u_regs (
    .clk, .rst_n,
    .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready,
    .conf, .start, .done (acc_done)
  );

  fc_ctrl #(.IN_DEPTH(MAX_IN_LINES), .OUT_DEPTH(MAX_OUT)) u_ctrl (
    .clk, .rst_n, .start, .conf, .busy, .acc_done,
    .load_start, .load_done, .comp_start, .comp_done, .store_start, .store_done,
    .cfg, .in_words, .n_out, .acc_en, .in_add, .w_add, .out_add
  );

  fc_mem_if #(.IN_DEPTH(MAX_IN_LINES), .W_DEPTH(MAX_W_LINES), .OUT_DEPTH(MAX_OUT)) u_mem_if (
    .clk, .rst_n,
    .load_start, .load_done, .store_start, .store_done,
    .in_words, .n_out, .in_add, .w_add, .out_add,
    .dma_read_ctrl_valid, .dma_read_ctrl_ready, .dma_read_ctrl_data,
    .dma_read_chnl_valid, .dma_read_chnl_ready, .dma_read_chnl_data,
    .dma_write_ctrl_valid, .dma_write_ctrl_ready, .dma_write_ctrl_data,
    .dma_write_chnl_valid, .dma_write_chnl_ready, .dma_write_chnl_data,
    .in_wr_en, .in_wr_line, .in_wr_data,
    .w_wr_en, .w_wr_line, .w_wr_data,
    .out_rd_en (dma_out_rd_en), .out_rd_addr (dma_out_rd_addr),
    .out_rd_hi (dma_out_rd_hi), .out_rd_data (dma_out_rd_data)
  );

  plm_interleaved #(.DEPTH(MAX_IN_LINES), .BANKS(PE_NUM), .WIDTH(16)) u_plm_in (
    .clk,
    .wr_en (in_wr_en), .wr_line (in_wr_line), .wr_data (in_wr_data),
    .rd_en (in_rd_en), .rd_line (in_rd_line), .rd_data (in_rd_data)
  );

  plm_interleaved #(.DEPTH(MAX_W_LINES), .BANKS(PE_NUM), .WIDTH(16)) u_plm_w (
    .clk,
    .wr_en (w_wr_en), .wr_line (w_wr_line), .wr_data (w_wr_data),
    .rd_en (w_rd_en), .rd_line (w_rd_line), .rd_data (w_rd_data)
  );

  plm_output #(.DEPTH(MAX_OUT), .WIDTH(OUT_WIDTH)) u_plm_out (
    .clk,
    .core_rd_en (out_rd_en), .core_rd_addr (out_rd_addr), .core_rd_data (out_rd_data),
    .core_wr_en (out_wr_en), .core_wr_addr (out_wr_addr), .core_wr_data (out_wr_data),
    .dma_rd_en (dma_out_rd_en), .dma_rd_addr (dma_out_rd_addr),
    .dma_rd_hi (dma_out_rd_hi), .dma_rd_data (dma_out_rd_data)
  );

  fc_core #(.PE_NUM(PE_NUM), .IN_DEPTH(MAX_IN_LINES), .W_DEPTH(MAX_W_LINES),
            .OUT_DEPTH(MAX_OUT)) u_core (
    .clk, .rst_n,
    .start (comp_start), .cfg, .in_words, .n_out, .acc_en,
    .busy (core_busy), .done (comp_done),
    .in_rd_en, .in_rd_line, .in_rd_data,
    .w_rd_en, .w_rd_line, .w_rd_data,
    .out_rd_en, .out_rd_addr, .out_rd_data,
    .out_wr_en, .out_wr_addr, .out_wr_data
  );

  // the run controller and the core agree on when a computation is under way
  a_core_in_run: assert property (@(posedge clk) disable iff (!rst_n) core_busy |-> busy);

endmodule
