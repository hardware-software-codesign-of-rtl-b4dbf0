// DMA memory interface of the fully connected accelerator.
//
// Load phase (load_start .. load_done):
//   1. one read request {in_add, in_words} for the input vector; every 32-bit
//      beat is written to the input PLM as two 16-bit lines (2i, 2i+1);
//   2. for each output mi < n_out, one read request
//      {w_add + mi*in_words, in_words}; beats go to weight PLM lines
//      2*(mi*in_words + i) and 2*(mi*in_words + i) + 1, so weight rows are
//      stored back to back with a stride of 2*in_words lines.
// Store phase (store_start .. store_done): one write request
//   {out_add, 2*n_out}, then for each output the low and the high 32-bit half
//   of its 64-bit output PLM entry.
// Addresses and lengths are in 32-bit words. Every channel is a valid/ready
// pair: a request or beat transfers on a cycle where both are high, and the
// sender holds valid and data until then. A request is always accepted before
// its data move. The store phase reads the output PLM one cycle ahead of each
// beat, so it sends at most one word every two cycles; the load phase accepts
// one word per cycle. load_done and store_done are one-cycle pulses.
// The load/store order, the 32-to-16-bit split and the 64-to-32-bit split
// follow the published design; the handshake details are this design's.
module fc_mem_if
  import fc_pkg::*;
#(
  parameter int IN_DEPTH  = 256,
  parameter int W_DEPTH   = 8192,
  parameter int OUT_DEPTH = 32,
  localparam int IN_AW   = $clog2(IN_DEPTH),
  localparam int W_AW    = $clog2(W_DEPTH),
  localparam int OUT_AW  = $clog2(OUT_DEPTH),
  localparam int WORDS_W = $clog2(IN_DEPTH / 2 + 1),
  localparam int NOUT_W  = $clog2(OUT_DEPTH + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // phase control
  input  logic                   load_start,
  output logic                   load_done,
  input  logic                   store_start,
  output logic                   store_done,
  // run configuration (stable during a phase)
  input  logic [WORDS_W-1:0]     in_words,
  input  logic [NOUT_W-1:0]      n_out,
  input  logic [31:0]            in_add,
  input  logic [31:0]            w_add,
  input  logic [31:0]            out_add,
  // DMA read control and data channels
  output logic                   dma_read_ctrl_valid,
  input  logic                   dma_read_ctrl_ready,
  output dma_info_t              dma_read_ctrl_data,
  input  logic                   dma_read_chnl_valid,
  output logic                   dma_read_chnl_ready,
  input  logic [DMA_WIDTH-1:0]   dma_read_chnl_data,
  // DMA write control and data channels
  output logic                   dma_write_ctrl_valid,
  input  logic                   dma_write_ctrl_ready,
  output dma_info_t              dma_write_ctrl_data,
  output logic                   dma_write_chnl_valid,
  input  logic                   dma_write_chnl_ready,
  output logic [DMA_WIDTH-1:0]   dma_write_chnl_data,
  // PLM ports
  output logic                   in_wr_en,
  output logic [IN_AW-1:0]       in_wr_line,
  output logic [DMA_WIDTH-1:0]   in_wr_data,
  output logic                   w_wr_en,
  output logic [W_AW-1:0]        w_wr_line,
  output logic [DMA_WIDTH-1:0]   w_wr_data,
  output logic                   out_rd_en,
  output logic [OUT_AW-1:0]      out_rd_addr,
  output logic                   out_rd_hi,
  input  logic [DMA_WIDTH-1:0]   out_rd_data
);

  typedef enum logic [2:0] {
    IDLE, RD_IN_REQ, RD_IN_DATA, RD_W_REQ, RD_W_DATA, WR_REQ, WR_READ, WR_SEND
  } state_e;
  state_e state;

  logic [WORDS_W-1:0]  beat;      // word within the current read burst
  logic [OUT_AW-1:0]   mi;        // output / weight row index
  logic                half;      // 0: low word of an output, 1: high word
  logic [31:0]         w_row_add; // w_add + mi*in_words
  logic [IN_AW-1:0]    in_line;
  logic [W_AW-1:0]     w_line;

  logic rd_beat, last_beat, last_row;
  assign rd_beat   = dma_read_chnl_valid && dma_read_chnl_ready;
  assign last_beat = (beat == in_words - 1'b1);
  assign last_row  = (NOUT_W'(mi) == n_out - 1'b1);

  // request channels
  assign dma_read_ctrl_valid = (state == RD_IN_REQ) || (state == RD_W_REQ);
  always_comb begin
    dma_read_ctrl_data.index  = (state == RD_W_REQ) ? w_row_add : in_add;
    dma_read_ctrl_data.length = 32'(in_words);
    dma_read_ctrl_data.size   = DMA_SIZE_WORD;
  end
  assign dma_write_ctrl_valid       = (state == WR_REQ);
  assign dma_write_ctrl_data.index  = out_add;
  assign dma_write_ctrl_data.length = 32'(n_out) << 1;
  assign dma_write_ctrl_data.size   = DMA_SIZE_WORD;

  // read data into the PLMs
  assign dma_read_chnl_ready = (state == RD_IN_DATA) || (state == RD_W_DATA);
  assign in_wr_en   = rd_beat && (state == RD_IN_DATA);
  assign in_wr_line = in_line;
  assign in_wr_data = dma_read_chnl_data;
  assign w_wr_en    = rd_beat && (state == RD_W_DATA);
  assign w_wr_line  = w_line;
  assign w_wr_data  = dma_read_chnl_data;

  // output PLM read and write data
  assign out_rd_en            = (state == WR_READ);
  assign out_rd_addr          = mi;
  assign out_rd_hi            = half;
  assign dma_write_chnl_valid = (state == WR_SEND);
  assign dma_write_chnl_data  = out_rd_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      beat       <= '0;
      mi         <= '0;
      half       <= 1'b0;
      w_row_add  <= '0;
      in_line    <= '0;
      w_line     <= '0;
      load_done  <= 1'b0;
      store_done <= 1'b0;
    end else begin
      load_done  <= 1'b0;
      store_done <= 1'b0;
      case (state)
        IDLE: begin
          beat      <= '0;
          mi        <= '0;
          half      <= 1'b0;
          in_line   <= '0;
          w_line    <= '0;
          w_row_add <= w_add;
          if (load_start) begin
            if (in_words == '0) load_done <= 1'b1;
            else                state     <= RD_IN_REQ;
          end else if (store_start) begin
            if (n_out == '0) store_done <= 1'b1;
            else             state      <= WR_REQ;
          end
        end
        RD_IN_REQ: if (dma_read_ctrl_ready) state <= RD_IN_DATA;
        RD_IN_DATA: if (rd_beat) begin
          in_line <= in_line + IN_AW'(2);
          beat    <= beat + 1'b1;
          if (last_beat) begin
            beat <= '0;
            if (n_out == '0) begin
              load_done <= 1'b1;
              state     <= IDLE;
            end else begin
              state <= RD_W_REQ;
            end
          end
        end
        RD_W_REQ: if (dma_read_ctrl_ready) state <= RD_W_DATA;
        RD_W_DATA: if (rd_beat) begin
          w_line <= w_line + W_AW'(2);
          beat   <= beat + 1'b1;
          if (last_beat) begin
            beat      <= '0;
            mi        <= mi + 1'b1;
            w_row_add <= w_row_add + 32'(in_words);
            if (last_row) begin
              load_done <= 1'b1;
              state     <= IDLE;
            end else begin
              state <= RD_W_REQ;
            end
          end
        end
        WR_REQ: if (dma_write_ctrl_ready) state <= WR_READ;
        WR_READ: state <= WR_SEND;
        WR_SEND: if (dma_write_chnl_ready) begin
          half <= !half;
          if (half) mi <= mi + 1'b1;
          if (half && last_row) begin
            store_done <= 1'b1;
            state      <= IDLE;
          end else begin
            state <= WR_READ;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // a request stays valid, with stable contents, until it is accepted
  a_rd_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    dma_read_ctrl_valid && !dma_read_ctrl_ready |=> dma_read_ctrl_valid && $stable(dma_read_ctrl_data));
  a_wr_beat_stable: assert property (@(posedge clk) disable iff (!rst_n)
    dma_write_chnl_valid && !dma_write_chnl_ready |=> dma_write_chnl_valid && $stable(dma_write_chnl_data));

endmodule
