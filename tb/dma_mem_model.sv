// Behavioural model of the system side of the accelerator's DMA channels:
// the DMA engine of the accelerator socket and the external memory behind
// it, flattened into one word-addressed array (testbench only).
// A read request {index, length} is answered with length words from
// mem[index...]; a write request is followed by length words stored at
// mem[index...]. Ready signals and read-data valid are randomly withheld
// (STALL_PCT percent of cycles) to exercise the handshakes; the counters
// report how often that happened and flag protocol errors (write data outside
// a write burst, a request while one of the same kind is open).
module dma_mem_model
  import fc_pkg::*;
#(
  parameter int MEM_WORDS = 16384,
  parameter int STALL_PCT = 30
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        dma_read_ctrl_valid,
  output logic        dma_read_ctrl_ready,
  input  dma_info_t   dma_read_ctrl_data,
  output logic        dma_read_chnl_valid,
  input  logic        dma_read_chnl_ready,
  output logic [31:0] dma_read_chnl_data,
  input  logic        dma_write_ctrl_valid,
  output logic        dma_write_ctrl_ready,
  input  dma_info_t   dma_write_ctrl_data,
  input  logic        dma_write_chnl_valid,
  output logic        dma_write_chnl_ready,
  input  logic [31:0] dma_write_chnl_data
);

  logic [31:0] mem [MEM_WORDS];

  int rd_idx, rd_left, wr_idx, wr_left;
  int read_reqs = 0, write_reqs = 0, read_words = 0, write_words = 0;
  int read_gaps = 0, write_backpressure = 0, ctrl_waits = 0, protocol_errors = 0;

  function automatic bit go();
    return ($urandom % 100) >= STALL_PCT;
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dma_read_ctrl_ready  <= 1'b0;
      dma_write_ctrl_ready <= 1'b0;
      dma_read_chnl_valid  <= 1'b0;
      dma_read_chnl_data   <= '0;
      dma_write_chnl_ready <= 1'b0;
      rd_left = 0;
      wr_left = 0;
    end else begin
      // ---- read side
      if (dma_read_ctrl_valid && dma_read_ctrl_ready) begin
        if (rd_left != 0) protocol_errors++;
        rd_idx  = int'(dma_read_ctrl_data.index);
        rd_left = int'(dma_read_ctrl_data.length);
        read_reqs++;
      end else if (dma_read_ctrl_valid) ctrl_waits++;
      if (dma_read_chnl_valid && dma_read_chnl_ready) begin
        rd_idx++;
        rd_left--;
        read_words++;
        dma_read_chnl_valid <= 1'b0;
      end
      if (!(dma_read_chnl_valid && !dma_read_chnl_ready)) begin
        if (rd_left > 0 && go()) begin
          dma_read_chnl_valid <= 1'b1;
          dma_read_chnl_data  <= mem[rd_idx % MEM_WORDS];
        end else begin
          dma_read_chnl_valid <= 1'b0;
          if (rd_left > 0) read_gaps++;
        end
      end
      dma_read_ctrl_ready <= (rd_left == 0) && go() && !(dma_read_ctrl_valid && dma_read_ctrl_ready);

      // ---- write side
      if (dma_write_ctrl_valid && dma_write_ctrl_ready) begin
        if (wr_left != 0) protocol_errors++;
        wr_idx  = int'(dma_write_ctrl_data.index);
        wr_left = int'(dma_write_ctrl_data.length);
        write_reqs++;
      end else if (dma_write_ctrl_valid) ctrl_waits++;
      if (dma_write_chnl_valid && dma_write_chnl_ready) begin
        if (wr_left == 0) protocol_errors++;
        mem[wr_idx % MEM_WORDS] = dma_write_chnl_data;
        wr_idx++;
        wr_left--;
        write_words++;
      end else if (dma_write_chnl_valid) write_backpressure++;
      dma_write_chnl_ready <= go();
      dma_write_ctrl_ready <= (wr_left == 0) && go() && !(dma_write_ctrl_valid && dma_write_ctrl_ready);
    end
  end

endmodule
