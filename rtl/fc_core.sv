// Computational unit of the fully connected accelerator (output stationary).
//
// For every output k < n_out, the unit walks the input vector in chunks of
// PE_NUM 16-bit lines (lines = 2*in_words). Each cycle it reads PE_NUM input
// lines (input PLM lines c*PE_NUM ..) and the matching PE_NUM weight lines
// (weight PLM lines k*lines + c*PE_NUM ..), multiplies them in the 64-lane
// sum-together MAC array and adds the adder-plane result to a 64-bit
// accumulator. After the last chunk of an output the accumulator is written to
// output PLM entry k. With acc_en set the accumulator starts from the value
// already in entry k instead of zero, so several runs over slices of a long
// input vector add up into one output.
//
// Pipeline (this design's choice; the published design leaves scheduling to
// HLS): issue PLM reads -> MAC array + adder plane -> accumulate/write. One
// chunk is issued per cycle with no bubbles, also across outputs, so a run
// takes n_out * ceil(2*in_words / PE_NUM) issue cycles, and done is high
// n_out * ceil(2*in_words / PE_NUM) + 2 clock edges after the edge that
// sampled start. start is sampled in IDLE together with cfg,
// in_words, n_out and acc_en, which are held internally for the run.
// Lanes past the end of the vector are masked to zero. Quantization of the
// result is not performed: the output is the raw accumulator.
module fc_core
  import fc_pkg::*;
#(
  parameter int PE_NUM    = 64,
  parameter int IN_DEPTH  = 256,
  parameter int W_DEPTH   = 8192,
  parameter int OUT_DEPTH = 32,
  localparam int IN_AW   = $clog2(IN_DEPTH),
  localparam int W_AW    = $clog2(W_DEPTH),
  localparam int OUT_AW  = $clog2(OUT_DEPTH),
  localparam int WORDS_W = $clog2(IN_DEPTH / 2 + 1),
  localparam int NOUT_W  = $clog2(OUT_DEPTH + 1)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // control
  input  logic                          start,
  input  logic [2:0]                    cfg,
  input  logic [WORDS_W-1:0]            in_words,
  input  logic [NOUT_W-1:0]             n_out,
  input  logic                          acc_en,
  output logic                          busy,
  output logic                          done,
  // input PLM wide read port
  output logic                          in_rd_en,
  output logic [IN_AW-1:0]              in_rd_line,
  input  logic [PE_NUM-1:0][15:0]       in_rd_data,
  // weight PLM wide read port
  output logic                          w_rd_en,
  output logic [W_AW-1:0]               w_rd_line,
  input  logic [PE_NUM-1:0][15:0]       w_rd_data,
  // output PLM read/write ports
  output logic                          out_rd_en,
  output logic [OUT_AW-1:0]             out_rd_addr,
  input  logic [OUT_WIDTH-1:0]          out_rd_data,
  output logic                          out_wr_en,
  output logic [OUT_AW-1:0]             out_wr_addr,
  output logic [OUT_WIDTH-1:0]          out_wr_data
);

  localparam int PW    = $clog2(PE_NUM);
  localparam int SUM_W = PROD_WIDTH + PW;
  localparam int LW    = IN_AW + 1;          // lines per vector, up to IN_DEPTH
  localparam int CW    = LW - PW + 1;        // chunk counter

  typedef enum logic [1:0] {IDLE, RUN, DRAIN} state_e;
  state_e state;

  // run configuration
  logic [2:0]         cfg_q;
  logic               acc_en_q;
  logic [LW-1:0]      lines_q;
  logic [CW-1:0]      chunks_q;
  logic [NOUT_W-1:0]  n_out_q;

  // issue counters
  logic [OUT_AW-1:0]  k;
  logic [CW-1:0]      c;
  logic [W_AW-1:0]    w_base;               // k * lines

  logic               issue, is_first, is_last, is_final;
  logic [LW-1:0]      remaining;
  logic [PE_NUM-1:0]  lane_mask;

  // stage 1: PLM data present
  logic               s1_valid, s1_first, s1_last, s1_final;
  logic [OUT_AW-1:0]  s1_k;
  logic [PE_NUM-1:0]  s1_mask;
  logic signed [SUM_W-1:0] mac_sum;

  // stage 2: accumulate
  logic               s2_valid, s2_first, s2_last, s2_final;
  logic [OUT_AW-1:0]  s2_k;
  logic signed [SUM_W-1:0]     s2_sum;
  logic [OUT_WIDTH-1:0]        s2_init;
  logic [OUT_WIDTH-1:0]        acc_q, acc_next;

  logic [LW-1:0]      lines_in;
  assign lines_in = LW'(in_words) << 1;

  // ---------------------------------------------------------------- issue
  assign issue    = (state == RUN);
  assign is_first = (c == '0);
  assign is_last  = (c == chunks_q - 1'b1);
  assign is_final = is_last && (NOUT_W'(k) == n_out_q - 1'b1);
  assign remaining = lines_q - LW'({c, PW'(0)});

  always_comb begin
    for (int j = 0; j < PE_NUM; j++)
      lane_mask[j] = (LW'(j) < remaining);
  end

  assign in_rd_en    = issue;
  assign in_rd_line  = IN_AW'({c, PW'(0)});
  assign w_rd_en     = issue;
  assign w_rd_line   = w_base + W_AW'({c, PW'(0)});
  assign out_rd_en   = issue && is_first && acc_en_q;
  assign out_rd_addr = k;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      cfg_q    <= ST_16X16;
      acc_en_q <= 1'b0;
      lines_q  <= '0;
      chunks_q <= '0;
      n_out_q  <= '0;
      k        <= '0;
      c        <= '0;
      w_base   <= '0;
    end else begin
      case (state)
        IDLE: if (start) begin
          cfg_q    <= cfg;
          acc_en_q <= acc_en;
          lines_q  <= lines_in;
          chunks_q <= CW'((lines_in + LW'(PE_NUM - 1)) >> PW);
          n_out_q  <= n_out;
          k        <= '0;
          c        <= '0;
          w_base   <= '0;
          // an empty run finishes through the drain state at once
          state    <= (in_words == '0 || n_out == '0) ? DRAIN : RUN;
        end
        RUN: begin
          if (is_last) begin
            c      <= '0;
            k      <= k + 1'b1;
            w_base <= w_base + W_AW'(lines_q);
          end else begin
            c <= c + 1'b1;
          end
          if (is_final) state <= DRAIN;
        end
        DRAIN: if (done) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  // ---------------------------------------------------- stage 1: MAC array
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_first <= 1'b0;
      s1_last  <= 1'b0;
      s1_final <= 1'b0;
      s1_k     <= '0;
      s1_mask  <= '0;
    end else begin
      s1_valid <= issue;
      s1_first <= is_first;
      s1_last  <= is_last;
      s1_final <= is_final;
      s1_k     <= k;
      s1_mask  <= lane_mask;
    end
  end

  st_mac_array #(.PE_NUM(PE_NUM)) u_mac (
    .cfg     (cfg_q),
    .lane_en (s1_mask),
    .w       (w_rd_data),
    .x       (in_rd_data),
    .sum     (mac_sum)
  );

  // ------------------------------------------------ stage 2: accumulation
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_valid <= 1'b0;
      s2_first <= 1'b0;
      s2_last  <= 1'b0;
      s2_final <= 1'b0;
      s2_k     <= '0;
      s2_sum   <= '0;
      s2_init  <= '0;
      acc_q    <= '0;
      done     <= 1'b0;
    end else begin
      s2_valid <= s1_valid;
      s2_first <= s1_first;
      s2_last  <= s1_last;
      s2_final <= s1_final;
      s2_k     <= s1_k;
      s2_sum   <= mac_sum;
      if (s1_valid && s1_first) s2_init <= acc_en_q ? out_rd_data : '0;
      if (s2_valid) acc_q <= acc_next;
      done <= (s2_valid && s2_final) || (state == DRAIN && !s2_valid && !s1_valid && !done);
    end
  end

  assign acc_next    = (s2_first ? s2_init : acc_q) + OUT_WIDTH'(s2_sum);
  assign out_wr_en   = s2_valid && s2_last;
  assign out_wr_addr = s2_k;
  assign out_wr_data = acc_next;

  assign busy = (state != IDLE);

endmodule
