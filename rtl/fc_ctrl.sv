// Run controller of the fully connected accelerator.
//
// On start it captures the configuration registers and derives the run
// parameters, then steps through the phases one at a time, never overlapping
// them: LOAD (inputs, then weights, by the memory interface), COMPUTE (the
// computational unit), STORE (outputs back to memory), and finally raises
// acc_done for one cycle. Each phase is entered with a one-cycle *_start
// pulse and left on the matching one-cycle *_done pulse.
//
// Derived parameters:
//   values per 16-bit line v = 1 (16x16, 16x8), 2 (8x8, 8x4) or 4 (4x4)
//   lines    = ceil(N / v),   in_words = ceil(lines / 2)   (32-bit words)
//   n_out    = M
// in_words is limited to IN_DEPTH/2 and n_out to OUT_DEPTH, the PLM capacity;
// larger layers are tiled by software. The phase order and the word count
// follow the published design; the clamping is this design's choice.
module fc_ctrl
  import fc_pkg::*;
#(
  parameter int IN_DEPTH  = 256,
  parameter int OUT_DEPTH = 32,
  localparam int WORDS_W = $clog2(IN_DEPTH / 2 + 1),
  localparam int NOUT_W  = $clog2(OUT_DEPTH + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  conf_info_t           conf,
  output logic                 busy,
  output logic                 acc_done,
  // phase handshakes
  output logic                 load_start,
  input  logic                 load_done,
  output logic                 comp_start,
  input  logic                 comp_done,
  output logic                 store_start,
  input  logic                 store_done,
  // run parameters, stable from start to acc_done
  output logic [2:0]           cfg,
  output logic [WORDS_W-1:0]   in_words,
  output logic [NOUT_W-1:0]    n_out,
  output logic                 acc_en,
  output logic [31:0]          in_add,
  output logic [31:0]          w_add,
  output logic [31:0]          out_add
);

  typedef enum logic [2:0] {IDLE, LOAD, COMPUTE, STORE, FINISH} state_e;
  state_e state;

  localparam logic [32:0] MAX_WORDS = 33'(IN_DEPTH / 2);
  localparam logic [31:0] MAX_OUT   = 32'(OUT_DEPTH);

  logic [32:0] lines, words;

  always_comb begin
    case (values_per_line(conf.options[2:0]))
      4:       lines = ({1'b0, conf.n} + 33'd3) >> 2;
      2:       lines = ({1'b0, conf.n} + 33'd1) >> 1;
      default: lines = {1'b0, conf.n};
    endcase
    words = (lines + 33'd1) >> 1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= IDLE;
      cfg         <= ST_16X16;
      in_words    <= '0;
      n_out       <= '0;
      acc_en      <= 1'b0;
      in_add      <= '0;
      w_add       <= '0;
      out_add     <= '0;
      load_start  <= 1'b0;
      comp_start  <= 1'b0;
      store_start <= 1'b0;
      acc_done    <= 1'b0;
    end else begin
      load_start  <= 1'b0;
      comp_start  <= 1'b0;
      store_start <= 1'b0;
      acc_done    <= 1'b0;
      case (state)
        IDLE: if (start) begin
          cfg        <= conf.options[2:0];
          in_words   <= WORDS_W'((words > MAX_WORDS) ? MAX_WORDS : words);
          n_out      <= NOUT_W'((conf.m > MAX_OUT) ? MAX_OUT : conf.m);
          acc_en     <= conf.acc[0];
          in_add     <= conf.in_add;
          w_add      <= conf.w_add;
          out_add    <= conf.out_add;
          load_start <= 1'b1;
          state      <= LOAD;
        end
        LOAD: if (load_done) begin
          comp_start <= 1'b1;
          state      <= COMPUTE;
        end
        COMPUTE: if (comp_done) begin
          store_start <= 1'b1;
          state       <= STORE;
        end
        STORE: if (store_done) begin
          acc_done <= 1'b1;
          state    <= FINISH;
        end
        FINISH: state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);

endmodule
