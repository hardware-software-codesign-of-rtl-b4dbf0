// Shared types and constants of the fully connected (GEMM) accelerator.
//
// The accelerator computes out[k] = sum_l w[k][l] * x[l] over packed low
// precision integers. Data travel as 16-bit "lines": one line holds one 16-bit
// value, two 8-bit values or four 4-bit values, depending on the
// sum-together (ST) configuration. The DMA side is 32 bits wide, outputs are
// 64-bit accumulators. Sizes (64 lanes, 256 input lines, 32 outputs, 8192
// weight lines) are the published configuration; the register map and DMA
// request format follow the ESP accelerator socket conventions.
package fc_pkg;

  localparam int DMA_WIDTH  = 32;   // NoC / DMA data width
  localparam int LINE_WIDTH = 16;   // PLM line width
  localparam int OUT_WIDTH  = 64;   // accumulator and output PLM width
  localparam int PROD_WIDTH = 32;   // ST multiplier result width

  // ST multiplier configuration (CONFIG field, options[2:0])
  typedef enum logic [2:0] {
    ST_16X16 = 3'b000,
    ST_4X4   = 3'b001,
    ST_8X8   = 3'b010,
    ST_8X4   = 3'b011,
    ST_16X8  = 3'b100
  } st_cfg_e;

  // DMA request: start index and length in 32-bit words, transfer size code
  typedef struct packed {
    logic [31:0] index;
    logic [31:0] length;
    logic [2:0]  size;
  } dma_info_t;

  localparam logic [2:0] DMA_SIZE_WORD = 3'b010;

  // User configuration registers of the accelerator
  typedef struct packed {
    logic [31:0] acc;            // bit 0: accumulate onto previous outputs
    logic [31:0] options;        // [2:0]: ST configuration
    logic [31:0] offset_pe;      // reserved
    logic [31:0] offset_q_data;  // reserved
    logic [31:0] n;              // number of inputs (values)
    logic [31:0] m;              // number of outputs
    logic [31:0] in_add;         // input tensor word address
    logic [31:0] w_add;          // weight tensor word address
    logic [31:0] out_add;        // output tensor word address
    logic [31:0] flags;          // reserved (quantization / activation)
  } conf_info_t;

  // Values packed in one 16-bit line for a configuration
  function automatic int unsigned values_per_line(logic [2:0] cfg);
    case (cfg)
      ST_4X4:         return 4;
      ST_8X8, ST_8X4: return 2;
      default:        return 1;
    endcase
  endfunction

endpackage
