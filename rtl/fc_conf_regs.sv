// Memory-mapped configuration registers of the fully connected accelerator.
//
// The CPU programs a run through an APB-style slave (zero wait states,
// pready tied high) and polls STATUS for completion. Register map (byte
// offsets):
//   0x00 CMD        bit 0 = start; writing it clears STATUS.done
//   0x04 STATUS     read only: bit 0 running, bit 1 done
//   0x0C DEVID      read only: device identifier
//   0x40 FLAGS      reserved (quantization / activation), stored only
//   0x44 OUT_ADD    output tensor word address
//   0x48 W_ADD      weight tensor word address
//   0x4C IN_ADD     input tensor word address
//   0x50 N          number of input values
//   0x54 M          number of outputs
//   0x58 OFFSET_Q_DATA reserved, stored only
//   0x5C OFFSET_PE  reserved, stored only
//   0x60 OPTIONS    bits [2:0] ST configuration (000 16 bit, 010 8 bit, 001 4 bit,
//                   100 16x8, 011 8x4)
//   0x64 ACC        bit 0: add results to the outputs of the previous run
// Writing CMD with bit 0 set while idle gives a one-cycle start pulse on the
// next cycle; conf carries the register values at all times. The done input
// (one-cycle pulse) sets STATUS.done and clears STATUS.running.
// The register set and the offsets of CMD, STATUS, DEVID and IN_ADD..ACC are
// the published ones; the FLAGS/OUT_ADD/W_ADD offsets, the APB bus, the
// DEVID value and the reset values (all zero) are this design's choices.
module fc_conf_regs
  import fc_pkg::*;
#(
  parameter logic [31:0] DEVID = 32'h0000_0FC0
) (
  input  logic          clk,
  input  logic          rst_n,
  // APB slave
  input  logic          psel,
  input  logic          penable,
  input  logic          pwrite,
  input  logic [7:0]    paddr,
  input  logic [31:0]   pwdata,
  output logic [31:0]   prdata,
  output logic          pready,
  // to / from the accelerator
  output conf_info_t    conf,
  output logic          start,
  input  logic          done
);

  localparam logic [7:0] CMD_REG = 8'h00, STATUS_REG = 8'h04, DEVID_REG = 8'h0C,
                         FLAGS_REG = 8'h40, OUT_ADD_REG = 8'h44, W_ADD_REG = 8'h48,
                         IN_ADD_REG = 8'h4C, N_REG = 8'h50, M_REG = 8'h54,
                         OFFSET_Q_DATA_REG = 8'h58, OFFSET_PE_REG = 8'h5C,
                         OPTIONS_REG = 8'h60, ACC_REG = 8'h64;

  logic [31:0] cmd;
  logic        running, done_q;
  logic        wr;

  assign pready = 1'b1;
  assign wr     = psel && penable && pwrite;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd     <= '0;
      conf    <= '0;
      running <= 1'b0;
      done_q  <= 1'b0;
      start   <= 1'b0;
    end else begin
      start <= 1'b0;
      if (done) begin
        running <= 1'b0;
        done_q  <= 1'b1;
      end
      if (wr) begin
        case (paddr)
          CMD_REG: begin
            cmd    <= pwdata;
            done_q <= 1'b0;
            if (pwdata[0] && !running) begin
              start   <= 1'b1;
              running <= 1'b1;
            end
          end
          FLAGS_REG:         conf.flags         <= pwdata;
          OUT_ADD_REG:       conf.out_add       <= pwdata;
          W_ADD_REG:         conf.w_add         <= pwdata;
          IN_ADD_REG:        conf.in_add        <= pwdata;
          N_REG:             conf.n             <= pwdata;
          M_REG:             conf.m             <= pwdata;
          OFFSET_Q_DATA_REG: conf.offset_q_data <= pwdata;
          OFFSET_PE_REG:     conf.offset_pe     <= pwdata;
          OPTIONS_REG:       conf.options       <= pwdata;
          ACC_REG:           conf.acc           <= pwdata;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    case (paddr)
      CMD_REG:           prdata = cmd;
      STATUS_REG:        prdata = {30'b0, done_q, running};
      DEVID_REG:         prdata = DEVID;
      FLAGS_REG:         prdata = conf.flags;
      OUT_ADD_REG:       prdata = conf.out_add;
      W_ADD_REG:         prdata = conf.w_add;
      IN_ADD_REG:        prdata = conf.in_add;
      N_REG:             prdata = conf.n;
      M_REG:             prdata = conf.m;
      OFFSET_Q_DATA_REG: prdata = conf.offset_q_data;
      OFFSET_PE_REG:     prdata = conf.offset_pe;
      OPTIONS_REG:       prdata = conf.options;
      ACC_REG:           prdata = conf.acc;
      default:           prdata = '0;
    endcase
  end

endmodule
