// vme_pkg: command codes, constants and types shared by the test-board FPGA.
//
// The VME local address selects one of 32 commands with bits 8..4: bit 8 = 0
// gives the board commands 0x00-0x0f (memories, FIFO, DACs, triggering), bit 8 = 1
// gives the chip control sequences 0x10-0x1f. The codes below follow the two
// command tables of the board. The chip command frames at the end of the
// package are this design's own choice: the board only names the sequences and
// defers their bit patterns to the front-end chip's specification, so the
// patterns here are placeholders in the style of that chip family (a 3-bit
// trigger, 7-bit fast commands, a 7-bit header for register loads) and must be
// replaced by the real ones before use with a chip.
package vme_pkg;

  typedef enum logic [4:0] {
    CMD_STATUS     = 5'h00,  // read  FPGA status register
    CMD_TV_RST     = 5'h01,  // write reset test vector memory counter
    CMD_SV_RST     = 5'h02,  // write reset simulation vector memory counter
    CMD_HIST_CLR   = 5'h03,  // write clear histogram memory
    CMD_HIST_RD    = 5'h04,  // read  histogram memory, increment pointer
    CMD_HIST_BASE  = 5'h05,  // write histogram base address, reset pointer
    CMD_TV_SEND    = 5'h06,  // write send test vector
    CMD_TV_WR      = 5'h07,  // write test vector memory, increment counter
    CMD_SV_WR      = 5'h08,  // write simulation vector memory, increment counter
    CMD_FIFO_RST   = 5'h09,  // write reset ReSync FIFO
    CMD_DAC        = 5'h0a,  // write set DAC
    CMD_ADC_CONV   = 5'h0b,  // write ADC convert (not implemented on the board)
    CMD_ADC_RD     = 5'h0c,  // read  ADC data (not implemented on the board)
    CMD_FIFO_RD    = 5'h0d,  // read  ReSync FIFO
    CMD_TRIG_START = 5'h0e,  // write start triggers, decode and histogram
    CMD_FREQ       = 5'h0f,  // write set clock frequency (M, N, T)
    SEQ_T2T        = 5'h10,  // write trigger-to-trigger delay
    SEQ_NTRIG      = 5'h11,  // write triggers per burst
    SEQ_SOFT_RST   = 5'h12,  // write soft reset (all chips)
    SEQ_BC_RST     = 5'h13,  // write BC reset (all chips)
    SEQ_CFG        = 5'h14,  // write configuration register
    SEQ_MASK_PRST  = 5'h15,  // write reset FPGA-mask register pointer
    SEQ_MASK_WR    = 5'h16,  // write 32 bits to FPGA-mask register
    SEQ_MASK_SEND  = 5'h17,  // write send FPGA-mask register to a chip
    SEQ_STROBE_DLY = 5'h18,  // write strobe delay register
    SEQ_THR_CAL    = 5'h19,  // write threshold / cal DAC amplitude register
    SEQ_ENABLE     = 5'h1a,  // write enable data taking
    SEQ_SELECT     = 5'h1b,  // write select register
    SEQ_HARD_RST   = 5'h1c,  // write hard reset (not implemented on the board)
    SEQ_BIAS       = 5'h1d,  // write bias DAC
    SEQ_TRIM       = 5'h1e,  // write trim DAC
    SEQ_S2T        = 5'h1f   // write strobe-to-trigger delay
  } cmd_e;

  localparam logic [15:0] STATUS_ID = 16'hFACE;  // low half of the status word

  // One decoded local-bus access.
  typedef struct packed {
    logic        rnw;    // 1 = read
    logic [31:1] addr;
    logic [31:0] data;   // write data
  } access_t;

  // Sequences the chip command generator can send.
  typedef enum logic [3:0] {
    CC_L1       = 4'd0,   // level-1 trigger
    CC_SOFT_RST = 4'd1,
    CC_BC_RST   = 4'd2,
    CC_CFG      = 4'd3,
    CC_MASK     = 4'd4,
    CC_STROBE   = 4'd5,   // strobe delay register
    CC_THR_CAL  = 4'd6,
    CC_ENABLE   = 4'd7,
    CC_BIAS     = 4'd8,
    CC_TRIM     = 4'd9,
    CC_CALPULSE = 4'd10   // calibration strobe ahead of a trigger
  } chip_cmd_e;

  localparam int MASK_BITS = 128;  // mask register: 4 writes of 32 bits

  typedef struct packed {
    chip_cmd_e              cmd;
    logic [5:0]             chip;   // chip address, VME data bits 21..16
    logic [MASK_BITS-1:0]   data;   // 16-bit register data in bits 15..0, or the mask
  } chip_req_t;

  // Placeholder frame patterns (see the header of this file).
  localparam logic [2:0] FR_L1     = 3'b110;
  localparam logic [6:0] FR_SRST   = 7'b1010100;
  localparam logic [6:0] FR_BCRST  = 7'b1010010;
  localparam logic [6:0] FR_HEADER = 7'b1010111;

  // 8-bit command field of a register-load frame (type, then command).
  function automatic logic [7:0] frame_field(chip_cmd_e c);
    case (c)
      CC_CFG:      return 8'b000_00000;
      CC_BIAS:     return 8'b010_00001;
      CC_STROBE:   return 8'b010_00010;
      CC_THR_CAL:  return 8'b010_00011;
      CC_TRIM:     return 8'b010_00100;
      CC_MASK:     return 8'b100_00001;
      CC_CALPULSE: return 8'b100_00100;
      CC_ENABLE:   return 8'b101_00011;
      default:     return 8'h00;
    endcase
  endfunction

  // Number of data bits a register-load frame carries after the chip address.
  function automatic int frame_data_bits(chip_cmd_e c);
    case (c)
      CC_CFG, CC_BIAS, CC_STROBE, CC_THR_CAL, CC_TRIM: return 16;
      CC_MASK:                                         return MASK_BITS;
      default:                                         return 0;
    endcase
  endfunction

  // Total frame length in bits.
  function automatic int frame_len(chip_cmd_e c);
    case (c)
      CC_L1:                return 3;
      CC_SOFT_RST, CC_BC_RST: return 7;
      default:              return 7 + 8 + 6 + frame_data_bits(c);
    endcase
  endfunction

endpackage
