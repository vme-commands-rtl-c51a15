// chip_cmd_gen: serialises control sequences for the front-end chips onto the
// command line (cmd_o), one bit per clock, MSB first; cmd_o is 0 when idle.
//
// Requests come from two sides:
//   * the VME control-sequence commands (wr_stb bits 0x12-0x1e): soft reset, BC
//     reset, configuration register, send FPGA-mask register, strobe delay,
//     threshold / cal amplitude, enable data taking, bias DAC and trim DAC; the
//     chip address is taken from write-data bits 21..16 and 16-bit register data
//     from bits 15..0; the mask comes from the mask register;
//   * the trigger sequencer (seq_valid/seq_cmd/seq_ready): triggers and
//     calibration strobes. It has priority.
// A request is accepted only while the line is idle (busy low); a VME command
// that arrives while a sequence is being sent is dropped, so software polls the
// BUSY bit of the status register first. A frame of n bits starts on cmd_o the
// cycle after it is accepted and lasts n cycles; done pulses in the cycle after
// its last bit.
//
// Which sequences exist is the board's. Their bit patterns are defined by the
// front-end chip's own specification and are not given here: frame_field(),
// frame_len() and the FR_* constants of vme_pkg hold placeholder patterns in
// that chip family's style. The hard reset (0x1c) is not implemented, as on the
// board.
module chip_cmd_gen
  import vme_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [31:0]          wr_stb,
  input  logic [31:0]          wdata,
  input  logic [MASK_BITS-1:0] mask,
  input  logic                 seq_valid,
  input  chip_cmd_e            seq_cmd,
  output logic                 seq_ready,
  output logic                 cmd_o,
  output logic                 busy,
  output logic                 done
);
  localparam int unsigned FRAME_MAX = 7 + 8 + 6 + MASK_BITS;

  // ---- translate a VME strobe into a request ----
  logic      vme_valid;
  chip_cmd_e vme_cmd;
  always_comb begin
    vme_valid = 1'b1;
    case (1'b1)
      wr_stb[SEQ_SOFT_RST]:   vme_cmd = CC_SOFT_RST;
      wr_stb[SEQ_BC_RST]:     vme_cmd = CC_BC_RST;
      wr_stb[SEQ_CFG]:        vme_cmd = CC_CFG;
      wr_stb[SEQ_MASK_SEND]:  vme_cmd = CC_MASK;
      wr_stb[SEQ_STROBE_DLY]: vme_cmd = CC_STROBE;
      wr_stb[SEQ_THR_CAL]:    vme_cmd = CC_THR_CAL;
      wr_stb[SEQ_ENABLE]:     vme_cmd = CC_ENABLE;
      wr_stb[SEQ_BIAS]:       vme_cmd = CC_BIAS;
      wr_stb[SEQ_TRIM]:       vme_cmd = CC_TRIM;
      default: begin
        vme_valid = 1'b0;
        vme_cmd   = CC_L1;
      end
    endcase
  end

  // ---- build a frame, left aligned in FRAME_MAX bits ----
  function automatic logic [FRAME_MAX-1:0] build(chip_cmd_e c, logic [5:0] chip,
                                                 logic [15:0] d16,
                                                 logic [MASK_BITS-1:0] m);
    logic [MASK_BITS-1:0] payload;
    case (c)
      CC_L1:       return {FR_L1, {(FRAME_MAX-3){1'b0}}};
      CC_SOFT_RST: return {FR_SRST, {(FRAME_MAX-7){1'b0}}};
      CC_BC_RST:   return {FR_BCRST, {(FRAME_MAX-7){1'b0}}};
      default: begin
        if (c == CC_MASK)                  payload = m;
        else if (frame_data_bits(c) == 16) payload = {d16, {(MASK_BITS-16){1'b0}}};
        else                               payload = '0;
        return {FR_HEADER, frame_field(c), chip, payload};
      end
    endcase
  endfunction

  logic [FRAME_MAX-1:0]           sreg;
  logic [$clog2(FRAME_MAX+1)-1:0] nleft;

  logic      take_seq, take_vme;
  assign seq_ready = (nleft == 0);
  assign take_seq  = seq_ready && seq_valid;
  assign take_vme  = seq_ready && !seq_valid && vme_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sreg  <= '0;
      nleft <= '0;
      done  <= 1'b0;
    end else begin
      done <= (nleft == 1);
      if (take_seq) begin
        sreg  <= build(seq_cmd, 6'h3f, 16'h0, '0);   // broadcast
        nleft <= ($bits(nleft))'(frame_len(seq_cmd));
      end else if (take_vme) begin
        sreg  <= build(vme_cmd, wdata[21:16], wdata[15:0], mask);
        nleft <= ($bits(nleft))'(frame_len(vme_cmd));
      end else if (nleft != 0) begin
        sreg  <= sreg << 1;
        nleft <= nleft - 1'b1;
      end
    end
  end

  assign cmd_o = (nleft != 0) && sreg[FRAME_MAX-1];
  assign busy  = (nleft != 0);

  a_onehot_vme: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(wr_stb[31:16]));
endmodule
