// trigger_sequencer: sends a burst of triggers to the front-end chips.
//
// Four registers are written over VME: the trigger-to-trigger delay (0x10,
// 16 bits, clock cycles), the number of triggers per burst (0x11, 16 bits), the
// select register (0x1b: bit 0 selects the ABC or ABCD chip flavour, bit 1
// enables the calibration strobe) and the strobe-to-trigger delay (0x1f, 8 bits,
// clock cycles). The start command (0x0e) sends the burst: for each of the
// ntrig triggers, a calibration strobe if strobes are enabled, then a level-1
// trigger, both as requests to the chip command generator.
//
// Delays are measured between the first bits of two frames on the command line:
//   strobe  -> trigger of the same pair: s2t cycles,
//   trigger -> next strobe (or next trigger without strobes): t2t cycles.
// A delay shorter than the preceding frame (plus one idle cycle) is stretched to
// that, since the command line carries one frame at a time. busy is high from
// the start command until the last trigger has been handed to the generator;
// a start while busy is ignored, a burst of 0 triggers sends nothing.
//
// The registers, their widths and the sequence are the board's; measuring the
// delays frame start to frame start is this design's reading of "delay in cc".
module trigger_sequencer
  import vme_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] wr_stb,
  input  logic [31:0] wdata,
  output logic        seq_valid,
  output chip_cmd_e   seq_cmd,
  input  logic        seq_ready,
  output logic        busy,
  output logic        abcd_sel,
  output logic        strobe_en,
  output logic [15:0] trig_sent      // triggers sent in the current/last burst
);
  typedef enum logic [1:0] {S_IDLE, S_STB, S_TRG} state_e;

  logic [15:0] t2t, ntrig;
  logic [7:0]  s2t;
  state_e      state;
  logic [16:0] cnt, need;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t2t       <= '0;
      ntrig     <= '0;
      s2t       <= '0;
      abcd_sel  <= 1'b0;
      strobe_en <= 1'b0;
    end else begin
      if (wr_stb[SEQ_T2T])   t2t   <= wdata[15:0];
      if (wr_stb[SEQ_NTRIG]) ntrig <= wdata[15:0];
      if (wr_stb[SEQ_S2T])   s2t   <= wdata[7:0];
      if (wr_stb[SEQ_SELECT]) begin
        abcd_sel  <= wdata[0];
        strobe_en <= wdata[1];
      end
    end
  end

  logic accept;
  assign accept = seq_valid && seq_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      need      <= '0;
      trig_sent <= '0;
    end else begin
      if (cnt != '1) cnt <= cnt + 1'b1;
      unique case (state)
        S_IDLE: if (wr_stb[CMD_TRIG_START]) begin
          trig_sent <= '0;
          need      <= '0;
          if (ntrig != 0) state <= strobe_en ? S_STB : S_TRG;
        end
        S_STB: if (accept) begin
          cnt   <= 17'd1;
          need  <= {9'b0, s2t};
          state <= S_TRG;
        end
        S_TRG: if (accept) begin
          cnt       <= 17'd1;
          need      <= {1'b0, t2t};
          trig_sent <= trig_sent + 16'd1;
          if (trig_sent + 16'd1 == ntrig) state <= S_IDLE;
          else                            state <= strobe_en ? S_STB : S_TRG;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign seq_valid = (state != S_IDLE) && (cnt >= need);
  assign seq_cmd   = (state == S_STB) ? CC_CALPULSE : CC_L1;
  assign busy      = (state != S_IDLE);
endmodule
