// abcd_test_fpga: FPGA of a VME test board for ABC/ABCD silicon-strip front-end
// chips and modules.
//
// A VME crate controller talks to the board through a Cypress VME interface
// (CY960 controller plus CY964 transceivers). The FPGA
//   * loads the CY964 address comparators at start-up (svic_init) so that the
//     board answers to the address set on its DIP switches in bits 31..24,
//   * turns VCOMP*(3) into the CY960 region input (only region 8 is used),
//   * takes each local-bus access of the CY960 (local_bus_slave) and decodes
//     address bits 8..4 into one of 32 commands (cmd_decoder),
//   * executes them: status register (0x00), test and simulation vector
//     memories (vector_memory x2), histogram memory (hist_memory), ReSync FIFO
//     (resync_fifo), DAC loading (dac_loader), clock-synthesizer setting
//     (freq_loader), and the chip control sequences: FPGA-mask register
//     (mask_register), trigger bursts (trigger_sequencer) and the serial chip
//     command line (chip_cmd_gen).
//
// All logic runs on clk, which also clocks the local bus; the ReSync FIFO's
// write side runs on the chip-data clock dclk. The data bus is split into
// ldata_i / ldata_o / ldata_oe for an external tri-state buffer. Parts outside
// the FPGA whose signals are brought out: DACs, clock synthesizer, chip command
// line, test/simulation vector outputs, and the chip-data decoder, whose
// decoded hits (hit_*) feed the histogram and whose words (fifo_*) fill the
// ReSync FIFO. ADC commands (0x0b, 0x0c) and the hard reset (0x1c) are
// acknowledged and do nothing. The CY960 inputs LDEN*, PREN*, SWDEN* and
// STROBE are unused and therefore not ports.
//
// BUSY (status bit 16) is the OR of every block that can still be working on a
// previous command.
module abcd_test_fpga
  import vme_pkg::*;
#(
  parameter int unsigned VEC_DEPTH  = 1024,
  parameter int unsigned FIFO_DEPTH = 512,
  parameter int unsigned SER_HALF   = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  // board and VME interface
  input  logic [7:0]  board_addr,
  input  logic [3:0]  vcomp_n,
  output logic [3:0]  svic_region,
  input  logic [5:0]  svic_cs,
  input  logic [3:0]  svic_dbe,
  input  logic        svic_r_w_n,
  input  logic        svic_lds,
  output logic        svic_lack_n,
  output logic        svic_lirq_n,
  input  logic [31:1] laddr,
  input  logic [31:0] ldata_i,
  output logic [31:0] ldata_o,
  output logic        ldata_oe,
  output logic        vme_xcvr_mwb_n,
  output logic        vme_xcvr_lds,
  output logic        vme_xcvr_strobe_n,
  // front-end chip side
  output logic        chip_cmd,
  output logic        abcd_sel,
  output logic [17:0] tv_data,
  output logic        tv_valid,
  output logic [17:0] sv_data,
  output logic        sv_valid,
  // DACs and clock synthesizer
  output logic [7:0]  dac_cs_n,
  output logic        dac_sclk,
  output logic        dac_sdi,
  output logic        synth_sclk,
  output logic        synth_sdata,
  output logic        synth_load,
  // chip-data words into the ReSync FIFO (chip-data clock domain)
  input  logic        dclk,
  input  logic        drst_n,
  input  logic        fifo_wr,
  input  logic [16:0] fifo_wdata,
  output logic        fifo_full,
  // decoded hits into the histogram
  input  logic        hit_valid,
  output logic        hit_ready,
  input  logic        hit_stream_a,
  input  logic [6:0]  hit_channel
);
  // ---------------- VME front end ----------------
  logic        init_done;
  logic [31:0] init_data, slv_data;
  logic        init_oe, slv_oe;

  svic_init u_init (
    .clk, .rst_n, .board_addr, .svic_lds,
    .vme_xcvr_lds, .vme_xcvr_strobe_n, .vme_xcvr_mwb_n,
    .ldata_o (init_data),
    .ldata_oe(init_oe),
    .done    (init_done)
  );

  assign svic_region = {~vcomp_n[3], 3'b000};
  assign svic_lirq_n = 1'b1;

  logic        acc_valid, rd_valid;
  access_t     acc;
  logic [31:0] rd_data;

  local_bus_slave u_slave (
    .clk, .rst_n,
    .enable(init_done),
    .svic_cs, .svic_dbe, .svic_r_w_n, .laddr, .ldata_i,
    .ldata_o (slv_data),
    .ldata_oe(slv_oe),
    .svic_lack_n,
    .acc_valid, .acc, .rd_valid, .rd_data
  );

  assign ldata_o  = init_done ? slv_data : init_data;
  assign ldata_oe = init_done ? slv_oe   : init_oe;

  logic [31:0] wr_stb, rd_stb, wdata;
  logic        busy;
  logic        hist_rd_valid, fifo_rd_valid;
  logic [31:0] hist_rd_data, fifo_rd_data;

  cmd_decoder u_dec (
    .clk, .rst_n, .acc_valid, .acc,
    .wr_stb, .rd_stb, .wdata, .busy,
    .hist_rd_valid, .hist_rd_data,
    .fifo_rd_valid, .fifo_rd_data,
    .rd_valid, .rd_data
  );

  // ---------------- board commands ----------------
  logic tv_busy, sv_busy;
  logic [$clog2(VEC_DEPTH):0] tv_len, sv_len;

  vector_memory #(.WIDTH(18), .DEPTH(VEC_DEPTH)) u_tvmem (
    .clk, .rst_n,
    .cnt_rst (wr_stb[CMD_TV_RST]),
    .wr      (wr_stb[CMD_TV_WR]),
    .wdata   (wdata[17:0]),
    .play    (wr_stb[CMD_TV_SEND]),
    .vec_data(tv_data),
    .vec_valid(tv_valid),
    .busy    (tv_busy),
    .length  (tv_len)
  );

  vector_memory #(.WIDTH(18), .DEPTH(VEC_DEPTH)) u_svmem (
    .clk, .rst_n,
    .cnt_rst (wr_stb[CMD_SV_RST]),
    .wr      (wr_stb[CMD_SV_WR]),
    .wdata   (wdata[17:0]),
    .play    (wr_stb[CMD_TV_SEND]),
    .vec_data(sv_data),
    .vec_valid(sv_valid),
    .busy    (sv_busy),
    .length  (sv_len)
  );

  logic hist_busy;
  hist_memory u_hist (
    .clk, .rst_n,
    .clear   (wr_stb[CMD_HIST_CLR]),
    .base_wr (wr_stb[CMD_HIST_BASE]),
    .base    (wdata[7:0]),
    .rd_req  (rd_stb[CMD_HIST_RD]),
    .rd_valid(hist_rd_valid),
    .rd_data (hist_rd_data),
    .inc_valid   (hit_valid),
    .inc_ready   (hit_ready),
    .inc_stream_a(hit_stream_a),
    .inc_channel (hit_channel),
    .busy    (hist_busy)
  );

  logic        fifo_empty;
  logic [15:0] fifo_overflow;
  resync_fifo #(.WIDTH(17), .DEPTH(FIFO_DEPTH)) u_fifo (
    .wclk(dclk), .wrst_n(drst_n), .wr(fifo_wr), .wdata(fifo_wdata),
    .full(fifo_full), .overflow(fifo_overflow),
    .clk, .rst_n,
    .clear   (wr_stb[CMD_FIFO_RST]),
    .rd_req  (rd_stb[CMD_FIFO_RD]),
    .rd_valid(fifo_rd_valid),
    .rd_data (fifo_rd_data),
    .empty   (fifo_empty)
  );

  logic dac_busy, freq_busy;
  dac_loader #(.HALF(SER_HALF)) u_dac (
    .clk, .rst_n, .wr(wr_stb[CMD_DAC]), .wdata,
    .dac_cs_n, .dac_sclk, .dac_sdi, .busy(dac_busy)
  );

  freq_loader #(.HALF(SER_HALF)) u_freq (
    .clk, .rst_n, .wr(wr_stb[CMD_FREQ]), .wdata,
    .synth_sclk, .synth_sdata, .synth_load, .busy(freq_busy)
  );

  // ---------------- chip control sequences ----------------
  logic [MASK_BITS-1:0] mask;
  logic [2:0]           mask_ptr;
  mask_register u_mask (
    .clk, .rst_n,
    .ptr_rst(wr_stb[SEQ_MASK_PRST]),
    .wr     (wr_stb[SEQ_MASK_WR]),
    .wdata, .mask, .ptr(mask_ptr)
  );

  logic      seq_valid, seq_ready, trig_busy, strobe_en;
  chip_cmd_e seq_cmd;
  logic [15:0] trig_sent;
  trigger_sequencer u_trig (
    .clk, .rst_n, .wr_stb, .wdata,
    .seq_valid, .seq_cmd, .seq_ready,
    .busy(trig_busy), .abcd_sel, .strobe_en, .trig_sent
  );

  logic cmd_busy, cmd_done;
  chip_cmd_gen u_cmd (
    .clk, .rst_n, .wr_stb, .wdata, .mask,
    .seq_valid, .seq_cmd, .seq_ready,
    .cmd_o(chip_cmd), .busy(cmd_busy), .done(cmd_done)
  );

  assign busy = trig_busy | cmd_busy | hist_busy | tv_busy | sv_busy | dac_busy | freq_busy;
endmodule
