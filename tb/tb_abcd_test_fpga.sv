// tb_abcd_test_fpga: end-to-end test of the board FPGA at its default sizes.
//
// The testbench plays the parts around the FPGA: the CY964 transceivers
// (captures the compare/mask register load), the CY960 (runs local-bus read and
// write cycles: CS, then DBE, wait for LACK*, release), the chip-data side
// (writes words into the ReSync FIFO on its own clock, offers decoded hits),
// the DACs and clock synthesizer (serial receivers) and the front-end chip's
// command input (a frame decoder on chip_cmd). Every command of the two command
// tables is issued over the bus and its effect compared with values computed
// here, including the spacing of strobes and triggers in a burst. Each
// mechanism is counted, and one that never happened is a failure.
module tb_abcd_test_fpga;
  import vme_pkg::*;
  logic clk = 0, rst_n = 0, dclk = 0, drst_n = 0;
  always #6 clk = ~clk;     // FPGA / local-bus clock
  always #12.5 dclk = ~dclk; // chip-data clock
  int checks = 0, failures = 0;

  localparam logic [7:0] BOARD = 8'h3C;

  logic [3:0]  vcomp_n;
  logic [3:0]  svic_region;
  logic [5:0]  svic_cs = 0;
  logic [3:0]  svic_dbe = 0;
  logic        svic_r_w_n = 0, svic_lds = 0;
  logic        svic_lack_n, svic_lirq_n;
  logic [31:1] laddr = 0;
  logic [31:0] ldata_i = 0, ldata_o;
  logic        ldata_oe, mwb_n, xlds, xstrobe_n;
  logic        chip_cmd, abcd_sel;
  logic [17:0] tv_data, sv_data;
  logic        tv_valid, sv_valid;
  logic [7:0]  dac_cs_n;
  logic        dac_sclk, dac_sdi, synth_sclk, synth_sdata, synth_load;
  logic        fifo_wr = 0, fifo_full;
  logic [16:0] fifo_wdata = 0;
  logic        hit_valid = 0, hit_ready, hit_stream_a = 0;
  logic [6:0]  hit_channel = 0;

  abcd_test_fpga dut (
    .clk, .rst_n, .board_addr(BOARD), .vcomp_n, .svic_region, .svic_cs, .svic_dbe,
    .svic_r_w_n, .svic_lds, .svic_lack_n, .svic_lirq_n, .laddr, .ldata_i, .ldata_o,
    .ldata_oe, .vme_xcvr_mwb_n(mwb_n), .vme_xcvr_lds(xlds), .vme_xcvr_strobe_n(xstrobe_n),
    .chip_cmd, .abcd_sel, .tv_data, .tv_valid, .sv_data, .sv_valid,
    .dac_cs_n, .dac_sclk, .dac_sdi, .synth_sclk, .synth_sdata, .synth_load,
    .dclk, .drst_n, .fifo_wr, .fifo_wdata, .fifo_full,
    .hit_valid, .hit_ready, .hit_stream_a, .hit_channel);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_xcvr_load, n_wr, n_rd, n_busy_seen, n_tv_word, n_sv_word, n_hist_inc,
      n_hist_clear, n_fifo_word, n_fifo_empty_rd, n_dac, n_freq, n_l1, n_cal,
      n_srst, n_bcrst, n_regload, n_mask_frame, n_noop;

  // ---------------- CY964 model: register load at start-up ----------------
  logic [31:0] xcvr_cmp = '1, xcvr_mask = '1;
  logic xstrobe_q = 1;
  always @(posedge clk) begin
    xstrobe_q <= xstrobe_n;
    if (rst_n && xstrobe_n && !xstrobe_q) begin
      n_xcvr_load++;
      if (xlds) begin xcvr_cmp = ldata_o; xcvr_mask = 0; end else xcvr_mask = ldata_o;
    end
  end
  // the comparators answer with VCOMP*(3) when the address matches
  assign vcomp_n = {(((laddr[31:24] ^ xcvr_cmp[31:24]) & ~xcvr_mask[31:24]) != 8'h00), 3'b111};

  // ---------------- CY960 model: local-bus cycles ----------------
  task automatic bus_cycle(bit rd, logic [4:0] code, logic [31:0] d, output logic [31:0] q);
    logic [31:0] a;
    int n = 0;
    a = {BOARD, 15'($urandom), code, 4'($urandom)};
    @(negedge clk); laddr = a[31:1]; ldata_i = d; svic_r_w_n = rd;
    @(negedge clk);
    check(svic_region == 4'b1000, "region 8 from VCOMP*(3)");
    svic_cs = 6'b000001;
    @(negedge clk); svic_dbe = 4'hF;
    while (svic_lack_n && n < 100000) begin @(negedge clk); n++; end
    check(!svic_lack_n, "LACK* asserted");
    q = ldata_o;
    if (rd) check(ldata_oe, "data driven on read");
    svic_cs = 0; svic_dbe = 0;
    @(negedge clk);
    if (rd) n_rd++; else n_wr++;
  endtask
  task automatic vme_write(logic [4:0] code, logic [31:0] d);
    logic [31:0] q; bus_cycle(0, code, d, q);
  endtask
  task automatic vme_read(logic [4:0] code, output logic [31:0] q);
    bus_cycle(1, code, 0, q);
  endtask
  task automatic wait_not_busy();
    logic [31:0] q;
    int n = 0;
    do begin
      vme_read(CMD_STATUS, q);
      check(q[15:0] == 16'hFACE && q[31:17] == 0, "status word");
      if (q[16]) n_busy_seen++;
      n++;
    end while (q[16] && n < 100000);
  endtask

  // ---------------- vector outputs ----------------
  logic [17:0] tv_got [$], sv_got [$];
  always @(posedge clk) if (rst_n) begin
    if (tv_valid) begin tv_got.push_back(tv_data); n_tv_word++; end
    if (sv_valid) begin sv_got.push_back(sv_data); n_sv_word++; end
  end

  // ---------------- DAC and synthesizer models ----------------
  logic [9:0] dac_val [8][16];
  logic [13:0] dac_sh; int dac_bits = 0;
  logic dac_sclk_q = 0; logic [7:0] dac_cs_q = '1;
  logic [13:0] syn_sh, syn_word = 0; logic syn_sclk_q = 0, syn_load_q = 0;
  always @(posedge clk) if (rst_n) begin
    dac_sclk_q <= dac_sclk; dac_cs_q <= dac_cs_n;
    if (dac_cs_n != '1 && dac_sclk && !dac_sclk_q) begin dac_sh = {dac_sh[12:0], dac_sdi}; dac_bits++; end
    for (int i = 0; i < 8; i++)
      if (dac_cs_n[i] && !dac_cs_q[i]) begin
        if (dac_bits == 14) begin dac_val[i][dac_sh[13:10]] = dac_sh[9:0]; n_dac++; end
        dac_bits = 0;
      end
    syn_sclk_q <= synth_sclk; syn_load_q <= synth_load;
    if (synth_sclk && !syn_sclk_q) syn_sh = {syn_sh[12:0], synth_sdata};
    if (!synth_load && syn_load_q) begin syn_word = syn_sh; n_freq++; end
  end

  // ---------------- front-end chip command decoder ----------------
  typedef struct { int kind; int t; logic [7:0] field; logic [5:0] chip; logic [127:0] data; } frame_t;
  frame_t frames [$];
  bit fbits [$];
  int fcyc [$];
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin fbits.push_back(chip_cmd); fcyc.push_back(cyc); end
  end
  // parse whenever enough bits are present
  function automatic logic [255:0] take(int n);
    logic [255:0] v = 0;
    for (int i = 0; i < n; i++) begin v = {v[254:0], 1'(fbits.pop_front())}; void'(fcyc.pop_front()); end
    return v;
  endfunction
  always @(negedge clk) begin
    frame_t f;
    logic [6:0] h;
    int nd;
    while (fbits.size() > 0 && fbits[0] == 0) begin void'(fbits.pop_front()); void'(fcyc.pop_front()); end
    if (fbits.size() >= 160) begin
      f.t = fcyc[0];
      if (fbits[0] && fbits[1] && !fbits[2]) begin
        void'(take(3)); f.kind = 0; frames.push_back(f); n_l1++;
      end else begin
        h = 7'(take(7));
        if (h == 7'b1010100) begin f.kind = 1; frames.push_back(f); n_srst++; end
        else if (h == 7'b1010010) begin f.kind = 2; frames.push_back(f); n_bcrst++; end
        else if (h == 7'b1010111) begin
          f.kind = 3;
          f.field = 8'(take(8));
          f.chip = 6'(take(6));
          case (f.field)
            8'b100_00001: nd = 128;
            8'b100_00100, 8'b101_00011: nd = 0;
            default: nd = 16;
          endcase
          f.data = 128'(take(nd));
          if (f.field == 8'b100_00100) n_cal++;
          else if (f.field == 8'b100_00001) n_mask_frame++;
          else n_regload++;
          frames.push_back(f);
        end else begin
          failures++; $display("FAIL unknown chip frame %b", h);
        end
      end
    end
  end
  task automatic flush_line();  // push idle bits so the parser sees the last frame
    repeat (200) @(negedge clk);
  endtask

  // ---------------- main sequence ----------------
  initial begin
    logic [31:0] q;
    logic [17:0] tv_ref [$], sv_ref [$];
    int hist_a [128], hist_b [128];
    logic [16:0] fifo_ref [$];
    int t_start, ch;
    logic [127:0] mask;
    foreach (dac_val[i, j]) dac_val[i][j] = 0;

    repeat (4) @(posedge clk);
    rst_n = 1; drst_n = 1;
    repeat (40) @(negedge clk);
    check(xcvr_cmp == {BOARD, 24'h0} && xcvr_mask == 0 && mwb_n, "transceivers loaded");
    check(svic_lirq_n, "LIRQ* inactive");
    svic_lds = 1; #1 check(xlds == 1, "LDS handed to CY960"); svic_lds = 0;

    // status register
    vme_read(CMD_STATUS, q);
    check(q == 32'h0000_FACE, $sformatf("status %h", q));

    // ---- test and simulation vectors ----
    vme_write(CMD_TV_RST, 0);
    vme_write(CMD_SV_RST, 0);
    for (int i = 0; i < 12; i++) begin
      tv_ref.push_back(18'($urandom)); vme_write(CMD_TV_WR, {14'h3FFF, tv_ref[i]});
      sv_ref.push_back(18'($urandom)); vme_write(CMD_SV_WR, {14'h2AAA, sv_ref[i]});
    end
    vme_write(CMD_TV_SEND, 0);
    wait_not_busy();
    check(tv_got == tv_ref, "test vector played back");
    check(sv_got == sv_ref, "simulation vector played back");

    // ---- histogram ----
    vme_write(CMD_HIST_CLR, 0);
    wait_not_busy();
    n_hist_clear++;
    vme_write(CMD_HIST_BASE, 32'hFFFF_FF12);
    foreach (hist_a[i]) begin hist_a[i] = 0; hist_b[i] = 0; end
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      ch = $urandom_range(0, 127);
      hit_valid = 1; hit_channel = 7'(ch); hit_stream_a = 1'($urandom);
      #1; while (!hit_ready) begin @(negedge clk); #1; end
      @(negedge clk); hit_valid = 0;
      if (hit_stream_a) hist_a[ch]++; else hist_b[ch]++;
      n_hist_inc++;
    end
    repeat (4) @(negedge clk);
    vme_write(CMD_HIST_BASE, 32'h0000_0012);   // pointer back to the start
    for (int i = 0; i < 128; i++) begin
      vme_read(CMD_HIST_RD, q);
      check(q == {16'(hist_a[i]), 16'(hist_b[i])}, $sformatf("histogram bin %0d = %h", i, q));
    end
    vme_write(CMD_HIST_BASE, 32'h0000_0013);   // another histogram is still empty
    vme_read(CMD_HIST_RD, q);
    check(q == 0, "other base empty");

    // ---- ReSync FIFO ----
    for (int i = 0; i < 20; i++) begin
      @(negedge dclk); fifo_wdata = 17'($urandom); fifo_wr = 1; fifo_ref.push_back(fifo_wdata);
    end
    @(negedge dclk); fifo_wr = 0;
    repeat (10) @(negedge clk);
    while (fifo_ref.size() > 0) begin
      vme_read(CMD_FIFO_RD, q);
      check(q == {14'b0, 1'b1, fifo_ref.pop_front()}, "FIFO word");
      n_fifo_word++;
    end
    vme_read(CMD_FIFO_RD, q);
    check(q == 0, "FIFO empty read"); n_fifo_empty_rd++;
    for (int i = 0; i < 5; i++) begin
      @(negedge dclk); fifo_wdata = 17'($urandom); fifo_wr = 1;
    end
    @(negedge dclk); fifo_wr = 0;
    repeat (10) @(negedge clk);
    vme_write(CMD_FIFO_RST, 0);
    repeat (20) @(negedge clk);
    vme_read(CMD_FIFO_RD, q);
    check(q == 0, "FIFO empty after reset command");

    // ---- DAC and frequency ----
    vme_write(CMD_DAC, (32'd9 << 19) | (32'd5 << 16) | 32'h2B7);
    wait_not_busy();
    check(dac_val[5][9] == 10'h2B7, "DAC 5 address 9 set");
    vme_write(CMD_DAC, 32'hFF80_0000 | (32'd15 << 19) | (32'd0 << 16) | 32'h001);
    wait_not_busy();
    check(dac_val[0][15] == 10'h001, "DAC 0 address 15 set");
    vme_write(CMD_FREQ, {18'h3FFFF, 3'b101, 2'b10, 9'h0C8});
    wait_not_busy();
    check(syn_word == {3'b101, 2'b10, 9'h0C8}, "synthesizer word T N M");

    // ---- chip control sequences ----
    vme_write(SEQ_SOFT_RST, 0); wait_not_busy();
    vme_write(SEQ_BC_RST, 0);   wait_not_busy();
    vme_write(SEQ_CFG, 32'h0025_1234); wait_not_busy();
    vme_write(SEQ_MASK_PRST, 0);
    for (int i = 0; i < 4; i++) begin q = $urandom; mask[32*i +: 32] = q; vme_write(SEQ_MASK_WR, q); end
    vme_write(SEQ_MASK_SEND, 32'h0007_0000); wait_not_busy();
    vme_write(SEQ_STROBE_DLY, 32'h0001_0033); wait_not_busy();
    vme_write(SEQ_THR_CAL, 32'h0001_4455); wait_not_busy();
    vme_write(SEQ_BIAS, 32'h0002_0066); wait_not_busy();
    vme_write(SEQ_TRIM, 32'h0003_0077); wait_not_busy();
    vme_write(SEQ_ENABLE, 32'h0004_0000); wait_not_busy();
    vme_write(SEQ_HARD_RST, 0); n_noop++;
    vme_write(CMD_ADC_CONV, 0); vme_read(CMD_ADC_RD, q); n_noop++;
    check(q == 0, "ADC read returns 0");
    flush_line();
    check(frames.size() == 9, $sformatf("%0d chip frames", frames.size()));
    if (frames.size() == 9) begin
      check(frames[0].kind == 1 && frames[1].kind == 2, "soft and BC reset frames");
      check(frames[2].kind == 3 && frames[2].field == 8'h00 && frames[2].chip == 6'h25 && frames[2].data[15:0] == 16'h1234, "configuration frame");
      check(frames[3].field == 8'b100_00001 && frames[3].chip == 6'h07 && frames[3].data == mask, "mask frame");
      check(frames[4].field == 8'b010_00010 && frames[4].data[15:0] == 16'h0033, "strobe delay frame");
      check(frames[5].field == 8'b010_00011 && frames[5].data[15:0] == 16'h4455, "threshold frame");
      check(frames[6].field == 8'b010_00001 && frames[6].chip == 6'h02, "bias frame");
      check(frames[7].field == 8'b010_00100 && frames[7].chip == 6'h03, "trim frame");
      check(frames[8].field == 8'b101_00011 && frames[8].chip == 6'h04, "enable frame");
    end

    // ---- trigger burst with strobes ----
    frames = {};
    vme_write(SEQ_T2T, 32'd200);
    vme_write(SEQ_NTRIG, 32'd6);
    vme_write(SEQ_S2T, 32'd60);
    vme_write(SEQ_SELECT, 32'h3);
    repeat (3) @(negedge clk);
    check(abcd_sel, "ABCD select bit");
    vme_write(CMD_TRIG_START, 0);
    wait_not_busy();
    flush_line();
    check(frames.size() == 12, $sformatf("%0d burst frames", frames.size()));
    for (int i = 0; i < frames.size(); i++)
      check((i % 2 == 0) ? (frames[i].kind == 3 && frames[i].field == 8'b100_00100) : frames[i].kind == 0,
            "strobe, trigger alternate");
    // spacing of frame starts: strobe -> trigger 60 clocks, trigger -> strobe 200
    for (int i = 1; i < frames.size(); i++)
      check(frames[i].t - frames[i-1].t == ((i % 2 == 1) ? 60 : 200),
            $sformatf("burst spacing %0d at frame %0d", frames[i].t - frames[i-1].t, i));
    // same without strobes
    frames = {};
    vme_write(SEQ_SELECT, 32'h0);
    vme_write(SEQ_NTRIG, 32'd4);
    vme_write(CMD_TRIG_START, 0);
    wait_not_busy();
    flush_line();
    check(frames.size() == 4, "4 triggers without strobes");
    for (int i = 1; i < frames.size(); i++)
      check(frames[i].t - frames[i-1].t == 200, "trigger spacing without strobes");

    // ---- mechanism coverage ----
    check(n_xcvr_load == 2, "transceiver register loads");
    check(n_wr > 0 && n_rd > 0, "bus writes and reads");
    check(n_busy_seen > 0, "BUSY seen");
    check(n_tv_word == 12 && n_sv_word == 12, "vector words");
    check(n_hist_clear > 0 && n_hist_inc > 0, "histogram clear and increments");
    check(n_fifo_word > 0 && n_fifo_empty_rd > 0, "FIFO words and empty read");
    check(n_dac == 2 && n_freq == 1, "DAC and synthesizer loads");
    check(n_l1 == 10 && n_cal == 6, "triggers and strobes");
    check(n_srst == 1 && n_bcrst == 1 && n_regload == 6 && n_mask_frame == 1, "chip command frames");
    check(n_noop > 0, "unimplemented commands complete");
    $display("mechanisms: xcvr=%0d wr=%0d rd=%0d busy=%0d tv=%0d sv=%0d hclr=%0d hinc=%0d fifo=%0d fifo_empty=%0d dac=%0d freq=%0d l1=%0d cal=%0d srst=%0d bcrst=%0d reg=%0d mask=%0d noop=%0d",
      n_xcvr_load, n_wr, n_rd, n_busy_seen, n_tv_word, n_sv_word, n_hist_clear, n_hist_inc,
      n_fifo_word, n_fifo_empty_rd, n_dac, n_freq, n_l1, n_cal, n_srst, n_bcrst, n_regload, n_mask_frame, n_noop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
