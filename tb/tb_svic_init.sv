// tb_svic_init: checks the start-up load of the VME transceivers.
// A model of the transceiver register interface captures the data bus on each
// rising edge of STROBE* and stores it in the compare (LDS=1) or mask (LDS=0)
// register; the test then checks the stored values, the strobe width, MWB*,
// the release of the bus and the hand-over of LDS to the CY960.
module tb_svic_init;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0]  board_addr = 8'hA5;
  logic        svic_lds = 0;
  logic        lds, strobe_n, mwb_n, oe, done;
  logic [31:0] d;

  svic_init #(.SETUP_CYC(2), .STROBE_CYC(4), .HOLD_CYC(2)) dut (
    .clk, .rst_n, .board_addr, .svic_lds,
    .vme_xcvr_lds(lds), .vme_xcvr_strobe_n(strobe_n), .vme_xcvr_mwb_n(mwb_n),
    .ldata_o(d), .ldata_oe(oe), .done);

  logic [31:0] cmp_reg = '1, mask_reg = '1;
  int nstrobes = 0, low_cycles = 0, width_seen = 0;
  logic strobe_q = 1;
  always @(posedge clk) begin
    strobe_q <= strobe_n;
    if (!strobe_n) low_cycles++;
    if (strobe_n && !strobe_q) begin   // rising edge of STROBE*: latch
      nstrobes++;
      width_seen = low_cycles; low_cycles = 0;
      if (!oe) failures++;
      if (lds) begin cmp_reg = d; mask_reg = '0; end
      else mask_reg = d;
    end
    if (!mwb_n) failures++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done);
    @(posedge clk);
    check(nstrobes == 2, "two register writes");
    check(cmp_reg == 32'hA500_0000, "compare register = board address");
    check(mask_reg == 32'h0, "mask register = 0");
    check(width_seen == 4, "strobe width");
    check(!oe, "bus released");
    svic_lds = 1; #1 check(lds == 1, "LDS follows CY960 (1)");
    svic_lds = 0; #1 check(lds == 0, "LDS follows CY960 (0)");
    check(strobe_n == 1, "strobe idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
