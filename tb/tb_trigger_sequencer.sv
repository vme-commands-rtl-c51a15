// tb_trigger_sequencer: runs bursts against a model of the command line that
// is busy for the length of each accepted frame (3 cycles for a trigger, 21 for
// a calibration strobe). Checked for several settings, with and without
// strobes: the number and order of requests, the spacing between the starts of
// consecutive frames (strobe -> trigger = max(s2t, 22), trigger -> next =
// max(t2t, 4)), busy during the burst, the select-register outputs, and that a
// burst of 0 triggers sends nothing.
module tb_trigger_sequencer;
  import vme_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] wr_stb = 0, wdata = 0;
  logic        seq_valid, seq_ready, busy, abcd_sel, strobe_en;
  chip_cmd_e   seq_cmd;
  logic [15:0] trig_sent;

  trigger_sequencer dut (.clk, .rst_n, .wr_stb, .wdata, .seq_valid, .seq_cmd, .seq_ready,
    .busy, .abcd_sel, .strobe_en, .trig_sent);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // command line model
  int line_left = 0, cyc = 0;
  int acc_time [$];
  chip_cmd_e acc_cmd [$];
  assign seq_ready = (line_left == 0);
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (seq_valid && seq_ready) begin
      acc_time.push_back(cyc); acc_cmd.push_back(seq_cmd);
      line_left <= (seq_cmd == CC_L1) ? 3 : 21;
    end else if (line_left > 0) line_left <= line_left - 1;
  end

  task automatic vme_write(int code, logic [31:0] d);
    @(negedge clk); wr_stb = 32'd1 << code; wdata = d; @(negedge clk); wr_stb = 0;
  endtask

  function automatic int max2(int a, int b); return a > b ? a : b; endfunction

  task automatic burst(int n, int t2t, int s2t, bit stb);
    int k, exp_gap, nexp;
    vme_write('h10, 32'hABCD_0000 | t2t);
    vme_write('h11, 32'hFFFF_0000 | n);
    vme_write('h1f, 32'hFFFF_FF00 | s2t);
    vme_write('h1b, {30'h0, stb, 1'b1});
    check(strobe_en == stb && abcd_sel, "select register");
    acc_time = {}; acc_cmd = {};
    vme_write('h0e, 0);
    check(busy == (n != 0), "busy after start");
    while (busy) @(negedge clk);
    repeat (30) @(negedge clk);
    nexp = stb ? 2 * n : n;
    check(acc_cmd.size() == nexp, $sformatf("%0d requests, expected %0d", acc_cmd.size(), nexp));
    check(trig_sent == 16'(n), "trigger count");
    for (int i = 0; i < acc_cmd.size(); i++) begin
      if (stb) check(acc_cmd[i] == ((i % 2 == 0) ? CC_CALPULSE : CC_L1), "strobe/trigger order");
      else     check(acc_cmd[i] == CC_L1, "trigger only");
      if (i > 0) begin
        if (acc_cmd[i - 1] == CC_CALPULSE) exp_gap = max2(s2t, 22);
        else                               exp_gap = max2(t2t, 4);
        check(acc_time[i] - acc_time[i - 1] == exp_gap,
              $sformatf("gap %0d expected %0d (n=%0d t2t=%0d s2t=%0d stb=%0d)",
                        acc_time[i] - acc_time[i - 1], exp_gap, n, t2t, s2t, stb));
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    burst(5, 100, 40, 1);
    burst(4, 50, 0, 0);
    burst(3, 2, 10, 1);    // delays shorter than frames are stretched
    burst(1, 10, 200, 1);
    burst(0, 10, 10, 1);
    burst(20, 7, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
