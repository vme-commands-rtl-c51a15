// tb_freq_loader: a model of the synthesizer's serial port shifts synth_sdata
// in on each rising synth_sclk edge and copies the last 14 bits into its M, N
// and T latches when synth_load pulses. Random Set-Frequency commands must
// arrive with T first and M last, and take 14 bit times, one cycle and the
// load pulse.
module tb_freq_loader;
  localparam int HALF = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        wr = 0;
  logic [31:0] wdata = 0;
  logic        sclk, sdata, load, busy;

  freq_loader #(.HALF(HALF)) dut (.clk, .rst_n, .wr, .wdata, .synth_sclk(sclk),
    .synth_sdata(sdata), .synth_load(load), .busy);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  logic [13:0] sh = 0;
  logic [8:0] m_l = 0; logic [1:0] n_l = 0; logic [2:0] t_l = 0;
  logic sclk_q = 0, load_q = 0;
  int nbits = 0, nloads = 0;
  always @(posedge clk) begin
    sclk_q <= sclk; load_q <= load;
    if (sclk && !sclk_q) begin sh = {sh[12:0], sdata}; nbits++; end
    if (rst_n && !load && load_q) begin {t_l, n_l, m_l} = sh; nloads++; end
  end

  initial begin
    logic [8:0] m; logic [1:0] n; logic [2:0] t;
    int t0, dur;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 20; k++) begin
      m = 9'($urandom); n = 2'($urandom); t = 3'($urandom);
      nbits = 0;
      @(negedge clk);
      wdata = ($urandom & 32'hFFFF_C000) | {18'b0, t, n, m};
      wr = 1; @(negedge clk); wr = 0; t0 = $time;
      while (busy) @(negedge clk);
      dur = ($time - t0) / 10;
      @(negedge clk);
      check({t_l, n_l, m_l} == {t, n, m}, $sformatf("M N T = %h %h %h", m_l, n_l, t_l));
      check(nbits == 14, "14 bits");
      check(dur == 14 * 2 * HALF + 1 + 2 * HALF, $sformatf("duration %0d", dur));
    end
    check(nloads == 20, "20 load pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
