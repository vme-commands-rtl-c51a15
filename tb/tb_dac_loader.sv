// tb_dac_loader: a model of eight serial DACs samples dac_sdi on each rising
// dac_sclk edge while its chip select is low and latches the 14-bit frame
// {address, value} when the select rises. Random Set-DAC commands must land in
// the right device, address and value, with the expected frame duration, and
// a command sent while busy must be dropped.
module tb_dac_loader;
  localparam int HALF = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        wr = 0;
  logic [31:0] wdata = 0;
  logic [7:0]  cs_n;
  logic        sclk, sdi, busy;

  dac_loader #(.HALF(HALF)) dut (.clk, .rst_n, .wr, .wdata, .dac_cs_n(cs_n),
    .dac_sclk(sclk), .dac_sdi(sdi), .busy);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // DAC model
  logic [9:0] dac_val [8][16];
  logic [13:0] sh [8];
  int nbits [8];
  logic sclk_q = 0;
  logic [7:0] cs_q = '1;
  int loads = 0;
  always @(posedge clk) begin
    sclk_q <= sclk; cs_q <= cs_n;
    if (rst_n) for (int d = 0; d < 8; d++) begin
      if (!cs_n[d] && sclk && !sclk_q) begin sh[d] = {sh[d][12:0], sdi}; nbits[d]++; end
      if (cs_n[d] && !cs_q[d]) begin
        loads++;
        if (nbits[d] == 14) dac_val[d][sh[d][13:10]] = sh[d][9:0];
        else begin failures++; $display("FAIL DAC %0d got %0d bits", d, nbits[d]); end
        nbits[d] = 0;
      end
    end
    if ($countones(~cs_n) > 1) begin failures++; $display("FAIL two DACs selected"); end
  end

  initial begin
    int n, a, t0, dur;
    logic [9:0] v;
    foreach (dac_val[i, j]) dac_val[i][j] = 0;
    foreach (nbits[i]) nbits[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 30; k++) begin
      n = $urandom_range(0, 7); a = $urandom_range(0, 15); v = 10'($urandom);
      @(negedge clk);
      wdata = {$urandom} & ~32'h007F_03FF | (32'(a) << 19) | (32'(n) << 16) | 32'(v);
      wr = 1; @(negedge clk); wr = 0;
      t0 = $time;
      if (k == 5) begin   // a second command while busy is dropped
        wdata = 32'h0000_03FF | (32'((a + 1) % 16) << 19) | (32'(n) << 16); wr = 1;
        @(negedge clk); wr = 0;
      end
      while (busy) @(negedge clk);
      dur = ($time - t0) / 10;
      repeat (3) @(negedge clk);
      check(dac_val[n][a] == v, $sformatf("DAC %0d addr %0d = %h, expected %h", n, a, dac_val[n][a], v));
      check(dur == 14 * 2 * HALF, $sformatf("frame duration %0d", dur));
    end
    check(loads == 30, $sformatf("%0d loads", loads));
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
