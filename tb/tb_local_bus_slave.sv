// tb_local_bus_slave: checks access detection and the LACK* handshake.
// The testbench plays the CY960: it raises CS, then DBE, holds them until LACK*
// and then drops them. Checked: a one-cycle CS/DBE glitch is not taken; a
// write is latched with its address and data and acknowledged on the cycle
// after the two-cycle coincidence; a read waits for the data source (here a
// delay of 5 cycles after the latched access is seen), the data is on the bus
// one cycle before LACK*; a read abandoned before its data arrives is dropped;
// nothing is taken before enable.
module tb_local_bus_slave;
  import vme_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        enable = 0;
  logic [5:0]  cs = 0;
  logic [3:0]  dbe = 0;
  logic        r_w_n = 0;
  logic [31:1] laddr = 0;
  logic [31:0] ldata_i = 0, ldata_o, rd_data = 0;
  logic        ldata_oe, lack_n, acc_valid, rd_valid = 0;
  access_t     acc;

  local_bus_slave dut (.clk, .rst_n, .enable, .svic_cs(cs), .svic_dbe(dbe),
    .svic_r_w_n(r_w_n), .laddr, .ldata_i, .ldata_o, .ldata_oe, .svic_lack_n(lack_n),
    .acc_valid, .acc, .rd_valid, .rd_data);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  int nacc = 0;
  logic data_before_lack = 0;
  always @(posedge clk) if (acc_valid) nacc++;

  // read data source: answers 5 cycles after the access
  always @(posedge clk) begin
    rd_valid <= 0;
    if (acc_valid && acc.rnw) begin
      repeat (4) @(posedge clk);
      rd_valid <= 1; rd_data <= 32'hCAFE_0000 | acc.addr[15:1];
      @(posedge clk); rd_valid <= 0;
    end
  end

  task automatic access(bit rd, logic [31:1] a, logic [31:0] d, output int lat, output logic [31:0] q);
    int n = 0;
    @(negedge clk); laddr = a; ldata_i = d; r_w_n = rd; cs = 6'b000001;
    @(negedge clk); dbe = 4'hF;
    while (lack_n) begin data_before_lack = ldata_oe; @(negedge clk); n++; if (n > 100) break; end
    lat = n; q = ldata_o;
    if (rd) check(data_before_lack, "read data driven a cycle before LACK*");
    check(!rd || ldata_oe, "bus driven during read ack");
    cs = 0; dbe = 0;
    @(negedge clk); @(negedge clk);
    check(lack_n, "LACK* released");
    check(!ldata_oe, "bus released");
  endtask

  initial begin
    int lat; logic [31:0] q;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // not enabled yet: no access taken
    @(negedge clk); cs = 1; dbe = 1; repeat (5) @(negedge clk); cs = 0; dbe = 0;
    check(nacc == 0 && lack_n, "ignored while not enabled");
    enable = 1;
    // glitch of one cycle
    @(negedge clk); cs = 1; dbe = 1; @(negedge clk); cs = 0; dbe = 0;
    repeat (3) @(negedge clk);
    check(nacc == 0, "one-cycle coincidence ignored");
    // write
    fork
      begin @(posedge acc_valid); check(!acc.rnw && acc.addr == 31'h1234_5678 >> 0 && acc.data == 32'hDEAD_BEEF, "write latched"); end
    join_none
    access(0, 31'h1234_5678, 32'hDEAD_BEEF, lat, q);
    check(nacc == 1, "one write access");
    // DBE set one cycle after CS; coincidence from then: 2 cycles to latch, LACK next
    check(lat == 2, $sformatf("write LACK latency %0d", lat));
    // read
    access(1, 31'h0000_0123, 32'h0, lat, q);
    check(nacc == 2, "one read access");
    check(q == (32'hCAFE_0000 | 32'h0123), "read data on bus");
    check(lat == 9, $sformatf("read LACK latency %0d", lat));
    // a read abandoned by the controller before its data arrives
    @(negedge clk); laddr = 31'h55; r_w_n = 1; cs = 1; @(negedge clk); dbe = 1;
    repeat (3) @(negedge clk); cs = 0; dbe = 0;
    repeat (10) @(negedge clk);
    check(lack_n && !ldata_oe, "abandoned read not acknowledged");
    access(0, 31'h0000_0042, 32'h1234_5678, lat, q);
    check(nacc == 4 && lat == 2, "write after abandoned read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
