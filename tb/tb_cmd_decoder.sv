// tb_cmd_decoder: checks the command decode of all 32 codes and the read paths.
// For every code a write access must raise exactly wr_stb[code] with the data,
// and a read access exactly rd_stb[code]. Reads of the status register return
// {BUSY, 0xFACE}; histogram and FIFO reads return the target's data when it
// arrives; other reads return 0 at once. Address bits outside 8..4 must not
// change the decode.
module tb_cmd_decoder;
  import vme_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        acc_valid = 0, busy = 0;
  access_t     acc = '0;
  logic [31:0] wr_stb, rd_stb, wdata, rd_data;
  logic        rd_valid;
  logic        hist_rd_valid = 0, fifo_rd_valid = 0;
  logic [31:0] hist_rd_data = 0, fifo_rd_data = 0;

  cmd_decoder dut (.clk, .rst_n, .acc_valid, .acc, .wr_stb, .rd_stb, .wdata, .busy,
    .hist_rd_valid, .hist_rd_data, .fifo_rd_valid, .fifo_rd_data, .rd_valid, .rd_data);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // issue an access, return the data and the cycles until rd_valid
  task automatic do_access(bit rd, logic [4:0] code, logic [31:0] d,
                           output logic [31:0] stb, output logic [31:0] q, output int lat);
    @(negedge clk);
    acc.rnw = rd;
    acc.addr = {8'h5A, 15'($urandom), code, 3'($urandom)};
    acc.data = d;
    acc_valid = 1;
    @(negedge clk);
    acc_valid = 0;
    stb = rd ? rd_stb : wr_stb;
    if (!rd) check(wdata == d, "write data");
    lat = 0; q = 0;
    if (rd) begin
      while (!rd_valid && lat < 50) begin
        if (code == 5'h04 && lat == 3) begin hist_rd_valid = 1; hist_rd_data = 32'h1111_2222; end
        if (code == 5'h0d && lat == 2) begin fifo_rd_valid = 1; fifo_rd_data = 32'h0002_0077; end
        #1;
        if (rd_valid) break;
        @(negedge clk); lat++;
        hist_rd_valid = 0; fifo_rd_valid = 0;
      end
      q = rd_data;
      @(negedge clk);
      hist_rd_valid = 0; fifo_rd_valid = 0;
    end
  endtask

  initial begin
    logic [31:0] stb, q;
    int lat;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 32; c++) begin
      do_access(0, 5'(c), $urandom, stb, q, lat);
      check(stb == (32'd1 << c), $sformatf("write strobe code %0d", c));
      do_access(1, 5'(c), 0, stb, q, lat);
      check(stb == (32'd1 << c), $sformatf("read strobe code %0d", c));
      if (c == 0)       check(q == 32'h0000_FACE && lat == 0, "status read");
      else if (c == 4)  check(q == 32'h1111_2222 && lat == 3, "histogram read");
      else if (c == 13) check(q == 32'h0002_0077 && lat == 2, "fifo read");
      else              check(q == 0 && lat == 0, $sformatf("other read %0d", c));
    end
    busy = 1;
    do_access(1, 5'h00, 0, stb, q, lat);
    check(q == 32'h0001_FACE, "status read with BUSY");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
