// tb_resync_fifo: writes random 17-bit words on a 40 MHz-like write clock and
// reads them on an unrelated 80 MHz-like read clock through the VME read
// interface. Checked: order and content of every word, the not-empty flag in
// bit 17 (1 with data, 0 with zero data when empty), the one-cycle read
// latency, the full flag and the overflow count when more than DEPTH words are
// written, and that the reset command empties the FIFO.
module tb_resync_fifo;
  localparam int DEPTH = 16;
  logic clk = 0, wclk = 0, rst_n = 0, wrst_n = 0;
  always #6 clk = ~clk;
  always #13 wclk = ~wclk;
  int checks = 0, failures = 0;

  logic        wr = 0, clear = 0, rd_req = 0;
  logic [16:0] wdata = 0;
  logic        full, rd_valid, empty;
  logic [15:0] overflow;
  logic [31:0] rd_data;

  resync_fifo #(.WIDTH(17), .DEPTH(DEPTH)) dut (.wclk, .wrst_n, .wr, .wdata, .full, .overflow,
    .clk, .rst_n, .clear, .rd_req, .rd_valid, .rd_data, .empty);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  logic [16:0] ref_q[$];

  task automatic write_words(int n);
    for (int i = 0; i < n; i++) begin
      @(negedge wclk); wdata = 17'($urandom); wr = 1;
      if (!full) ref_q.push_back(wdata);
    end
    @(negedge wclk); wr = 0;
  endtask

  task automatic vme_read(output logic [31:0] q);
    @(negedge clk); rd_req = 1; @(negedge clk); rd_req = 0;
    check(rd_valid, "read answered after one cycle");
    q = rd_data;
  endtask

  task automatic drain(string tag);
    logic [31:0] q;
    repeat (10) @(negedge clk);
    while (ref_q.size() > 0) begin
      vme_read(q);
      check(q[31:17] == 15'b1 && q[16:0] == ref_q[0], $sformatf("%s: word %h expected %h", tag, q, ref_q[0]));
      void'(ref_q.pop_front());
    end
    vme_read(q);
    check(q == 32'h0, $sformatf("%s: empty read gives %h", tag, q));
  endtask

  initial begin
    logic [31:0] q;
    repeat (3) @(posedge wclk);
    rst_n = 1; wrst_n = 1;
    vme_read(q);
    check(q == 0, "empty after reset");
    write_words(10);
    drain("10 words");
    // overflow
    write_words(DEPTH + 5);
    check(full, "full");
    check(overflow == 5, $sformatf("overflow count %0d", overflow));
    drain("full FIFO");
    // interleaved writes and reads
    fork
      write_words(40);
      begin
        repeat (60) begin
          #($urandom_range(20, 60));
          if (!empty) begin
            vme_read(q);
            check(q[17] && q[16:0] == ref_q[0], "interleaved word");
            void'(ref_q.pop_front());
          end
        end
      end
    join
    drain("interleaved tail");
    // reset command empties the FIFO
    write_words(7);
    repeat (10) @(negedge clk);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    ref_q = {};
    repeat (20) @(negedge clk);
    vme_read(q);
    check(q == 0, "empty after reset command");
    write_words(3);
    drain("after reset command");
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
