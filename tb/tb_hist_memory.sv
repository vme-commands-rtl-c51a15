// tb_hist_memory: fills histograms with random hits and reads them back.
// A reference array counts the same hits. Checked: clear zeroes every bin and
// holds busy for exactly DEPTH cycles; hits land in {base, channel} in the half
// of the word of their stream; a VME read returns the word at the pointer one
// cycle after the request and increments the pointer; writing the base resets
// the pointer; a read arriving during an increment is held, not lost; hits are
// taken at most every two cycles; counts saturate at 0xFFFF.
module tb_hist_memory;
  localparam int CB = 5, BB = 4, DEPTH = 1 << (CB + BB);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          clear = 0, base_wr = 0, rd_req = 0, inc_valid = 0, inc_stream_a = 0;
  logic [BB-1:0] base = 0;
  logic [CB-1:0] inc_channel = 0;
  logic          rd_valid, inc_ready, busy;
  logic [31:0]   rd_data;

  hist_memory #(.CH_BITS(CB), .BASE_BITS(BB)) dut (.clk, .rst_n, .clear, .base_wr, .base,
    .rd_req, .rd_valid, .rd_data, .inc_valid, .inc_ready, .inc_stream_a, .inc_channel, .busy);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  int ref_a [DEPTH], ref_b [DEPTH];

  task automatic set_base(int b);
    @(negedge clk); base = BB'(b); base_wr = 1; @(negedge clk); base_wr = 0;
  endtask

  // one hit; returns the number of cycles it waited for inc_ready
  task automatic hit(int b, int ch, bit a);
    @(negedge clk);
    inc_valid = 1; inc_stream_a = a; inc_channel = CB'(ch);
    #1; while (!inc_ready) begin @(negedge clk); #1; end
    @(negedge clk); inc_valid = 0;
    if (a) ref_a[b*(1<<CB)+ch] = (ref_a[b*(1<<CB)+ch] == 65535) ? 65535 : ref_a[b*(1<<CB)+ch] + 1;
    else   ref_b[b*(1<<CB)+ch] = (ref_b[b*(1<<CB)+ch] == 65535) ? 65535 : ref_b[b*(1<<CB)+ch] + 1;
  endtask

  task automatic read_word(output logic [31:0] q, output int lat);
    @(negedge clk); rd_req = 1; @(negedge clk); rd_req = 0;
    lat = 1;
    while (!rd_valid && lat < 100) begin @(negedge clk); lat++; end
    q = rd_data;
  endtask

  task automatic check_base(int b);
    logic [31:0] q; int lat;
    set_base(b);
    for (int ch = 0; ch < (1 << CB); ch++) begin
      read_word(q, lat);
      check(q == {16'(ref_a[b*(1<<CB)+ch]), 16'(ref_b[b*(1<<CB)+ch])},
            $sformatf("base %0d ch %0d: got %h", b, ch, q));
      check(lat == 1, "read latency 1");
    end
  endtask

  initial begin
    int busy_cycles, stream_cnt, t0;
    logic [31:0] q; int lat;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // clear
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    busy_cycles = 0;
    while (busy) begin busy_cycles++; @(negedge clk); end
    check(busy_cycles == DEPTH, $sformatf("clear busy %0d cycles", busy_cycles));
    foreach (ref_a[i]) begin ref_a[i] = 0; ref_b[i] = 0; end
    // random hits into bases 3 and 9
    set_base(3);
    for (int i = 0; i < 400; i++) hit(3, $urandom_range(0, (1<<CB)-1), 1'($urandom));
    set_base(9);
    t0 = $time;
    for (int i = 0; i < 400; i++) hit(9, $urandom_range(0, 7), 1'($urandom));
    // back-to-back hits: the block takes one hit per two cycles
    check(($time - t0) / 10 >= 400 * 2, "hit rate at most one per two cycles");
    check_base(3);
    check_base(9);
    check_base(0);
    // read request during an increment is served afterwards
    set_base(9);
    fork
      hit(9, 0, 1);
      begin @(negedge clk); @(negedge clk); rd_req = 1; @(negedge clk); rd_req = 0; end
    join
    lat = 0;
    while (!rd_valid && lat < 10) begin @(negedge clk); lat++; end
    check(rd_valid && lat < 10, "held read served");
    // saturation
    set_base(1);
    for (int i = 0; i < 65540; i++) hit(1, 2, 0);
    check_base(1);
    check(ref_b[1*(1<<CB)+2] == 65535, "reference saturated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
