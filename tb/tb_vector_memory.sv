// tb_vector_memory: writes vectors of random 18-bit words, plays them back and
// compares word for word, including the cycle on which each word appears (the
// first two cycles after the play request, then one word per clock). Also
// checks that a counter reset starts a new, shorter vector, that a play request
// with an empty vector outputs nothing, and that the memory stops at DEPTH.
module tb_vector_memory;
  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        cnt_rst = 0, wr = 0, play = 0;
  logic [17:0] wdata = 0, vec_data;
  logic        vec_valid, busy;
  logic [6:0]  length;

  vector_memory #(.WIDTH(18), .DEPTH(DEPTH)) dut (.clk, .rst_n, .cnt_rst, .wr, .wdata,
    .play, .vec_data, .vec_valid, .busy, .length);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  logic [17:0] ref_q[$];
  logic [17:0] got[$];
  int first_cycle, cyc;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (vec_valid) begin
      if (got.size() == 0) first_cycle = cyc;
      got.push_back(vec_data);
    end
  end

  task automatic load(int n);
    @(negedge clk); cnt_rst = 1; @(negedge clk); cnt_rst = 0;
    ref_q = {};
    for (int i = 0; i < n; i++) begin
      wdata = 18'($urandom); wr = 1;
      if (ref_q.size() < DEPTH) ref_q.push_back(wdata);
      @(negedge clk);
    end
    wr = 0;
  endtask

  task automatic play_and_check(string tag);
    int start;
    got = {};
    @(negedge clk); play = 1; start = cyc; @(negedge clk); play = 0;
    repeat (DEPTH + 10) @(negedge clk);
    check(got.size() == ref_q.size(), $sformatf("%s: %0d words, expected %0d", tag, got.size(), ref_q.size()));
    for (int i = 0; i < ref_q.size() && i < got.size(); i++)
      check(got[i] == ref_q[i], $sformatf("%s: word %0d", tag, i));
    if (ref_q.size() > 0)
      check(first_cycle - start == 2, $sformatf("%s: first word after %0d cycles", tag, first_cycle - start));
    check(!busy, "idle after playback");
  endtask

  initial begin
    cyc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    load(20);
    check(length == 20, "length 20");
    play_and_check("20 words");
    load(5);
    play_and_check("5 words after counter reset");
    load(0);
    play_and_check("empty vector");
    load(DEPTH + 3);
    check(length == DEPTH, "length saturates at depth");
    play_and_check("full memory");
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
