// tb_chip_cmd_gen: sends every control sequence and compares the bits on the
// command line with frames assembled here from the bit patterns listed below
// (written out independently of the generator's package functions). Also
// checks: one bit per clock starting the cycle after the request, the line is 0
// when idle, busy covers the frame exactly, a trigger request from the
// sequencer wins over a simultaneous VME command, and a VME command arriving
// while busy is dropped.
module tb_chip_cmd_gen;
  import vme_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0]  wr_stb = 0, wdata = 0;
  logic [127:0] mask = 0;
  logic         seq_valid = 0, seq_ready, cmd_o, busy, done;
  chip_cmd_e    seq_cmd = CC_L1;

  chip_cmd_gen dut (.clk, .rst_n, .wr_stb, .wdata, .mask, .seq_valid, .seq_cmd, .seq_ready,
    .cmd_o, .busy, .done);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // capture the line
  bit line [$];
  bit capturing = 0;
  always @(posedge clk) if (capturing) line.push_back(cmd_o);

  typedef bit bitq [$];
  function automatic bitq bits_of(logic [255:0] v, int n);
    bitq q;
    for (int i = n - 1; i >= 0; i--) q.push_back(v[i]);
    return q;
  endfunction

  // expected frame for a VME control sequence
  function automatic bitq expect_frame(int code, logic [5:0] chip, logic [15:0] d, logic [127:0] m);
    bitq q;
    case (code)
      'h12: return bits_of(7'b1010100, 7);
      'h13: return bits_of(7'b1010010, 7);
      default: ;
    endcase
    q = bits_of(7'b1010111, 7);
    case (code)
      'h14: q = {q, bits_of(8'b000_00000, 8)};
      'h17: q = {q, bits_of(8'b100_00001, 8)};
      'h18: q = {q, bits_of(8'b010_00010, 8)};
      'h19: q = {q, bits_of(8'b010_00011, 8)};
      'h1a: q = {q, bits_of(8'b101_00011, 8)};
      'h1d: q = {q, bits_of(8'b010_00001, 8)};
      'h1e: q = {q, bits_of(8'b010_00100, 8)};
      default: ;
    endcase
    q = {q, bits_of(chip, 6)};
    if (code == 'h17) q = {q, bits_of(m, 128)};
    else if (code != 'h1a) q = {q, bits_of(d, 16)};
    return q;
  endfunction

  // send one request and capture the frame; returns bits and busy cycles
  task automatic run(bit from_seq, int code, chip_cmd_e sc, logic [31:0] d, output bitq got, output int busy_cycles);
    @(negedge clk);
    line = {};
    if (from_seq) begin seq_valid = 1; seq_cmd = sc; end
    else begin wr_stb = 32'd1 << code; wdata = d; end
    @(negedge clk);
    seq_valid = 0; wr_stb = 0;
    capturing = 1; busy_cycles = 0;
    // line is captured from the cycle after the request
    while (busy) begin busy_cycles++; @(negedge clk); end
    repeat (3) @(negedge clk);
    capturing = 0;
    got = line;
  endtask

  function automatic bit match(bitq got, bitq exp);
    if (got.size() != exp.size() + 3 + 0 && got.size() < exp.size()) return 0;
    for (int i = 0; i < exp.size(); i++) if (got[i] != exp[i]) return 0;
    for (int i = exp.size(); i < got.size(); i++) if (got[i] != 0) return 0;
    return 1;
  endfunction

  initial begin
    int codes [9] = '{'h12, 'h13, 'h14, 'h17, 'h18, 'h19, 'h1a, 'h1d, 'h1e};
    bitq got, exp;
    int bc;
    logic [31:0] d;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    check(!cmd_o && !busy, "idle line");
    for (int r = 0; r < 3; r++) begin
      foreach (codes[i]) begin
        d = $urandom;
        mask = {$urandom, $urandom, $urandom, $urandom};
        exp = expect_frame(codes[i], d[21:16], d[15:0], mask);
        run(0, codes[i], CC_L1, d, got, bc);
        check(match(got, exp), $sformatf("frame of code %h", codes[i]));
        check(bc == exp.size(), $sformatf("busy %0d cycles for %0d bits", bc, exp.size()));
      end
    end
    // trigger and calibration strobe from the sequencer
    run(1, 0, CC_L1, 0, got, bc);
    check(match(got, bits_of(3'b110, 3)) && bc == 3, "level-1 trigger");
    exp = {bits_of(7'b1010111, 7), bits_of(8'b100_00100, 8), bits_of(6'h3f, 6)};
    run(1, 0, CC_CALPULSE, 0, got, bc);
    check(match(got, exp) && bc == 21, "calibration strobe");
    // simultaneous: sequencer wins, VME dropped
    @(negedge clk);
    line = {};
    seq_valid = 1; seq_cmd = CC_L1; wr_stb = 32'd1 << 'h12;
    @(negedge clk); seq_valid = 0; wr_stb = 0; capturing = 1;
    repeat (12) @(negedge clk); capturing = 0;
    check(match(line, bits_of(3'b110, 3)), "sequencer has priority");
    // VME command while busy is dropped
    @(negedge clk); line = {}; wr_stb = 32'd1 << 'h12; @(negedge clk); wr_stb = 32'd1 << 'h13;
    @(negedge clk); wr_stb = 0; capturing = 1;
    repeat (14) @(negedge clk); capturing = 0;
    check(match(line, {bits_of(7'b1010100, 6)}) && line.size() > 8 && line[6] == 0 && line[7] == 0, "command during busy dropped");
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
