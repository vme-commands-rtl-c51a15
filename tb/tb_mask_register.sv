// tb_mask_register: fills the 128-bit mask with four 32-bit writes, checks the
// word order and the pointer, that a fifth write is ignored, and that a pointer
// reset lets the mask be rewritten from word 0.
module tb_mask_register;
  import vme_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        ptr_rst = 0, wr = 0;
  logic [31:0] wdata = 0;
  logic [127:0] mask;
  logic [2:0]  ptr;

  mask_register dut (.clk, .rst_n, .ptr_rst, .wr, .wdata, .mask, .ptr);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask
  task automatic write(logic [31:0] d);
    @(negedge clk); wdata = d; wr = 1; @(negedge clk); wr = 0;
  endtask

  initial begin
    logic [31:0] w [4];
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(mask == '0 && ptr == 0, "reset state");
    for (int r = 0; r < 3; r++) begin
      @(negedge clk); ptr_rst = 1; @(negedge clk); ptr_rst = 0;
      check(ptr == 0, "pointer reset");
      foreach (w[i]) begin w[i] = $urandom; write(w[i]); check(ptr == 3'(i + 1), "pointer increments"); end
      check(mask == {w[3], w[2], w[1], w[0]}, $sformatf("mask round %0d", r));
      write(32'hFFFF_FFFF);
      check(mask == {w[3], w[2], w[1], w[0]}, "fifth write ignored");
    end
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
