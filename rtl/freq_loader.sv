// freq_loader: programs the board clock synthesizer from a VME "Set Frequency"
// command.
//
// The command carries M in bits 8..0, N in bits 10..9 and T in bits 13..11,
// the three fields of a serially programmed PLL synthesizer (VCO multiplier M,
// output divider N, test mode T). On wr the 14-bit word {T, N, M} is shifted out
// MSB first (T2 first, M0 last) on synth_sclk/synth_sdata, then synth_load is
// pulsed high for 2*HALF cycles to transfer the shift register into the
// synthesizer's configuration latches one cycle after the last bit. busy covers
// the whole sequence (14*2*HALF + 1 + 2*HALF cycles); commands
// arriving meanwhile are dropped.
//
// The fields are the board's; the serial order and the load pulse follow the
// usual interface of such synthesizers and are this design's assumption.
module freq_loader #(
  parameter int unsigned HALF = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr,
  input  logic [31:0] wdata,
  output logic        synth_sclk,
  output logic        synth_sdata,
  output logic        synth_load,
  output logic        busy
);
  logic active, done;
  logic [$clog2(2*HALF+1)-1:0] lcnt;

  serial_shifter #(.NBITS(14), .HALF(HALF)) u_shift (
    .clk, .rst_n,
    .start (wr && !synth_load),
    .data  ({wdata[13:11], wdata[10:9], wdata[8:0]}),
    .sclk  (synth_sclk),
    .sdo   (synth_sdata),
    .active(active),
    .done  (done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      synth_load <= 1'b0;
      lcnt       <= '0;
    end else if (done) begin
      synth_load <= 1'b1;
      lcnt       <= '0;
    end else if (synth_load) begin
      if (lcnt == ($bits(lcnt))'(2*HALF - 1)) synth_load <= 1'b0;
      lcnt <= lcnt + 1'b1;
    end
  end
  assign busy = active || done || synth_load;
endmodule
