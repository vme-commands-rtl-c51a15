// dac_loader: sets one output of the board DACs from a VME "Set DAC" command.
//
// The command word carries the value in bits 9..0, the DAC output address in
// bits 22..19 and the DAC device number (0..7) in bits 18..16. On wr the block
// selects the device with its active-low chip select dac_cs_n[number], shifts
// the 14-bit frame {address, value} out MSB first on dac_sclk/dac_sdi (data
// stable around each rising sclk edge) and deselects the device, which latches
// the value. busy is high while a frame is being sent; a command arriving then is
// dropped. A frame takes 14*2*HALF + 1 cycles from wr to the release of the chip
// select.
//
// The field layout is the board's. The serial protocol of the DACs is not
// given, so this frame format, the bit order and the chip-select scheme are this
// design's choice and may need adapting to the actual devices.
module dac_loader #(
  parameter int unsigned HALF = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr,
  input  logic [31:0] wdata,
  output logic [7:0]  dac_cs_n,
  output logic        dac_sclk,
  output logic        dac_sdi,
  output logic        busy
);
  logic [2:0] num_q;
  logic       active, done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              num_q <= '0;
    else if (wr && !active)  num_q <= wdata[18:16];
  end

  serial_shifter #(.NBITS(14), .HALF(HALF)) u_shift (
    .clk, .rst_n,
    .start (wr),
    .data  ({wdata[22:19], wdata[9:0]}),
    .sclk  (dac_sclk),
    .sdo   (dac_sdi),
    .active(active),
    .done  (done)
  );

  always_comb begin
    dac_cs_n = '1;
    if (active) dac_cs_n[num_q] = 1'b0;
  end
  assign busy = active;
endmodule
