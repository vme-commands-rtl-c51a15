// mask_register: the FPGA-mask register, a 128-bit channel mask assembled from
// four 32-bit VME writes before it is sent to a front-end chip.
//
// ptr_rst sets the word pointer to 0; each wr stores wdata in word ptr (bits
// 32*ptr+31 .. 32*ptr) and increments the pointer. Writes beyond the fourth word
// are ignored until the pointer is reset. The register is read by the chip
// command generator when a "send mask" command is issued.
//
// The pointer and the 32-bit write are the board's; the 128-bit length (one bit
// per channel of a 128-channel front-end chip) and the word order are this
// design's assumption.
module mask_register
  import vme_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ptr_rst,
  input  logic                 wr,
  input  logic [31:0]          wdata,
  output logic [MASK_BITS-1:0] mask,
  output logic [2:0]           ptr
);
  localparam int unsigned NWORDS = MASK_BITS / 32;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mask <= '0;
      ptr  <= '0;
    end else if (ptr_rst) begin
      ptr <= '0;
    end else if (wr && ptr < 3'(NWORDS)) begin
      mask[32*ptr +: 32] <= wdata;
      ptr                <= ptr + 3'd1;
    end
  end
endmodule
