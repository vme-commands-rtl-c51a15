// cmd_decoder: turns a local-bus access into one of the board's 32 commands.
//
// Address bits 8..4 select the command (bit 8 = 0: board commands 0x00-0x0f,
// bit 8 = 1: chip control sequences 0x10-0x1f); the other low address bits are
// don't care, and the board-address match on bits 31..24 has already been made
// by the transceivers. For a write, wr_stb has the bit of the command set for one
// cycle, with the latched write data on wdata. For a read, rd_stb is pulsed the
// same way and the decoder then answers on rd_valid/rd_data:
//   0x00 status: {15'b0, BUSY, 16'hFACE}, one cycle after the access;
//   0x04 histogram and 0x0d FIFO: when the target returns its data;
//   any other code (including the unimplemented ADC read 0x0c): zero, at once,
//   so the bus cycle always completes.
// Unused bits of the status word ("X" in the command table) read as 0.
module cmd_decoder
  import vme_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        acc_valid,
  input  access_t     acc,
  output logic [31:0] wr_stb,
  output logic [31:0] rd_stb,
  output logic [31:0] wdata,
  input  logic        busy,
  input  logic        hist_rd_valid,
  input  logic [31:0] hist_rd_data,
  input  logic        fifo_rd_valid,
  input  logic [31:0] fifo_rd_data,
  output logic        rd_valid,
  output logic [31:0] rd_data
);
  cmd_e code;
  assign code = cmd_e'(acc.addr[8:4]);

  logic pend_status, pend_hist, pend_fifo;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_stb      <= '0;
      rd_stb      <= '0;
      wdata       <= '0;
      pend_status <= 1'b0;
      pend_hist   <= 1'b0;
      pend_fifo   <= 1'b0;
    end else begin
      wr_stb      <= '0;
      rd_stb      <= '0;
      pend_status <= 1'b0;
      if (hist_rd_valid) pend_hist <= 1'b0;
      if (fifo_rd_valid) pend_fifo <= 1'b0;
      if (acc_valid) begin
        if (acc.rnw) begin
          rd_stb[code] <= 1'b1;
          pend_status  <= (code != CMD_HIST_RD) && (code != CMD_FIFO_RD);
          pend_hist    <= (code == CMD_HIST_RD);
          pend_fifo    <= (code == CMD_FIFO_RD);
        end else begin
          wr_stb[code] <= 1'b1;
          wdata        <= acc.data;
        end
      end
    end
  end

  // Codes other than status answer 0 on the status path.
  logic status_is_id;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         status_is_id <= 1'b0;
    else if (acc_valid) status_is_id <= (code == CMD_STATUS);
  end

  always_comb begin
    rd_valid = 1'b0;
    rd_data  = '0;
    if (pend_status) begin
      rd_valid = 1'b1;
      rd_data  = status_is_id ? {15'b0, busy, STATUS_ID} : 32'b0;
    end else if (pend_hist && hist_rd_valid) begin
      rd_valid = 1'b1;
      rd_data  = hist_rd_data;
    end else if (pend_fifo && fifo_rd_valid) begin
      rd_valid = 1'b1;
      rd_data  = fifo_rd_data;
    end
  end
endmodule
