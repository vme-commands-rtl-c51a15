// resync_fifo: the ReSync FIFO, a dual-clock FIFO that carries 17-bit words
// from the chip-data clock domain (wclk) into the FPGA clock domain (clk), where
// they are read over VME.
//
// The write side stores wdata whenever wr is high and the FIFO is not full
// (words arriving when full are dropped and counted in overflow). The read side
// answers a VME read: rd_req is followed one cycle later by rd_valid with
// rd_data = {14'b0, not_empty, word}; bit 17 is 1 when a word was available, in
// which case it is the head of the FIFO and is removed, and 0 when the FIFO was
// empty, in which case bits 16..0 are 0. A reset command (clear, clk domain)
// empties the FIFO: it is passed to wclk through a two-stage synchroniser and
// both pointers restart at 0.
//
// Pointers cross the clock boundary as Gray codes through two-flop
// synchronisers, so empty and full are conservative (never late). The word width
// and the read-out format are the board's; the depth and the dual-clock
// structure are this design's choice (the board names the FIFO and its purpose,
// resynchronising the chip data, but not how it is built).
module resync_fifo #(
  parameter int unsigned WIDTH = 17,
  parameter int unsigned DEPTH = 512
) (
  // write side, chip-data clock
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wr,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  output logic [15:0]      overflow,
  // read side, FPGA clock
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             rd_req,
  output logic             rd_valid,
  output logic [31:0]      rd_data,
  output logic             empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  logic [WIDTH-1:0] mem [DEPTH];

  // ---------------- read domain ----------------
  logic [AW:0] rptr, rptr_g, wptr_g_r1, wptr_g_r2;
  logic [AW:0] wptr, wptr_g, rptr_g_w1, rptr_g_w2;
  logic        clr_done;  // write side: set on the same edge as the pointer reset
  logic        clr_r1, clr_r2, clr_hold;
  logic        clr_ack_r1, clr_ack_r2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr_g_r1 <= '0;
      wptr_g_r2 <= '0;
    end else begin
      wptr_g_r1 <= wptr_g;
      wptr_g_r2 <= wptr_g_r1;
    end
  end
  assign empty = (rptr_g == wptr_g_r2) || clr_hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rptr     <= '0;
      rptr_g   <= '0;
      rd_valid <= 1'b0;
      rd_data  <= '0;
    end else begin
      rd_valid <= 1'b0;
      if (clear) begin
        rptr   <= '0;
        rptr_g <= '0;
      end else if (rd_req) begin
        rd_valid <= 1'b1;
        if (!empty) begin
          rd_data <= {14'b0, 1'b1, mem[rptr[AW-1:0]]};
          rptr    <= rptr + 1'b1;
          rptr_g  <= bin2gray(rptr + 1'b1);
        end else begin
          rd_data <= '0;
        end
      end
    end
  end

  // ---------------- clear into the write domain ----------------
  // clear is a one-cycle pulse; stretch it until the write side has seen it
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     clr_hold <= 1'b0;
    else if (clear) clr_hold <= 1'b1;
    else if (clr_ack_r2) clr_hold <= 1'b0;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clr_ack_r1 <= 1'b0;
      clr_ack_r2 <= 1'b0;
    end else begin
      clr_ack_r1 <= clr_done;
      clr_ack_r2 <= clr_ack_r1;
    end
  end

  // ---------------- write domain ----------------
  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      clr_r1    <= 1'b0;
      clr_r2    <= 1'b0;
      rptr_g_w1 <= '0;
      rptr_g_w2 <= '0;
    end else begin
      clr_r1    <= clr_hold;
      clr_r2    <= clr_r1;
      rptr_g_w1 <= rptr_g;
      rptr_g_w2 <= rptr_g_w1;
    end
  end
  assign full = (wptr_g == {~rptr_g_w2[AW:AW-1], rptr_g_w2[AW-2:0]});

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wptr     <= '0;
      wptr_g   <= '0;
      overflow <= '0;
      clr_done <= 1'b0;
    end else if (clr_r2) begin
      wptr     <= '0;
      wptr_g   <= '0;
      overflow <= '0;
      clr_done <= 1'b1;
    end else begin
      clr_done <= 1'b0;
      if (wr) begin
        if (full) overflow <= overflow + 16'd1;
        else begin
          wptr   <= wptr + 1'b1;
          wptr_g <= bin2gray(wptr + 1'b1);
        end
      end
    end
  end

  always_ff @(posedge wclk) begin
    if (wr && !full && !clr_r2) mem[wptr[AW-1:0]] <= wdata;
  end

  // Every VME read is answered on the next cycle.
  a_read_answered: assert property (@(posedge clk) disable iff (!rst_n)
    (rd_req && !clear) |=> rd_valid);
endmodule
