// hist_memory: hit histogram of the two readout streams.
//
// Every word holds two 16-bit bin counts: stream A in bits 31..16 and stream B
// in bits 15..0, the layout in which the word is read over VME. A histogram bin is
// addressed by {base, channel}: the base address (8 bits, set over VME) selects
// one histogram, for example one point of a threshold scan, and the channel is
// the front-end strip number of the hit. The read pointer is reset to the start
// of the selected histogram ({base, 0...0}) whenever the base is written, and
// every VME read returns the word at the pointer and increments it.
//
// The memory is single-ported, one access per clock, with this priority:
//   clear  (takes DEPTH cycles, busy high meanwhile; requests are then dropped,
//           except hits which wait on inc_ready),
//   VME read (data on rd_valid/rd_data one cycle after the read is served; a
//           request that arrives while the memory is busy is held until then),
//   hit increment (a read-modify-write of two cycles, so at most one hit every
//           two cycles; inc_ready tells the source when a hit is taken).
// Counts saturate at 16'hFFFF.
//
// The board gives the word layout, the 8-bit base and the commands; the bin
// addressing by channel, the memory size (256 histograms x 128 channels), the
// saturation and the access scheduling are this design's choice.
module hist_memory #(
  parameter int unsigned CH_BITS   = 7,   // 128 channels per histogram
  parameter int unsigned BASE_BITS = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 base_wr,
  input  logic [BASE_BITS-1:0] base,
  input  logic                 rd_req,
  output logic                 rd_valid,
  output logic [31:0]          rd_data,
  input  logic                 inc_valid,
  output logic                 inc_ready,
  input  logic                 inc_stream_a,  // 1 = stream A, 0 = stream B
  input  logic [CH_BITS-1:0]   inc_channel,
  output logic                 busy
);
  localparam int unsigned AW    = BASE_BITS + CH_BITS;
  localparam int unsigned DEPTH = 1 << AW;

  typedef enum logic [1:0] {S_IDLE, S_CLEAR, S_INC_RD, S_INC_WR} state_e;

  logic [31:0]          mem [DEPTH];
  state_e               state;
  logic [AW-1:0]        clr_addr, rd_ptr, inc_addr;
  logic [BASE_BITS-1:0] base_q;
  logic                 inc_a;
  logic [31:0]          q;          // synchronous read data
  logic                 rd_pend;
  logic                 rd_want;    // read requested, not yet served
  logic                 rd_go;

  assign rd_go     = (state == S_IDLE) && !clear && (rd_req || rd_want);
  assign inc_ready = (state == S_IDLE) && !clear && !rd_req && !rd_want;
  assign busy      = (state == S_CLEAR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      clr_addr <= '0;
      rd_ptr   <= '0;
      inc_addr <= '0;
      inc_a    <= 1'b0;
      base_q   <= '0;
      rd_pend  <= 1'b0;
      rd_want  <= 1'b0;
    end else begin
      rd_pend <= 1'b0;
      if (rd_go)       rd_want <= 1'b0;
      else if (rd_req) rd_want <= 1'b1;
      if (base_wr && state != S_CLEAR) begin
        base_q <= base;
        rd_ptr <= {base, {CH_BITS{1'b0}}};
      end
      unique case (state)
        S_IDLE: begin
          if (clear) begin
            clr_addr <= '0;
            state    <= S_CLEAR;
          end else if (rd_go) begin
            rd_pend <= 1'b1;
            rd_ptr  <= rd_ptr + 1'b1;
          end else if (inc_valid) begin
            inc_addr <= {base_q, inc_channel};
            inc_a    <= inc_stream_a;
            state    <= S_INC_RD;
          end
        end
        S_CLEAR: begin
          clr_addr <= clr_addr + 1'b1;
          if (clr_addr == AW'(DEPTH - 1)) state <= S_IDLE;
        end
        S_INC_RD: state <= S_INC_WR;
        S_INC_WR: state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
    end
  end

  // Saturating increment of one half of the word.
  function automatic logic [15:0] sat_inc(logic [15:0] v);
    return (v == 16'hFFFF) ? v : v + 16'd1;
  endfunction

  logic [AW-1:0] raddr;
  assign raddr = rd_go ? rd_ptr : inc_addr;

  always_ff @(posedge clk) begin
    q <= mem[raddr];
    if (state == S_CLEAR)
      mem[clr_addr] <= '0;
    else if (state == S_INC_WR)
      mem[inc_addr] <= inc_a ? {sat_inc(q[31:16]), q[15:0]} : {q[31:16], sat_inc(q[15:0])};
  end

  assign rd_valid = rd_pend;
  assign rd_data  = q;
endmodule
