// vector_memory: one vector store of the board (test vectors or simulation
// vectors), 18-bit words written over VME and played back in one burst.
//
// A write stores wdata[17:0] at the address counter and increments it; a counter
// reset sets it back to 0 and empties the vector. The vector length is the
// number of words written since the last counter reset. A play request (Send
// Test Vector) outputs words 0 .. length-1 on vec_data with vec_valid high, one
// word per clock, starting two cycles after the request (one cycle to start, one
// cycle synchronous memory read); busy is high from the cycle after the request
// until the last word has been output. Writes and counter resets during playback
// are ignored.
//
// The board names the memories, their width and the counter commands; the depth
// (one 1K x 18 block RAM) and the playback timing are this design's choice. The
// same module serves the test vector memory and the simulation vector memory,
// which the top plays back side by side.
module vector_memory #(
  parameter int unsigned WIDTH = 18,
  parameter int unsigned DEPTH = 1024
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cnt_rst,
  input  logic             wr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             play,
  output logic [WIDTH-1:0] vec_data,
  output logic             vec_valid,
  output logic             busy,
  output logic [$clog2(DEPTH):0] length
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr;
  logic [AW:0]      rptr;
  logic             playing;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr    <= '0;
      rptr    <= '0;
      playing <= 1'b0;
      vec_valid <= 1'b0;
    end else begin
      vec_valid <= 1'b0;
      if (playing) begin
        if (rptr == wptr) playing <= 1'b0;
        else begin
          rptr      <= rptr + 1'b1;
          vec_valid <= 1'b1;
        end
      end else if (play) begin
        rptr    <= '0;
        playing <= (wptr != 0);
      end else if (cnt_rst) begin
        wptr <= '0;
      end else if (wr && wptr < (AW+1)'(DEPTH)) begin
        wptr <= wptr + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!playing && !play && !cnt_rst && wr && wptr < (AW+1)'(DEPTH))
      mem[wptr[AW-1:0]] <= wdata;
    vec_data <= mem[rptr[AW-1:0]];
  end

  assign busy   = playing || vec_valid;
  assign length = wptr;
endmodule
