// serial_shifter: shifts an NBITS word out MSB first on a clock/data pair.
//
// start (while idle) loads data; each bit is then put on sdo for 2*HALF clk
// cycles, with sclk low for the first HALF cycles and high for the second, so a
// receiver samples on the rising edge of sclk with HALF cycles of setup and hold.
// active is high from the cycle after start to the end of the last bit; done
// pulses for one cycle after the last bit. A start while active is ignored.
module serial_shifter #(
  parameter int unsigned NBITS = 14,
  parameter int unsigned HALF  = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NBITS-1:0] data,
  output logic             sclk,
  output logic             sdo,
  output logic             active,
  output logic             done
);
  logic [NBITS-1:0] sreg;
  logic [$clog2(NBITS+1)-1:0] nleft;
  logic [$clog2(2*HALF+1)-1:0] ph;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sreg   <= '0;
      nleft  <= '0;
      ph     <= '0;
      active <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!active) begin
        if (start) begin
          sreg   <= data;
          nleft  <= ($bits(nleft))'(NBITS);
          ph     <= '0;
          active <= 1'b1;
        end
      end else if (ph == ($bits(ph))'(2*HALF - 1)) begin
        ph   <= '0;
        sreg <= sreg << 1;
        if (nleft == 1) begin
          active <= 1'b0;
          done   <= 1'b1;
        end
        nleft <= nleft - 1'b1;
      end else begin
        ph <= ph + 1'b1;
      end
    end
  end

  assign sdo  = active & sreg[NBITS-1];
  assign sclk = active && (ph >= ($bits(ph))'(HALF));
endmodule
