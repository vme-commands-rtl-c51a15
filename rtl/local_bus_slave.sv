// local_bus_slave: FPGA side of the CY960 local bus.
//
// The CY960 raises one of its chip selects and, a little later, the data byte
// enables when a VME cycle hits this board. An access is taken when at least one
// CS and at least one DBE are seen together for two consecutive clocks. The
// address, data and R/W* are then latched and handed on as one access (acc_valid
// for one cycle). A write is acknowledged at once: LACK* goes low the cycle after
// the latch. A read waits for rd_valid/rd_data from the command decoder, drives
// the data onto the local bus and pulls LACK* low one cycle later, so the data
// is valid before the acknowledge. LACK* and the bus drive are held until CS/DBE
// drop, which ends the access. If CS/DBE drop while a read is still waiting for
// its data, the access is abandoned.
//
// The local bus is taken to be synchronous to clk (the CY960 runs from the same
// clock). Releasing LACK* when CS/DBE drop is this design's choice. Accesses are
// ignored until the start-up loader reports done (enable).
module local_bus_slave
  import vme_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic [5:0]  svic_cs,
  input  logic [3:0]  svic_dbe,
  input  logic        svic_r_w_n,   // 1 = read, 0 = write
  input  logic [31:1] laddr,
  input  logic [31:0] ldata_i,
  output logic [31:0] ldata_o,
  output logic        ldata_oe,
  output logic        svic_lack_n,
  // decoded access
  output logic        acc_valid,
  output access_t     acc,
  input  logic        rd_valid,
  input  logic [31:0] rd_data
);
  typedef enum logic [2:0] {S_IDLE, S_SEEN, S_RDWAIT, S_RDDRV, S_ACK} state_e;
  state_e state;
  logic   hit;
  assign hit = enable && (|svic_cs) && (|svic_dbe);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      acc         <= '0;
      acc_valid   <= 1'b0;
      svic_lack_n <= 1'b1;
      ldata_o     <= '0;
      ldata_oe    <= 1'b0;
    end else begin
      acc_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (hit) state <= S_SEEN;
        S_SEEN: begin
          if (!hit) state <= S_IDLE;
          else begin
            // second consecutive cycle of coincidence: latch
            acc.rnw   <= svic_r_w_n;
            acc.addr  <= laddr;
            acc.data  <= ldata_i;
            acc_valid <= 1'b1;
            if (svic_r_w_n) state <= S_RDWAIT;
            else begin
              svic_lack_n <= 1'b0;
              state       <= S_ACK;
            end
          end
        end
        S_RDWAIT: if (rd_valid) begin
          ldata_o  <= rd_data;
          ldata_oe <= 1'b1;
          state    <= S_RDDRV;
        end else if (!hit) begin
          state <= S_IDLE;          // cycle abandoned by the controller
        end
        S_RDDRV: begin              // data has been on the bus for a cycle
          svic_lack_n <= 1'b0;
          state       <= S_ACK;
        end
        S_ACK: if (!hit) begin
          svic_lack_n <= 1'b1;
          ldata_oe    <= 1'b0;
          state       <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // LACK* must never be asserted while no access is in progress.
  a_lack_in_access: assert property (@(posedge clk) disable iff (!rst_n)
    !svic_lack_n |-> (state == S_ACK));
endmodule
