// svic_init: start-up loader for the CY964 VME transceivers.
//
// After reset the CY964 address comparators must be told which board they
// belong to. This block first writes the compare registers with the board
// address (DIP switches) in bits 31..24 and zeros below, then writes the mask
// registers with all zeros (a 0 in the mask means "compare this bit"). Each
// write puts the value on the local data bus, selects the register with LDS and
// pulses STROBE* low. MWB* is held high throughout. When both writes are done,
// LDS is handed over to the CY960 (vme_xcvr_lds follows svic_lds), the data bus
// is released and done goes high; the local-bus slave waits for done.
//
// Which LDS level selects the compare register, and the setup / strobe / hold
// times, come from the transceiver data book and are not given here: this
// design uses LDS = 1 for compare, LDS = 0 for mask, and the cycle counts below.
//
// Timing per register write: SETUP_CYC cycles of data and LDS, STROBE_CYC cycles
// of STROBE* low, HOLD_CYC cycles of hold. done rises one cycle after the second
// write's hold ends.
module svic_init #(
  parameter int unsigned SETUP_CYC  = 2,
  parameter int unsigned STROBE_CYC = 4,
  parameter int unsigned HOLD_CYC   = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  board_addr,
  input  logic        svic_lds,          // LDS from the CY960, normal operation
  output logic        vme_xcvr_lds,
  output logic        vme_xcvr_strobe_n,
  output logic        vme_xcvr_mwb_n,
  output logic [31:0] ldata_o,           // data driven during start-up
  output logic        ldata_oe,
  output logic        done
);
  typedef enum logic [1:0] {S_CMP, S_MASK, S_DONE} state_e;
  localparam int unsigned PHASE_CYC = SETUP_CYC + STROBE_CYC + HOLD_CYC;

  state_e      state;
  logic [7:0]  cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_CMP;
      cnt   <= '0;
    end else if (state != S_DONE) begin
      if (cnt == 8'(PHASE_CYC - 1)) begin
        cnt   <= '0;
        state <= (state == S_CMP) ? S_MASK : S_DONE;
      end else begin
        cnt <= cnt + 8'd1;
      end
    end
  end

  logic strobing;
  assign strobing = (cnt >= 8'(SETUP_CYC)) && (cnt < 8'(SETUP_CYC + STROBE_CYC));

  always_comb begin
    vme_xcvr_mwb_n    = 1'b1;
    done              = (state == S_DONE);
    vme_xcvr_strobe_n = 1'b1;
    ldata_o           = '0;
    ldata_oe          = 1'b0;
    vme_xcvr_lds      = svic_lds;
    unique case (state)
      S_CMP: begin
        vme_xcvr_lds      = 1'b1;
        ldata_o           = {board_addr, 24'h0};
        ldata_oe          = 1'b1;
        vme_xcvr_strobe_n = !strobing;
      end
      S_MASK: begin
        vme_xcvr_lds      = 1'b0;
        ldata_o           = '0;
        ldata_oe          = 1'b1;
        vme_xcvr_strobe_n = !strobing;
      end
      default: ;
    endcase
  end
endmodule
