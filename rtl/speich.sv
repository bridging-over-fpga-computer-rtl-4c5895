// speich: one-entry buffer between the Phs decoder and the Control coder.
//
// Rot_in and Phs_in are not synchronous to each other and Rot has priority, so
// an Htp or Htpr may have to wait until the coder reaches the second part of
// its window. A one-tick Htp (Htpr) pulse moves the buffer from its start
// state into the Htp (Htpr) state, where Htp_1 (Htpr_1) is held high. When the
// coder takes the value it pulses Reset_S; the buffer then waits in an
// in-between state until the Htp (Htpr) input is low again, so that one input
// pulse can never be stored twice, and returns to the start state.
//
// States and transitions follow the document's diagram for Speich. Htp taking
// precedence over Htpr when both arrive in the same tick is this design's
// choice (the Phs decoder never gives both).
// Interface: clk, rst_n, tick (500 kHz enable), htp, htpr, reset_s in;
// htp_1, htpr_1 out, registered, one tick of delay.
module speich
  import messen_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic htp,
  input  logic htpr,
  input  logic reset_s,
  output logic htp_1,
  output logic htpr_1
);
  speich_state_e state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= SP_START;
    end else if (tick) begin
      unique case (state)
        SP_START: begin
          if (htp)       state <= SP_HTP;
          else if (htpr) state <= SP_HTPR;
        end
        SP_HTP:     if (reset_s) state <= SP_HTP_ZW;
        SP_HTP_ZW:  if (!htp)    state <= SP_START;
        SP_HTPR:    if (reset_s) state <= SP_HTPR_ZW;
        SP_HTPR_ZW: if (!htpr)   state <= SP_START;
        default:                 state <= SP_START;
      endcase
    end
  end

  assign htp_1  = (state == SP_HTP);
  assign htpr_1 = (state == SP_HTPR);
endmodule
