// control: the coder that mixes Ap, Apr, Htp and Htpr onto the line Mux_out.
//
// Every output window is 650 us (325 ticks of 500 kHz) long: a 400 us slot for
// Ap or Apr followed by a 250 us slot for Htp or Htpr. Mux_out goes high at the
// start of a slot and stays high for the signal's time high:
//     Ap 200 us, Apr 250 us (slot 400 us), Htp 100 us, Htpr 150 us (slot 250 us).
// The slot position is counted by Z.
//
// From the start state an Ap or Apr pulse always opens a window. An Htp_1 or
// Htpr_1 waiting in the buffer opens one only when Mode_Sp is high (single
// axis, Tomogram/Topogram); Ap and Apr have priority. With Mode_Sp low (spiral)
// a stored Htp/Htpr waits for the next Ap or Apr. At the end of the Ap/Apr slot
// (400 us) a waiting Htp_1 or Htpr_1 is sent in the second slot, otherwise the
// coder returns to the start state. Taking a value from the buffer pulses
// Reset_S for one tick. The activity outputs are high while Mux_out is high
// for the corresponding signal.
//
// States, transitions, slot and pulse lengths follow the document's Control
// diagram, window figure and output table. The document lets the Ap/Apr slot
// be timed by the rot decoder's counter XS; here one local counter Z times
// both slots, which gives the same lengths. Reset_S as a one-tick pulse at the
// moment the value is taken is this design's reading of "ready for a new
// Htp_1 or Htpr_1".
// Interface: clk, rst_n, tick (500 kHz enable), ap, apr, htp_1, htpr_1,
// mode_sp in; mux_out, reset_s, *_akt out, all registered or decoded from
// registers; Mux_out rises one tick after the Ap/Apr/Htp_1/Htpr_1 it answers.
module control
  import messen_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic ap,
  input  logic apr,
  input  logic htp_1,
  input  logic htpr_1,
  input  logic mode_sp,
  output logic mux_out,
  output logic reset_s,
  output logic ap_akt,
  output logic apr_akt,
  output logic htp_akt,
  output logic htpr_akt
);
  control_state_e state;
  logic [ZW-1:0]  z;
  logic [ZW-1:0]  z_next;
  logic [ZW-1:0]  high_len;
  logic [ZW-1:0]  slot_len;

  always_comb begin
    z_next = z + 1'b1;
    unique case (state)
      CT_AP:   begin high_len = ZW'(AP_HIGH);   slot_len = ZW'(AP_SLOT);  end
      CT_APR:  begin high_len = ZW'(APR_HIGH);  slot_len = ZW'(AP_SLOT);  end
      CT_HTP:  begin high_len = ZW'(HTP_HIGH);  slot_len = ZW'(HTP_SLOT); end
      CT_HTPR: begin high_len = ZW'(HTPR_HIGH); slot_len = ZW'(HTP_SLOT); end
      default: begin high_len = '0;             slot_len = '0;            end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= CT_START;
      z       <= '0;
      mux_out <= 1'b0;
      reset_s <= 1'b0;
    end else if (tick) begin
      reset_s <= 1'b0;
      unique case (state)
        CT_START: begin
          z <= '0;
          if (ap) begin
            state   <= CT_AP;
            mux_out <= 1'b1;
          end else if (apr) begin
            state   <= CT_APR;
            mux_out <= 1'b1;
          end else if (mode_sp && htp_1) begin
            state   <= CT_HTP;
            mux_out <= 1'b1;
            reset_s <= 1'b1;
          end else if (mode_sp && htpr_1) begin
            state   <= CT_HTPR;
            mux_out <= 1'b1;
            reset_s <= 1'b1;
          end
        end
        CT_AP, CT_APR: begin
          z <= z_next;
          if (z_next == high_len) mux_out <= 1'b0;
          if (z_next == slot_len) begin
            z <= '0;
            if (htp_1) begin
              state   <= CT_HTP;
              mux_out <= 1'b1;
              reset_s <= 1'b1;
            end else if (htpr_1) begin
              state   <= CT_HTPR;
              mux_out <= 1'b1;
              reset_s <= 1'b1;
            end else begin
              state   <= CT_START;
            end
          end
        end
        CT_HTP, CT_HTPR: begin
          z <= z_next;
          if (z_next == high_len) mux_out <= 1'b0;
          if (z_next == slot_len) begin
            z     <= '0;
            state <= CT_START;
          end
        end
        default: state <= CT_START;
      endcase
    end
  end

  assign ap_akt   = mux_out && (state == CT_AP);
  assign apr_akt  = mux_out && (state == CT_APR);
  assign htp_akt  = mux_out && (state == CT_HTP);
  assign htpr_akt = mux_out && (state == CT_HTPR);

  // Mux_out is only ever high inside a slot.
  assert property (@(posedge clk) disable iff (!rst_n) mux_out |-> state != CT_START);
endmodule
