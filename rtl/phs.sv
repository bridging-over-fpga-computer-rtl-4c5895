// phs: decoder for the pulse line from the patient handling system
// (Htp / Htpr).
//
// It works like the rot decoder, with counter Y in 500 kHz ticks:
//   - Phs_in falling between 16 and 62 ticks (32..127 us) sets Phs_Kurz and
//     returns to the start state; an earlier drop is ignored as a ripple;
//   - at Y = 63 (128 us) the pulse counts as a signal; if the buffer behind
//     (Speich, seen through Htp_1 / Htpr_1) still holds the previous Htp or
//     Htpr, Htp_n_m is set and this pulse will not be passed on;
//   - at Y = 127 (256 us) Phs_in high gives Htpr, low gives Htp (one tick),
//     unless the pulse was blocked;
//   - at Y = 225 (450 us) Phs_in still high sets Phs_Lang;
//   - at Y = 324 (650 us) the decoder returns to its start state.
// Error flags stay set until the next pulse starts.
//
// The thresholds, the 128 us buffer check and the loss of a blocked pulse
// follow the document; the document prints no diagram of its own for this
// decoder, so the state structure is that of the rot decoder, which it
// describes as identical apart from Htp_n_m.
// Interface: clk, rst_n, tick (500 kHz enable), phs_in, htp_1, htpr_1 in;
// registered outputs change only at ticks.
module phs
  import messen_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic phs_in,
  input  logic htp_1,
  input  logic htpr_1,
  output logic htp,
  output logic htpr,
  output logic phs_lang,
  output logic phs_kurz,
  output logic htp_n_m
);
  dec_state_e    state;
  logic [XW-1:0] y;
  logic          blocked;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= DEC_START;
      y        <= '0;
      blocked  <= 1'b0;
      htp      <= 1'b0;
      htpr     <= 1'b0;
      phs_lang <= 1'b0;
      phs_kurz <= 1'b0;
      htp_n_m  <= 1'b0;
    end else if (tick) begin
      unique case (state)
        DEC_START: begin
          if (phs_in) begin
            state    <= DEC_DECIDE;
            y        <= '0;
            blocked  <= 1'b0;
            htp      <= 1'b0;
            htpr     <= 1'b0;
            phs_lang <= 1'b0;
            phs_kurz <= 1'b0;
            htp_n_m  <= 1'b0;
          end
        end
        DEC_DECIDE: begin
          if (y == XW'(DECIDE)) begin
            state <= DEC_COUNT;
            y     <= y + 1'b1;
            if (!blocked) begin
              if (phs_in) htpr <= 1'b1;
              else        htp  <= 1'b1;
            end
          end else if (!phs_in && y > XW'(RIPPLE_LO) && y < XW'(RIPPLE_HI)) begin
            state    <= DEC_START;
            y        <= '0;
            phs_kurz <= 1'b1;
          end else begin
            if (y == XW'(BLOCK_CHK) && (htp_1 || htpr_1)) begin
              blocked <= 1'b1;
              htp_n_m <= 1'b1;
            end
            y <= y + 1'b1;
          end
        end
        DEC_COUNT: begin
          htp  <= 1'b0;
          htpr <= 1'b0;
          if (y == XW'(CYCLE_END)) begin
            state <= DEC_START;
          end else begin
            if (y == XW'(LONG_CHK) && phs_in) phs_lang <= 1'b1;
            y <= y + 1'b1;
          end
        end
        default: state <= DEC_START;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(htp && htpr));
endmodule
