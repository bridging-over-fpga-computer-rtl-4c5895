// rot: decoder for the pulse line from the rotating part (Ap / Apr).
//
// A rising Rot_in starts a 650 us cycle counted by X in 500 kHz ticks:
//   - Rot_in falling between 16 and 62 ticks (32..127 us) is a too-short pulse:
//     Rot_Kurz is set and the decoder returns to its start state;
//     a drop in the first 32 us is ignored as a ripple.
//   - at X = 127 (256 us) Rot_in still high means Apr, low means Ap; the chosen
//     output is high for one tick;
//   - at X = 225 (450 us) Rot_in still high sets Rot_Lang (too long);
//   - at X = 324 (650 us) the decoder returns to its start state.
// XS relays the counter (X + 1) during the count phase; it is cleared when a
// new pulse starts.
//
// The states, conditions and counter values follow the document's state
// diagram for Rot. Error flags stay set until the next pulse starts; that is
// also the document's behaviour. Running on a tick enable instead of a
// divided clock is this design's choice.
// Interface: clk, rst_n, tick (500 kHz enable), rot_in (synchronous to clk).
// Outputs are registered and change only at ticks; ap/apr are one tick long.
module rot
  import messen_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          tick,
  input  logic          rot_in,
  output logic          ap,
  output logic          apr,
  output logic          rot_lang,
  output logic          rot_kurz,
  output logic [XW-1:0] xs
);
  dec_state_e    state;
  logic [XW-1:0] x;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= DEC_START;
      x        <= '0;
      xs       <= '0;
      ap       <= 1'b0;
      apr      <= 1'b0;
      rot_lang <= 1'b0;
      rot_kurz <= 1'b0;
    end else if (tick) begin
      unique case (state)
        DEC_START: begin
          if (rot_in) begin
            state    <= DEC_DECIDE;
            x        <= '0;
            xs       <= '0;
            ap       <= 1'b0;
            apr      <= 1'b0;
            rot_lang <= 1'b0;
            rot_kurz <= 1'b0;
          end
        end
        DEC_DECIDE: begin
          if (x == XW'(DECIDE)) begin
            state <= DEC_COUNT;
            x     <= x + 1'b1;
            if (rot_in) apr <= 1'b1;
            else        ap  <= 1'b1;
          end else if (!rot_in && x > XW'(RIPPLE_LO) && x < XW'(RIPPLE_HI)) begin
            state    <= DEC_START;
            x        <= '0;
            rot_kurz <= 1'b1;
          end else begin
            x <= x + 1'b1;
          end
        end
        DEC_COUNT: begin
          ap  <= 1'b0;
          apr <= 1'b0;
          if (x == XW'(CYCLE_END)) begin
            state <= DEC_START;
          end else begin
            if (x == XW'(LONG_CHK) && rot_in) rot_lang <= 1'b1;
            x  <= x + 1'b1;
            xs <= x + 1'b1;
          end
        end
        default: state <= DEC_START;
      endcase
    end
  end

  // Ap and Apr are never given together.
  assert property (@(posedge clk) disable iff (!rst_n) !(ap && apr));
endmodule
