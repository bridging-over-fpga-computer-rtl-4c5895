// messen_pkg: shared constants and state types of the w_messen position-signal
// multiplexer.
//
// All times are counted in ticks of the 500 kHz state-machine rate (2 us per
// tick). The decoder thresholds (15, 63, 127, 225, 324) are the counter values
// of the decoders' state diagrams; the output protocol lengths follow the
// output table (Ap 200/200 us, Apr 250/150 us, Htp 100/150 us, Htpr 150/100 us)
// and the 650 us window split into a 400 us and a 250 us part.
package messen_pkg;

  // Decoder counter thresholds, in ticks after the rising edge of the input.
  localparam int unsigned RIPPLE_LO  = 15;   // input low after > 15 ticks (32 us) ...
  localparam int unsigned RIPPLE_HI  = 63;   // ... and before 63 ticks (127 us): too short
  localparam int unsigned BLOCK_CHK  = 63;   // 128 us: Phs checks whether the buffer is still full
  localparam int unsigned DECIDE     = 127;  // 256 us: short (Ap/Htp) or long (Apr/Htpr)
  localparam int unsigned LONG_CHK   = 225;  // 450 us: still high means too long
  localparam int unsigned CYCLE_END  = 324;  // 650 us: decoder returns to its start state
  localparam int unsigned XW         = 9;    // counter width, 0..324 needs nine bits

  // Output protocol of the coder, in ticks (high time, whole slot time).
  localparam int unsigned AP_HIGH    = 100;  // 200 us
  localparam int unsigned APR_HIGH   = 125;  // 250 us
  localparam int unsigned AP_SLOT    = 200;  // 400 us, first part of the window
  localparam int unsigned HTP_HIGH   = 50;   // 100 us
  localparam int unsigned HTPR_HIGH  = 75;   // 150 us
  localparam int unsigned HTP_SLOT   = 125;  // 250 us, last part of the window
  localparam int unsigned ZW         = 8;    // slot counter width, up to 200

  // Flag positions on Result_vektor / Reset_vektor, in the order in which the
  // flag inputs are listed.
  localparam int unsigned F_PHS_KURZ = 0;
  localparam int unsigned F_PHS_LANG = 1;
  localparam int unsigned F_ROT_LANG = 2;
  localparam int unsigned F_ROT_KURZ = 3;
  localparam int unsigned F_AP_AKT   = 4;
  localparam int unsigned F_APR_AKT  = 5;
  localparam int unsigned F_HTP_AKT  = 6;
  localparam int unsigned F_HTPR_AKT = 7;
  localparam int unsigned F_HTP_N_M  = 8;
  localparam int unsigned NFLAGS     = 9;

  typedef enum logic [1:0] {DEC_START, DEC_DECIDE, DEC_COUNT} dec_state_e;
  typedef enum logic [2:0] {SP_START, SP_HTP, SP_HTP_ZW, SP_HTPR, SP_HTPR_ZW} speich_state_e;
  typedef enum logic [2:0] {CT_START, CT_AP, CT_APR, CT_HTP, CT_HTPR} control_state_e;

endpackage
