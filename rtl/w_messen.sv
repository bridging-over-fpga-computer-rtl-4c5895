// w_messen: position-signal multiplexer for a CT scanner with spiral mode.
//
// Two pulse lines arrive unsynchronised: Rot_in from the rotating part (Ap,
// 200 us, or the once-per-turn Apr, 400 us) and Phs_in from the patient table
// (Htp 200 us, Htpr 400 us). The design decodes each pulse by its length,
// buffers a table pulse until there is room for it, and re-codes all four
// kinds onto the single line Mux_out in fixed 650 us windows (see control).
// Pulses that are too short or too long, and table pulses that arrive while
// the previous one is still waiting, raise error flags; every kind sent on
// Mux_out raises an activity flag. Flags are latched in tony and cleared by
// the master through Reset_vektor.
//
// Structure (the document's data flow diagram):
//   rot_in -> rot -> Ap/Apr ------------------------> control -> mux_out
//   phs_in -> phs -> Htp/Htpr -> speich -> Htp_1/Htpr_1 ^   |
//                      ^-------------- Htp_1/Htpr_1 ----+   Reset_S -> speich
//   rot/phs error flags + control activity flags -> tony -> result_vektor
// clk_divide turns the 1 MHz clock into a 500 kHz tick for all state machines.
//
// The two input lines pass through two flip-flops each before use (an
// asynchronous-input guard added by this design). XS, the rot counter, is
// brought out because the document relays it; control does not need it.
// Interface: clk (1 MHz), rst_n (asynchronous, active low), rot_in, phs_in,
// mode_sp (0 spiral, 1 single axis), reset_vektor[8:0]; mux_out,
// result_vektor[8:0] (bit order in tony), xs[8:0].
// Latency: Mux_out rises 256..262 us after the rising edge of the Rot_in
// pulse it answers (decision at 256 us plus synchroniser and register delay).
module w_messen
  import messen_pkg::*;
#(
  parameter int unsigned CLK_DIV = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rot_in,
  input  logic              phs_in,
  input  logic              mode_sp,
  input  logic [NFLAGS-1:0] reset_vektor,
  output logic              mux_out,
  output logic [NFLAGS-1:0] result_vektor,
  output logic [XW-1:0]     xs
);
  logic [1:0] rot_sync, phs_sync;
  logic       tick, mode_sp_q;
  logic       ap, apr, rot_lang, rot_kurz;
  logic       htp, htpr, phs_lang, phs_kurz, htp_n_m;
  logic       htp_1, htpr_1, reset_s;
  logic       ap_akt, apr_akt, htp_akt, htpr_akt;
  logic [NFLAGS-1:0] msg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rot_sync <= '0;
      phs_sync <= '0;
    end else begin
      rot_sync <= {rot_sync[0], rot_in};
      phs_sync <= {phs_sync[0], phs_in};
    end
  end

  clk_divide #(.DIV(CLK_DIV)) u_clk_divide (
    .clk, .rst_n, .mode_sp, .tick, .mode_sp_q
  );

  rot u_rot (
    .clk, .rst_n, .tick, .rot_in(rot_sync[1]),
    .ap, .apr, .rot_lang, .rot_kurz, .xs
  );

  phs u_phs (
    .clk, .rst_n, .tick, .phs_in(phs_sync[1]), .htp_1, .htpr_1,
    .htp, .htpr, .phs_lang, .phs_kurz, .htp_n_m
  );

  speich u_speich (
    .clk, .rst_n, .tick, .htp, .htpr, .reset_s, .htp_1, .htpr_1
  );

  control u_control (
    .clk, .rst_n, .tick, .ap, .apr, .htp_1, .htpr_1, .mode_sp(mode_sp_q),
    .mux_out, .reset_s, .ap_akt, .apr_akt, .htp_akt, .htpr_akt
  );

  always_comb begin
    msg             = '0;
    msg[F_PHS_KURZ] = phs_kurz;
    msg[F_PHS_LANG] = phs_lang;
    msg[F_ROT_LANG] = rot_lang;
    msg[F_ROT_KURZ] = rot_kurz;
    msg[F_AP_AKT]   = ap_akt;
    msg[F_APR_AKT]  = apr_akt;
    msg[F_HTP_AKT]  = htp_akt;
    msg[F_HTPR_AKT] = htpr_akt;
    msg[F_HTP_N_M]  = htp_n_m;
  end

  tony u_tony (
    .clk, .rst_n, .tick, .msg, .reset_vektor, .result_vektor
  );
endmodule
