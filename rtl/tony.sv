// tony: latched error and activity flags for the master.
//
// Nine independent flag flip-flops. A flag is set by a rising edge of its
// message input (the input was low at the previous tick and is high now) and
// cleared when the master sets the flag's bit of Reset_vektor; a message that
// simply stays high does not set the flag again. When a set and a reset meet
// in the same tick the reset wins. Flag order (bit 0..8): Phs_Kurz, Phs_Lang,
// Rot_Lang, Rot_Kurz, Ap_akt, Apr_akt, Htp_akt, Htpr_akt, Htp_n_m.
//
// Edge-set / reset behaviour, the reset winning, the nine flags and the
// 500 kHz rate follow the document; the bit order is this design's choice
// (the order in which the document lists the inputs).
// Interface: clk, rst_n, tick (500 kHz enable), msg[8:0], reset_vektor[8:0]
// in, result_vektor[8:0] out. Inputs are sampled at ticks, so the master must
// hold a reset bit for at least one tick period (2 us); a flag rises at the
// tick after its message rises.
module tony
  import messen_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tick,
  input  logic [NFLAGS-1:0] msg,
  input  logic [NFLAGS-1:0] reset_vektor,
  output logic [NFLAGS-1:0] result_vektor
);
  logic [NFLAGS-1:0] msg_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      msg_q         <= '0;
      result_vektor <= '0;
    end else if (tick) begin
      msg_q         <= msg;
      result_vektor <= (result_vektor | (msg & ~msg_q)) & ~reset_vektor;
    end
  end
endmodule
