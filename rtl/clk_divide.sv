// clk_divide: rate divider of the w_messen multiplexer.
//
// The system clock runs at 1 MHz while the state machines are specified for
// 500 kHz. Instead of a derived clock this block gives a one-cycle clock
// enable `tick` every DIV system clocks (DIV = 2 gives the 500 kHz rate), so
// the whole design stays in one clock domain. It also samples the mode input
// Mode_Sp on each tick, so the state machines see a value that only changes
// between their steps.
//
// The 1 MHz / 500 kHz ratio is the document's; using an enable instead of a
// divided clock and registering Mode_Sp here are choices of this design.
// Interface: clk, rst_n (asynchronous, active low), mode_sp in; tick and
// mode_sp_q out. tick is high in the last of every DIV cycles; mode_sp_q is
// updated at the clock edge at which tick is high.
module clk_divide #(
  parameter int unsigned DIV = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic mode_sp,
  output logic tick,
  output logic mode_sp_q
);
  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      mode_sp_q <= 1'b0;
    end else begin
      if (tick) begin
        cnt       <= '0;
        mode_sp_q <= mode_sp;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  assign tick = (cnt == CW'(DIV - 1));
endmodule
