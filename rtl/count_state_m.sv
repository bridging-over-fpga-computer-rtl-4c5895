// count_state_m: state machine that runs an external counter from 0 to 63.
//
// In its start state it waits for To_and_from; it then pulls Load low (clear
// the counter) with Count_enable high (hold), and moves on. While the counter
// value is below 63 it keeps Load high and Count_enable low, so the counter
// runs; at 63 it sets Count_enable high again (stop) and returns to the start
// state. Because the controls are registered, as in a state machine whose
// outputs are produced on the clock, the counter makes one more step after
// reaching 63 and stops at 64.
//
// States, conditions and actions follow the document's state diagram for
// state_m; the reset values (Count_enable high, Load high: counter stopped)
// are this design's choice.
// Interface: clk, rst_n, to_and_from, value[WIDTH-1:0] in; count_enable,
// load out (registered).
module count_state_m #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned LIMIT = 63
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             to_and_from,
  input  logic [WIDTH-1:0] value,
  output logic             count_enable,
  output logic             load
);
  typedef enum logic {S_START, S_ANOTHER} state_e;
  state_e state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_START;
      count_enable <= 1'b1;
      load         <= 1'b1;
    end else begin
      unique case (state)
        S_START: begin
          if (to_and_from) begin
            state        <= S_ANOTHER;
            load         <= 1'b0;
            count_enable <= 1'b1;
          end
        end
        S_ANOTHER: begin
          if (value == WIDTH'(LIMIT)) begin
            state        <= S_START;
            count_enable <= 1'b1;
          end else if (value < WIDTH'(LIMIT)) begin
            count_enable <= 1'b0;
            load         <= 1'b1;
          end
        end
        default: state <= S_START;
      endcase
    end
  end
endmodule
