// sm_counter: counter state machine with the commands count, hold and reset.
//
// Three states: reset (initial), count and hold. The command input selects
// the next state each clock. The value Stand is cleared on every move into the
// reset state, while staying there, and on the move from reset into count; it
// is incremented only while the machine stays in the count state with the
// command count. A move between count and hold leaves Stand as it is, so hold
// freezes the value and count resumes from it.
//
// States, transitions and actions follow the document's state diagram for
// this example. The document gives Stand as an integer; its width (16 bits,
// wrapping), the command encoding and treating the unused code 3 like hold
// are this design's choices.
// Interface: clk, rst_n, cmd[1:0] in; stand[WIDTH-1:0] out (registered).
module sm_counter
  import sm_counter_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [1:0]       cmd,
  output logic [WIDTH-1:0] stand
);
  typedef enum logic [1:0] {S_RESET, S_COUNT, S_HOLD} state_e;
  state_e  state;
  sm_cmd_e c;

  assign c = sm_cmd_e'(cmd);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_RESET;
      stand <= '0;
    end else begin
      unique case (state)
        S_RESET: begin
          stand <= '0;
          if (c == CMD_COUNT) state <= S_COUNT;
        end
        S_COUNT: begin
          if (c == CMD_COUNT) begin
            stand <= stand + 1'b1;
          end else if (c == CMD_RESET) begin
            state <= S_RESET;
            stand <= '0;
          end else begin
            state <= S_HOLD;
          end
        end
        S_HOLD: begin
          if (c == CMD_COUNT) begin
            state <= S_COUNT;
          end else if (c == CMD_RESET) begin
            state <= S_RESET;
            stand <= '0;
          end
        end
        default: state <= S_RESET;
      endcase
    end
  end
endmodule
