// count_demo: the "count" example design: a counter administered by a state
// machine.
//
// The counting itself sits in count_macro (the block the document leaves to a
// vendor counter macro); count_state_m only drives its two controls,
// Count_enable and Load, and watches its value. A pulse on To_and_from clears
// the counter and lets it run up to the limit, where it stops (one step past
// the limit, see count_state_m). Result is the counter value.
//
// The split into state machine and counter block and the 8-bit width follow
// the document's data flow diagram for this example.
// Interface: clk, rst_n, to_and_from in; result[WIDTH-1:0] out.
// Timing: after To_and_from is seen, Result is 0 two clocks later and then
// increases by one per clock until it stops at 64.
module count_demo #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             to_and_from,
  output logic [WIDTH-1:0] result
);
  logic count_enable, load;
  logic [WIDTH-1:0] value;

  count_state_m #(.WIDTH(WIDTH)) u_state_m (
    .clk, .rst_n, .to_and_from, .value, .count_enable, .load
  );
  count_macro #(.WIDTH(WIDTH)) u_count (
    .clk, .rst_n, .count_enable, .load, .value
  );
  assign result = value;
endmodule
