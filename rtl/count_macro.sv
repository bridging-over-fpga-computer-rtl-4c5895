// count_macro: the plain up-counter that the counter example hands to a
// vendor counter macro (8 or 16 bits wide).
//
// Load low clears the counter; otherwise it counts up by one every clock while
// Count_enable is low and holds while Count_enable is high (the enable is
// active low, as in the document). It wraps at 2**WIDTH. Load has priority.
//
// The control semantics and the 8/16-bit widths follow the document, which
// leaves the body to the vendor macro; this is the simplest logic with that
// function. rst_n (asynchronous, active low) is this design's addition.
// Interface: clk, rst_n, count_enable, load in; value[WIDTH-1:0] out,
// registered (changes at the clock edge after the controls).
module count_macro #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             count_enable,
  input  logic             load,
  output logic [WIDTH-1:0] value
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            value <= '0;
    else if (!load)        value <= '0;
    else if (!count_enable) value <= value + 1'b1;
  end
endmodule
