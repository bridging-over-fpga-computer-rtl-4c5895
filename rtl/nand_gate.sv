// nand_gate: the two-input NAND gate of the "directly coded" example.
//
// The output is low only when both inputs are high. It is purely
// combinational: there is no clock, and the output follows the inputs
// within the gate delay of the target technology.
//
// The function is the one the document's example implements. Its port names
// and the lack of a modelled propagation delay are this design's choices.
// The example's delay was only a simulation annotation and cannot be
// synthesised.
// Interface: a, b in; y out.
module nand_gate (
  input  logic a,
  input  logic b,
  output logic y
);
  always_comb y = ~(a & b);
endmodule
