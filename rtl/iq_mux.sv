// iq_mux: 2-to-1 multiplexer (data selector) of the demodulator.
//
// Forwards either the in-phase decision (sel = 0) or the quadrature decision
// (sel = 1) onto one output line, so the two halves of each received symbol
// leave the demodulator one after the other. Purely combinational.
//
// The two-input data selector follows the design description; the widths are
// this design's choice.
module iq_mux #(
  parameter int W = 2
) (
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  input  logic         sel,
  output logic [W-1:0] out
);
  always_comb out = sel ? in1 : in0;
endmodule
