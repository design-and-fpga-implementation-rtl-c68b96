// qpsk_mapper: QPSK symbol to in-phase/quadrature amplitude.
//
// Follows the design's QPSK table: 00 -> (+1,+1), 01 -> (-1,+1),
// 10 -> (+1,-1), 11 -> (-1,-1). Bit 0 therefore selects the sign of the
// in-phase amplitude and bit 1 the sign of the quadrature amplitude.
// Purely combinational.
module qpsk_mapper
  import fb_pkg::*;
(
  input  logic [1:0] sym,
  output iq_level_t  lvl
);
  always_comb begin
    lvl.i = sym[0] ? -3'sd1 : 3'sd1;
    lvl.q = sym[1] ? -3'sd1 : 3'sd1;
  end
endmodule
