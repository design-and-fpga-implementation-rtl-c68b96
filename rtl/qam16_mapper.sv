// qam16_mapper: Gray-coded 16-QAM symbol to in-phase/quadrature amplitude.
//
// Bits [3:2] choose the in-phase level and bits [1:0] the quadrature level,
// each with a 2-bit Gray code so that neighbouring constellation points differ
// in one bit:
//   in-phase:   00 -> -3, 01 -> -1, 11 -> +1, 10 -> +3
//   quadrature: 00 -> +3, 01 -> +1, 11 -> -1, 10 -> -3
// This reproduces the design's 16-QAM constellation (e.g. 0000 at (-3,+3),
// 1010 at (+3,-3)). Purely combinational.
//
// The Gray-coded constellation follows the published 16-QAM table and
// figure; the 3-bit level encoding is this design's choice.
module qam16_mapper
  import fb_pkg::*;
(
  input  logic [3:0] sym,
  output iq_level_t  lvl
);
  function automatic level_t gray_i(logic [1:0] g);
    case (g)
      2'b00:   return -3'sd3;
      2'b01:   return -3'sd1;
      2'b11:   return  3'sd1;
      default: return  3'sd3;
    endcase
  endfunction

  always_comb begin
    lvl.i = gray_i(sym[3:2]);
    lvl.q = -gray_i(sym[1:0]);   // quadrature axis uses the mirrored code
  end
endmodule
