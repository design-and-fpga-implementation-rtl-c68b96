// upsampler: zero-insertion upsampling by L.
//
// On every sample strobe `en` the output advances one sample. At phase 0 of
// each group of L samples it takes the input symbol amplitude and pulses
// `sym_req` (the source should move to its next symbol); on the other L-1
// samples it outputs zero. This is g(k) = f(k/L) when k/L is an integer and 0
// otherwise, as in the design description; L is 16 for the QPSK band and 32
// for the 16-QAM bands. The output is registered: `out` and `out_valid`
// change at the edge where `en` is high.
//
// Zero insertion by L follows the design description; placing the symbol on
// the first sample of its period is this design's choice.
module upsampler
  import fb_pkg::*;
#(
  parameter int L = 16
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      en,
  input  iq_level_t in,
  output logic      sym_req,
  output iq_level_t out,
  output logic      out_valid
);
  localparam int PW = (L > 1) ? $clog2(L) : 1;
  logic [PW-1:0] phase;

  assign sym_req = en && (phase == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      phase     <= '0;
      out       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= en;
      if (en) begin
        out   <= (phase == '0) ? in : '0;
        phase <= (phase == PW'(L - 1)) ? '0 : phase + 1'b1;
      end
    end
  end
endmodule
