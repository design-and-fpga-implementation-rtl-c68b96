// tx_mixer: up-converter of one sub-band.
//
// s = I*cos(wt) - Q*sin(wt): the filtered in-phase and quadrature baseband
// samples are shifted to the band's carrier and combined into one real
// passband sample, as in the design's quadrature modulation equation. Inputs
// are samples with 12 fraction bits and carrier values with 14 fraction bits;
// the result is shifted back to 12 fraction bits and saturated. Registered:
// `out` and `out_valid` are updated at the edge where `in_valid` is high.
//
// The formula I*cos - Q*sin follows the design description; the fixed-point
// formats and saturation are this design's choice.
module tx_mixer
  import fb_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    in_valid,
  input  sample_t in_i,
  input  sample_t in_q,
  input  trig_t   cos_i,
  input  trig_t   sin_i,
  output logic    out_valid,
  output sample_t out
);
  localparam int PW = SAMPLE_W + TRIG_W + 1;
  logic signed [PW-1:0] mix;

  always_comb mix = PW'(in_i) * PW'(cos_i) - PW'(in_q) * PW'(sin_i);

  always_ff @(posedge clk) begin
    if (rst) begin
      out       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out <= sat_sample(64'(mix >>> TRIG_FR));
    end
  end
endmodule
