// rx_mixer: down-converter of one sub-band.
//
// Multiplies the received real sample by the carrier and by its 90-degree
// shifted copy: a = S*cos(wt) (in-phase branch) and d = S*(-sin(wt))
// (quadrature branch), as in the design's QAM demodulator. Each product holds
// the wanted baseband term at half amplitude plus a term at twice the
// carrier, which the following matched filter removes. Same formats and
// register timing as tx_mixer.
//
// The products S*cos and -S*sin follow the design description; the fixed-
// point formats are this design's choice.
module rx_mixer
  import fb_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    in_valid,
  input  sample_t in,
  input  trig_t   cos_i,
  input  trig_t   sin_i,
  output logic    out_valid,
  output sample_t out_i,
  output sample_t out_q
);
  localparam int PW = SAMPLE_W + TRIG_W;
  logic signed [PW-1:0] a, d;

  always_comb begin
    a = PW'(in) * PW'(cos_i);
    d = -(PW'(in) * PW'(sin_i));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_i     <= '0;
      out_q     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_i <= sat_sample(64'(a >>> TRIG_FR));
        out_q <= sat_sample(64'(d >>> TRIG_FR));
      end
    end
  end
endmodule
