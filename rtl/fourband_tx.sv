// fourband_tx: four-band transmitter.
//
// Four tx_band lanes run side by side on the same sample strobe and their
// passband outputs are added into the single line sample sent to the DAC:
//   band 1: QPSK,   upsampling 16, carrier  0 Hz     (27.125 ksym/s)
//   band 2: 16-QAM, upsampling 32, carrier 33.91 kHz (13.56 ksym/s)
//   band 3: 16-QAM, upsampling 32, carrier 54.25 kHz
//   band 4: 16-QAM, upsampling 32, carrier 74.6 kHz
// Each band carries 54.25 kbit/s, 217 kbit/s in total, inside 0..84.09 kHz.
// The band plan is the design's; the sum is saturated to 18 bits. `out` is
// valid for one clock at `out_valid`; all lanes have the same latency.
// `sym[b]` / `sym_valid[b]` report the symbol each lane sends (4 bits; the
// QPSK lane uses bits [1:0]).
//
// The band plan follows the design description; equal weighting and
// saturation of the sum are this design's choice.
module fourband_tx
  import fb_pkg::*;
#(
  parameter int F2_HZ = 33_910,
  parameter int F3_HZ = 54_250,
  parameter int F4_HZ = 74_600
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       samp_en,
  output logic [3:0] sym       [4],
  output logic       sym_valid [4],
  output logic       out_valid,
  output sample_t    out
);
  sample_t    y [4];
  logic [3:0] v;
  logic [1:0] sym_bb;

  tx_band #(.BITS(2), .L(16), .F_HZ(0)) u_band1 (
    .clk (clk), .rst (rst), .samp_en (samp_en),
    .sym (sym_bb), .sym_valid (sym_valid[0]), .out_valid (v[0]), .out (y[0])
  );
  assign sym[0] = {2'b00, sym_bb};

  tx_band #(.BITS(4), .L(32), .F_HZ(F2_HZ)) u_band2 (
    .clk (clk), .rst (rst), .samp_en (samp_en),
    .sym (sym[1]), .sym_valid (sym_valid[1]), .out_valid (v[1]), .out (y[1])
  );
  tx_band #(.BITS(4), .L(32), .F_HZ(F3_HZ)) u_band3 (
    .clk (clk), .rst (rst), .samp_en (samp_en),
    .sym (sym[2]), .sym_valid (sym_valid[2]), .out_valid (v[2]), .out (y[2])
  );
  tx_band #(.BITS(4), .L(32), .F_HZ(F4_HZ)) u_band4 (
    .clk (clk), .rst (rst), .samp_en (samp_en),
    .sym (sym[3]), .sym_valid (sym_valid[3]), .out_valid (v[3]), .out (y[3])
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      out       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= v[0];
      if (v[0]) out <= sat_sample(64'(y[0]) + 64'(y[1]) + 64'(y[2]) + 64'(y[3]));
    end
  end

  wire unused_ok = &v[3:1];
endmodule
