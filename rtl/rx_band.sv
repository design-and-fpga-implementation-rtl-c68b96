// rx_band: one receive lane of the four-band receiver (QAM demodulator).
//
// nco -> rx_mixer (in-phase and quadrature branches) -> square-root
// raised-cosine matched filters (the low-pass filters of the demodulator)
// -> sym_sampler -> qam_decision -> iq_mux. The structure follows the
// design's demodulator and receiver diagrams.
//
// Carrier and symbol timing are fixed, not tracked: the lane's carrier is the
// transmit carrier delayed by LAG samples (the delay from the transmit mixer
// to this lane's mixer), and the symbol sampler skips OFFSET samples, the
// delay from the transmit upsampler to the first matched-filter peak. The
// decision unit UNIT is the expected amplitude of constellation level 1 at
// the decision point: 4096 (one unit) times the mixer gain (1 at 0 Hz, 1/2
// otherwise) times the gain of the maximally flat line filter at F_HZ.
//
// `sym`/`sym_valid` give each decided symbol; `line` is the multiplexed
// output, carrying the in-phase decision during the first half of the symbol
// period and the quadrature decision during the second half.
module rx_band
  import fb_pkg::*;
#(
  parameter int BITS   = 4,
  parameter int L      = 32,
  parameter int F_HZ   = 54_250,
  parameter int LAG    = 22,
  parameter int OFFSET = 150,
  localparam int HB    = BITS / 2
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            in_valid,
  input  sample_t         in,
  output logic [BITS-1:0] sym,
  output logic            sym_valid,
  output logic [HB-1:0]   line,
  output logic            line_sel
);
  localparam real MIX_GAIN = (F_HZ == 0) ? 1.0 : 0.5;
  localparam int  UNIT = $rtoi(real'(1 << SAMPLE_FR) * MIX_GAIN
                               * maxflat_gain(real'(F_HZ) / real'(FS_HZ)) + 0.5);
  localparam int  PW = (L > 1) ? $clog2(L) : 1;

  trig_t         c, s;
  logic          m_valid, fi_valid, fq_valid, s_valid;
  sample_t       mi, mq;
  iq_sample_t    filt, samp;
  logic [PW-1:0] phase;
  logic [HB-1:0] di, dq;

  nco #(.F_HZ(F_HZ), .LAG(LAG)) u_nco (
    .clk   (clk),
    .rst   (rst),
    .adv   (in_valid),
    .cos_o (c),
    .sin_o (s)
  );

  rx_mixer u_mix (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (in_valid),
    .in        (in),
    .cos_i     (c),
    .sin_i     (s),
    .out_valid (m_valid),
    .out_i     (mi),
    .out_q     (mq)
  );

  srrc_fir #(.L(L), .IN_W(SAMPLE_W), .OUT_W(SAMPLE_W), .SHIFT(COEF_FR)) u_fir_i (
    .clk (clk), .rst (rst), .in_valid (m_valid), .in (mi),
    .out_valid (fi_valid), .out (filt.i)
  );
  srrc_fir #(.L(L), .IN_W(SAMPLE_W), .OUT_W(SAMPLE_W), .SHIFT(COEF_FR)) u_fir_q (
    .clk (clk), .rst (rst), .in_valid (m_valid), .in (mq),
    .out_valid (fq_valid), .out (filt.q)
  );

  sym_sampler #(.L(L), .OFFSET(OFFSET)) u_samp (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (fi_valid),
    .in        (filt),
    .out_valid (s_valid),
    .out       (samp),
    .phase     (phase)
  );

  qam_decision #(.BITS(BITS), .UNIT(UNIT)) u_dec (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (s_valid),
    .in_i      (samp.i),
    .in_q      (samp.q),
    .out_valid (sym_valid),
    .sym       (sym),
    .i_bits    (di),
    .q_bits    (dq)
  );

  assign line_sel = (phase >= PW'(L / 2));

  iq_mux #(.W(HB)) u_mux (
    .in0 (di),
    .in1 (dq),
    .sel (line_sel),
    .out (line)
  );

  wire unused_ok = fq_valid;
endmodule
